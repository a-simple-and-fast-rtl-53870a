// prra_prog_head: programmable head register for the parallel round-robin
// arbiter, an alternative to the ring of N Head flip-flops.
//
// The document proposes replacing the N Head flip-flops by an encoder, a
// log2(N)-bit register and a decoder, and names two modes: normal
// round-robin operation, and loading the register with a value to give any
// input the highest priority. It gives no further detail; the following is
// this design's reading. The encoder turns the one-hot grant into the index
// of the granted input; in round-robin mode the register then takes that
// index plus one (mod N) at the end of the slot, exactly as the flip-flop
// ring would. When load is 1 the register takes load_idx instead, and a
// load wins over a grant in the same cycle. The decoder turns the register
// into the one-hot head vector the arbitration tree needs. Reset gives index
// 0, so input 0 starts with the highest priority, as with the flip-flop
// ring.
//
// Interface: grant (one-hot or zero) from the tree, load/load_idx from the
// controller, h one-hot to the tree, head_idx the register itself.
// Timing: h changes only on the rising clk edge after a grant or a load.
module prra_prog_head #(
  parameter int unsigned N = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         grant,
  input  logic                 load,
  input  logic [$clog2(N)-1:0] load_idx,
  output logic [$clog2(N)-1:0] head_idx,
  output logic [N-1:0]         h
);

  localparam int unsigned LOGN = $clog2(N);

  logic [LOGN-1:0] grant_idx;   // encoder output
  logic            any_grant;
  logic [LOGN-1:0] idx_q;

  // encoder: index of the (single) set grant bit
  always_comb begin
    grant_idx = '0;
    any_grant = 1'b0;
    for (int unsigned i = 0; i < N; i++) begin
      if (grant[i]) begin
        grant_idx = LOGN'(i);
        any_grant = 1'b1;
      end
    end
  end

  // log2(N)-bit head register; N is a power of two, so +1 wraps mod N
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         idx_q <= '0;
    else if (load)      idx_q <= load_idx;
    else if (any_grant) idx_q <= grant_idx + 1'b1;
  end

  // decoder
  always_comb begin
    h = '0;
    h[idx_q] = 1'b1;
  end

  assign head_idx = idx_q;

endmodule
