// tb_prra_i2node: check of the type-2 tree node against the table of its
// possible inputs and outputs.
//
// The eleven input codes that can reach a node with G = 1 are applied with
// the grant direction expected from the round-robin rule written in the
// table below. The upward code is compared with the meaning of {S1,S0}, and
// with G = 0 both grants must be 0.
module tb_prra_i2node;
  import prra_pkg::*;

  logic   clk = 1'b0;
  scode_t s_l, s_r, s;
  logic   g, g_l, g_r;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  prra_i2node dut (.s_l, .s_r, .g, .s, .g_l, .g_r);

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // {S1_L,S0_L,S1_R,S0_R, S1,S0, G_L,G_R}
  localparam logic [7:0] TABLE [11] = '{
    8'b0001_01_01, 8'b0100_01_10, 8'b0101_01_10, 8'b0010_10_01,
    8'b0110_10_10, 8'b1000_10_10, 8'b0011_11_01, 8'b0111_11_01,
    8'b1001_11_01, 8'b1100_11_10, 8'b1101_11_10
  };

  task automatic check(string what, logic [1:0] got, logic [1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: in=%b%b g=%b got %b exp %b", what, s_l, s_r, g, got, exp);
    end
  endtask

  initial begin
    for (int gi = 0; gi < 2; gi++) begin
      foreach (TABLE[t]) begin
        {s_l, s_r} = TABLE[t][7:4];
        g = gi[0];
        @(posedge clk);
        check("S", s, TABLE[t][3:2]);
        check("G", {g_l, g_r}, g ? TABLE[t][1:0] : 2'b00);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
