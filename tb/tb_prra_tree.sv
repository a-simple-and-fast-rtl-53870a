// tb_prra_tree: checks the combinational arbitration tree against a
// round-robin reference model.
//
// For N = 8 (the default) and N = 4 every request vector is applied with
// every head position; for N = 16 and N = 64 random request vectors with
// random heads are applied. The reference grants the first requesting input
// at or after the head in ring order, and nothing when no input requests.
module tb_prra_tree;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [7:0]  r8,  h8,  g8;
  logic [3:0]  r4,  h4,  g4;
  logic [15:0] r16, h16, g16;
  logic [63:0] r64, h64, g64;

  prra_tree             dut8  (.r(r8),  .h(h8),  .g(g8));
  prra_tree #(.N(4))    dut4  (.r(r4),  .h(h4),  .g(g4));
  prra_tree #(.N(16))   dut16 (.r(r16), .h(h16), .g(g16));
  prra_tree #(.N(64))   dut64 (.r(r64), .h(h64), .g(g64));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // round-robin reference: first requester at or after head index k
  function automatic logic [63:0] rr_ref(logic [63:0] req, int n, int k);
    logic [63:0] res = '0;
    for (int b = 0; b < n; b++) begin
      if (req[(k+b)%n]) begin
        res[(k+b)%n] = 1'b1;
        return res;
      end
    end
    return res;
  endfunction

  task automatic check(int n, logic [63:0] req, int k, logic [63:0] got);
    logic [63:0] exp = rr_ref(req, n, k);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL N=%0d head=%0d req=%h got %h exp %h", n, k, req, got, exp);
    end
  endtask

  initial begin
    for (int k = 0; k < 8; k++)
      for (int v = 0; v < 256; v++) begin
        r8 = 8'(v); h8 = 8'(1) << k;
        r4 = 4'(v); h4 = 4'(1) << (k % 4);
        @(posedge clk);
        check(8, 64'(r8), k, 64'(g8));
        if (v < 16) check(4, 64'(r4), k % 4, 64'(g4));
      end
    for (int t = 0; t < 4000; t++) begin
      automatic int k16 = $urandom_range(15);
      automatic int k64 = $urandom_range(63);
      r16 = 16'($urandom);
      r64 = {$urandom, $urandom};
      // sparse patterns exercise the wrap-around paths
      if (t % 2 == 1) begin
        r16 &= 16'($urandom) & 16'($urandom);
        r64 &= {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
      end
      if (t % 7 == 0) r64 = 64'(1) << $urandom_range(63);
      h16 = 16'(1) << k16;
      h64 = 64'(1) << k64;
      @(posedge clk);
      check(16, 64'(r16), k16, 64'(g16));
      check(64, r64, k64, g64);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
