// tb_prra_i1node: exhaustive check of the type-1 tree node.
//
// Every input combination with at most one head among the two leaves is
// applied. The expected code follows the meaning of {S1,S0}; the expected
// grant is the first requesting leaf in ring order starting at the head
// (left first when neither leaf is the head), and nothing when G is 0.
module tb_prra_i1node;
  import prra_pkg::*;

  logic   clk = 1'b0;
  logic   r_l, h_l, r_r, h_r, g;
  scode_t s;
  logic   g_l, g_r;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  prra_i1node dut (.r_l, .h_l, .r_r, .h_r, .g, .s, .g_l, .g_r);

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: r_l=%b h_l=%b r_r=%b h_r=%b g=%b got %b exp %b",
               what, r_l, h_l, r_r, h_r, g, got, exp);
    end
  endtask

  initial begin
    logic es0, es1, egl, egr;
    for (int v = 0; v < 32; v++) begin
      {g, r_l, h_l, r_r, h_r} = 5'(v);
      if (h_l && h_r) continue;
      @(posedge clk);
      es1 = h_l | h_r;
      es0 = h_r ? r_r : (r_l | r_r);
      if (h_r) begin
        egr = g & r_r;
        egl = g & r_l & !r_r;
      end else begin
        egl = g & r_l;
        egr = g & r_r & !r_l;
      end
      check("S1", s.s1, es1);
      check("S0", s.s0, es0);
      check("G_L", g_l, egl);
      check("G_R", g_r, egr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
