// tb_prra_rnode: exhaustive check of the root node over every input with
// exactly one head in the tree.
//
// Expected: with the head in the left half, the left half wins if it has a
// request at or after the head or the right half has no request; with the
// head in the right half, the right half wins if it has a request at or after
// the head or the left half has no request. Exactly one grant is 1.
module tb_prra_rnode;
  import prra_pkg::*;

  logic   clk = 1'b0;
  scode_t s_l, s_r;
  logic   g_l, g_r;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  prra_rnode dut (.s_l, .s_r, .g_l, .g_r);

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_l;
    for (int v = 0; v < 16; v++) begin
      {s_l, s_r} = 4'(v);
      if (s_l.s1 == s_r.s1) continue;
      @(posedge clk);
      if (s_l.s1) exp_l = s_l.s0 | ~s_r.s0;
      else        exp_l = ~(s_r.s0 | ~s_l.s0);
      checks++;
      if ({g_l, g_r} !== {exp_l, ~exp_l}) begin
        failures++;
        $display("FAIL in=%b%b got %b%b exp %b%b", s_l, s_r, g_l, g_r, exp_l, ~exp_l);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
