// tb_prra_lnode: checks the leaf node's Head flip-flop and its pass-through
// of request and grant.
//
// Two leaves, one with reset value 1 and one with 0, get random advance,
// ring_in, request and g values for many cycles. A model of the head (take
// ring_in when advance is 1, hold otherwise) is compared with h every cycle,
// and r/grant must follow request/g in the same cycle.
module tb_prra_lnode;

  logic clk = 1'b0, rst_n = 1'b0;
  logic advance, ring_in, request, g;
  logic r0, h0, grant0, r1, h1, grant1;
  logic m0, m1;
  int   checks = 0, failures = 0;
  int   n_set = 0, n_clear = 0, n_hold = 0;

  always #5 clk = ~clk;

  prra_lnode #(.INIT_HEAD(1'b1)) dut0 (.clk, .rst_n, .advance, .ring_in,
    .request, .g, .r(r0), .h(h0), .grant(grant0));
  prra_lnode dut1 (.clk, .rst_n, .advance, .ring_in,
    .request, .g, .r(r1), .h(h1), .grant(grant1));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b exp %b", what, $time, got, exp);
    end
  endtask

  initial begin
    {advance, ring_in, request, g} = '0;
    repeat (2) @(posedge clk);
    #1;
    check("reset h0", h0, 1'b1);
    check("reset h1", h1, 1'b0);
    m0 = 1'b1; m1 = 1'b0;
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      {advance, ring_in, request, g} = 4'($urandom);
      #1;
      check("r", r0, request);
      check("grant", grant1, g);
      @(posedge clk);
      if (advance) begin
        if (ring_in) n_set++; else n_clear++;
        m0 = ring_in; m1 = ring_in;
      end else n_hold++;
      #1;
      check("h0", h0, m0);
      check("h1", h1, m1);
    end
    if (n_set == 0 || n_clear == 0 || n_hold == 0) failures++;
    $display("set=%0d clear=%0d hold=%0d", n_set, n_clear, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
