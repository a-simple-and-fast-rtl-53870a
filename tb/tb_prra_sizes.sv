// tb_prra_sizes: runs the arbiter at the four sizes N = 8, 16, 32 and 64
// side by side (one prra_size_run each) and sums their results. Each run
// checks grants and heads against a round-robin model on random traffic,
// equal service for persistent requester sets (including N/2+1 inputs) and
// saturation. Wrap-around grants and idle slots must occur at every size.
module tb_prra_sizes;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done [4];
  int   c [4], f [4], w [4], idle [4];

  prra_size_run #(.N(8))  run8  (.clk, .done(done[0]), .checks(c[0]), .failures(f[0]), .n_wrap(w[0]), .n_idle(idle[0]));
  prra_size_run #(.N(16)) run16 (.clk, .done(done[1]), .checks(c[1]), .failures(f[1]), .n_wrap(w[1]), .n_idle(idle[1]));
  prra_size_run #(.N(32)) run32 (.clk, .done(done[2]), .checks(c[2]), .failures(f[2]), .n_wrap(w[2]), .n_idle(idle[2]));
  prra_size_run #(.N(64)) run64 (.clk, .done(done[3]), .checks(c[3]), .failures(f[3]), .n_wrap(w[3]), .n_idle(idle[3]));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum() + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    wait (done[0] && done[1] && done[2] && done[3]);
    checks = 0; failures = 0;
    for (int i = 0; i < 4; i++) begin
      $display("N=%0d checks=%0d failures=%0d wrap=%0d idle=%0d", 8 << i, c[i], f[i], w[i], idle[i]);
      checks += c[i]; failures += f[i];
      if (w[i] == 0 || idle[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
