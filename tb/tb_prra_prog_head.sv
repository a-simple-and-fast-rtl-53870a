// tb_prra_prog_head: checks the programmable head register (encoder,
// register, decoder).
//
// Random one-hot or empty grant vectors and occasional loads are applied.
// A model index is advanced to (granted input + 1) mod N on a grant, set to
// load_idx on a load (a load wins), and held otherwise; head_idx and the
// one-hot h are compared with it after every clock edge.
module tb_prra_prog_head;

  localparam int N = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] grant, h;
  logic         load;
  logic [2:0]   load_idx, head_idx;
  int           model;
  int           checks = 0, failures = 0;
  int           n_load = 0, n_adv = 0, n_hold = 0, n_wrap = 0;

  always #5 clk = ~clk;

  prra_prog_head #(.N(N)) dut (.clk, .rst_n, .grant, .load, .load_idx,
    .head_idx, .h);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state();
    checks++;
    if (head_idx !== 3'(model) || h !== (N'(1) << model)) begin
      failures++;
      $display("FAIL at %0t: head_idx=%0d h=%b model=%0d", $time, head_idx, h, model);
    end
  endtask

  initial begin
    grant = '0; load = 1'b0; load_idx = '0;
    repeat (2) @(posedge clk);
    #1;
    model = 0;
    check_state();
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      int gi;
      @(negedge clk);
      gi = $urandom_range(N);          // N means no grant
      grant = (gi == N) ? '0 : N'(1) << gi;
      load = ($urandom_range(9) == 0);
      load_idx = 3'($urandom);
      @(posedge clk);
      if (load) begin model = int'(load_idx); n_load++; end
      else if (gi != N) begin
        model = (gi + 1) % N; n_adv++;
        if (gi == N-1) n_wrap++;
      end else n_hold++;
      #1;
      check_state();
    end
    if (n_load == 0 || n_adv == 0 || n_hold == 0 || n_wrap == 0) failures++;
    $display("load=%0d advance=%0d hold=%0d wrap=%0d", n_load, n_adv, n_hold, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
