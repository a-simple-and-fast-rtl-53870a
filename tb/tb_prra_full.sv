// tb_prra_full: the arbiter at its default parameters (N = 8, flip-flop
// ring), taken through a complete operation: reset, random traffic of
// varying density, idle slots, persistent requester sets and saturation.
// Grant and head are compared every cycle with a round-robin cycle model,
// the waiting time of every requester is bounded by N slots, and the
// request-to-grant latency is checked to be zero cycles (the grant is
// valid in the slot of the request). Each mechanism (advance, idle hold,
// wrap-around, grant to the head input itself) must occur.
module tb_prra_full;

  localparam int N = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] req, grant, head;
  int           k;
  int           waited [N];
  int           checks = 0, failures = 0;
  int           n_adv = 0, n_idle = 0, n_wrap = 0, n_self = 0;

  always #5 clk = ~clk;

  prra dut (.clk, .rst_n, .req, .grant, .head, .load(1'b0), .load_idx('0));

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rr_pick(logic [N-1:0] r, int kk);
    for (int b = 0; b < N; b++) if (r[(kk+b)%N]) return (kk+b)%N;
    return -1;
  endfunction

  task automatic slot(logic [N-1:0] r);
    int p;
    @(negedge clk);
    req = r;
    #1;                               // same slot: zero-cycle latency
    p = rr_pick(req, k);
    checks++;
    if (head !== (N'(1) << k) || grant !== ((p < 0) ? N'(0) : N'(1) << p)) begin
      failures++;
      if (failures < 10)
        $display("FAIL at %0t: req=%b head=%b grant=%b exp head %0d grant %0d",
                 $time, req, head, grant, k, p);
    end
    for (int i = 0; i < N; i++) begin
      if (req[i] && !grant[i]) waited[i]++; else waited[i] = 0;
      if (waited[i] >= N) begin
        failures++;
        $display("FAIL fairness: input %0d waited %0d slots", i, waited[i]);
      end
    end
    if (p < 0) n_idle++;
    else begin
      n_adv++;
      if (p < k) n_wrap++;
      if (p == k) n_self++;
    end
    @(posedge clk);
    if (p >= 0) k = (p + 1) % N;
  endtask

  initial begin
    req = '0; k = 0;
    foreach (waited[i]) waited[i] = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (head !== N'(1)) begin failures++; $display("FAIL reset head=%b", head); end
    rst_n = 1'b1;
    for (int t = 0; t < 20000; t++) begin
      logic [N-1:0] r;
      case (t % 5)
        0: r = N'($urandom);
        1: r = N'($urandom) & N'($urandom) & N'($urandom);
        2: r = '0;
        3: r = N'(1) << $urandom_range(N-1);
        default: r = (t % 50 < 25) ? '1 : 8'b0101_0101 | 8'b0000_0010;
      endcase
      slot(r);
    end
    $display("advance=%0d idle=%0d wrap=%0d self=%0d", n_adv, n_idle, n_wrap, n_self);
    if (n_adv == 0 || n_idle == 0 || n_wrap == 0 || n_self == 0) begin
      failures++;
      $display("FAIL: a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
