// tb_prra: end-to-end test of the arbiter, in both head-state variants.
//
// Two arbiters of N = 8 run side by side on the same requests: the default
// one with its ring of leaf flip-flops and the programmable one. A cycle
// model (head index k; grant the first requester at or after k; on a grant
// k becomes granted index + 1 mod N; a load sets k) predicts grant and head
// of each every cycle. The test also checks round-robin fairness: an input
// that keeps requesting is granted within N slots. Mechanisms counted, each
// of which must occur: grant with head advance, idle slot (head held),
// wrap-around grant (granted index below the head), grant to the head input
// itself, full load (all N requesting), and a priority load of the
// programmable variant.
module tb_prra;

  localparam int N = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] req;
  logic [N-1:0] grant_a, head_a, grant_b, head_b;
  logic         load;
  logic [2:0]   load_idx;
  int           k_a, k_b;
  int           wait_a [N];
  int           checks = 0, failures = 0;
  int           n_adv = 0, n_idle = 0, n_wrap = 0, n_self = 0, n_full = 0, n_load = 0;

  always #5 clk = ~clk;

  prra dut_a (.clk, .rst_n, .req, .grant(grant_a), .head(head_a),
    .load(1'b0), .load_idx(3'd0));
  prra #(.N(N), .PROGRAMMABLE(1'b1)) dut_b (.clk, .rst_n, .req,
    .grant(grant_b), .head(head_b), .load, .load_idx);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rr_pick(logic [N-1:0] r, int k);
    for (int b = 0; b < N; b++) if (r[(k+b)%N]) return (k+b)%N;
    return -1;
  endfunction

  task automatic check(string what, logic [N-1:0] got, logic [N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: req=%b got %b exp %b", what, $time, req, got, exp);
    end
  endtask

  initial begin
    req = '0; load = 1'b0; load_idx = '0;
    foreach (wait_a[i]) wait_a[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    k_a = 0; k_b = 0;
    for (int t = 0; t < 6000; t++) begin
      int pa, pb;
      @(negedge clk);
      case (t % 4)
        0: req = N'($urandom);
        1: req = N'($urandom) & N'($urandom) & N'($urandom);
        2: req = (t % 40 < 20) ? '1 : N'($urandom);
        default: req = ($urandom_range(5) == 0) ? '0 : N'(1) << $urandom_range(N-1);
      endcase
      load = ($urandom_range(15) == 0);
      load_idx = 3'($urandom);
      #1;
      pa = rr_pick(req, k_a);
      pb = rr_pick(req, k_b);
      check("head_a", head_a, N'(1) << k_a);
      check("head_b", head_b, N'(1) << k_b);
      check("grant_a", grant_a, (pa < 0) ? '0 : N'(1) << pa);
      check("grant_b", grant_b, (pb < 0) ? '0 : N'(1) << pb);
      // fairness: count slots each waiting input has been passed over
      for (int i = 0; i < N; i++) begin
        if (req[i] && !grant_a[i]) wait_a[i]++;
        else wait_a[i] = 0;
        checks++;
        if (wait_a[i] >= N) begin
          failures++;
          $display("FAIL fairness: input %0d waited %0d slots", i, wait_a[i]);
        end
      end
      if (pa < 0) n_idle++;
      else begin
        n_adv++;
        if (pa < k_a) n_wrap++;
        if (pa == k_a) n_self++;
      end
      if (req == '1) n_full++;
      @(posedge clk);
      if (pa >= 0) k_a = (pa + 1) % N;
      if (load) begin k_b = int'(load_idx); n_load++; end
      else if (pb >= 0) k_b = (pb + 1) % N;
    end
    $display("advance=%0d idle=%0d wrap=%0d self=%0d full=%0d load=%0d",
             n_adv, n_idle, n_wrap, n_self, n_full, n_load);
    if (n_adv == 0)  begin failures++; $display("FAIL: no grant"); end
    if (n_idle == 0) begin failures++; $display("FAIL: no idle slot"); end
    if (n_wrap == 0) begin failures++; $display("FAIL: no wrap-around"); end
    if (n_self == 0) begin failures++; $display("FAIL: no grant to head"); end
    if (n_full == 0) begin failures++; $display("FAIL: no full load"); end
    if (n_load == 0) begin failures++; $display("FAIL: no priority load"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
