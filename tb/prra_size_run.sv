// prra_size_run: testbench helper that exercises one N-input arbiter.
//
// It drives an arbiter of size N through three phases and compares it with a
// cycle model of round-robin arbitration (head index k; grant the first
// requester at or after k; after a grant k = granted index + 1 mod N):
//   1. random request vectors of varying density, grant and head checked
//      every cycle;
//   2. fixed sets of persistent requesters, among them N/2+1 inputs spread
//      over the ring: over S complete rounds every member of a set of size m
//      must be granted exactly S times in S*m slots;
//   3. saturation (all N requesting) for 2N slots: the model then expects
//      the grant to step through the inputs in ring order, one per cycle.
// Each input that keeps requesting must be granted within N slots (fairness
// bound). Results are reported on checks/failures when done rises.
module prra_size_run #(
  parameter int N = 8
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_wrap,
  output int   n_idle
);

  logic         rst_n;
  logic [N-1:0] req, grant, head;
  int           k;
  int           waited [N];
  int           served [N];

  prra #(.N(N)) dut (.clk, .rst_n, .req, .grant, .head, .load(1'b0),
    .load_idx('0));

  function automatic int rr_pick(logic [N-1:0] r, int kk);
    for (int b = 0; b < N; b++) if (r[(kk+b)%N]) return (kk+b)%N;
    return -1;
  endfunction

  // apply req for one cycle, compare, advance the model
  task automatic slot(logic [N-1:0] r);
    int p;
    @(negedge clk);
    req = r;
    #1;
    p = rr_pick(req, k);
    checks++;
    if (head !== (N'(1) << k) || grant !== ((p < 0) ? N'(0) : N'(1) << p)) begin
      failures++;
      if (failures < 5)
        $display("FAIL N=%0d req=%h head=%h grant=%h exp head %0d grant %0d",
                 N, req, head, grant, k, p);
    end
    for (int i = 0; i < N; i++) begin
      if (req[i] && !grant[i]) waited[i]++; else waited[i] = 0;
      if (grant[i]) served[i]++;
      if (waited[i] >= N) begin
        failures++;
        $display("FAIL N=%0d fairness: input %0d waited %0d slots", N, i, waited[i]);
      end
    end
    if (p < 0) n_idle++;
    else if (p < k) n_wrap++;
    @(posedge clk);
    if (p >= 0) k = (p + 1) % N;
  endtask

  initial begin
    logic [N-1:0] set;
    int           m;
    done = 1'b0; checks = 0; failures = 0; n_wrap = 0; n_idle = 0;
    rst_n = 1'b0; req = '0; k = 0;
    foreach (waited[i]) waited[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // phase 1: random patterns
    for (int t = 0; t < 3000; t++) begin
      logic [N-1:0] r;
      for (int i = 0; i < N; i++) r[i] = 1'($urandom_range(1));
      if (t % 3 == 1) for (int i = 0; i < N; i++) if ($urandom_range(7) != 0) r[i] = 1'b0;
      if (t % 11 == 0) r = '0;
      slot(r);
    end
    // phase 2: persistent sets; the first is N/2+1 inputs, 0,2,4,... and 1
    for (int s = 0; s < 6; s++) begin
      set = '0;
      if (s == 0) begin
        for (int i = 0; i < N; i += 2) set[i] = 1'b1;
        set[1] = 1'b1;
      end else begin
        for (int i = 0; i < N; i++) set[i] = ($urandom_range(3) == 0);
        set[$urandom_range(N-1)] = 1'b1;
      end
      m = $countones(set);
      // settle the head into the set, then count S full rounds
      for (int i = 0; i < N; i++) slot(set);
      foreach (served[i]) served[i] = 0;
      for (int t = 0; t < 4 * m; t++) slot(set);
      for (int i = 0; i < N; i++) begin
        checks++;
        if (served[i] != (set[i] ? 4 : 0)) begin
          failures++;
          $display("FAIL N=%0d set=%h input %0d served %0d times in %0d slots",
                   N, set, i, served[i], 4 * m);
        end
      end
    end
    // phase 3: saturation from a known head
    for (int i = 0; i < 2 * N; i++) slot('1);
    done = 1'b1;
  end

endmodule
