// tb_hshr: checks the MLP_cost estimate of L2 hits in the HSHR.
//  * Latency exit: a data hit with no commits is released after the
//    average memory latency L (within one adder period plus the release
//    pipeline) with cost L/N (within one adder period, 6/N).
//  * ROB exit: the core commits ROB_SIZE instructions after the hit at time
//    T < L; the entry is released within 4 cycles of that point, still with
//    cost L/N (elapsed cycles plus pending cycles, both shared by N).
//  * Instruction fetch hits are charged as if alone (N = 1) and are not
//    counted in clusters.
//  * 24 live entries make alloc_ready drop.
module tb_hshr;
  import mlp_dcp_pkg::*;
  localparam int K = 16, E = 24, MAXC = 56, ROB = 256;
  localparam int SD_W = $clog2(K + 2), CNT_W = $clog2(MAXC + 1), RID_W = $clog2(ROB) + 2;
  logic clk = 0, rst_n = 0;
  logic av, ar, aif;
  logic [RID_W-1:0] arob, cseq;
  logic [SD_W-1:0] asd;
  logic [9:0] avg;
  logic [K:0][CNT_W-1:0] n_ge;
  logic rv, rcnt;
  logic [SD_W-1:0] rsd;
  logic [COST_W-1:0] rcost;
  int checks = 0, failures = 0;

  hshr #(.K(K), .ENTRIES(E), .ROB(ROB), .MAX_COUNT(MAXC)) dut (
    .clk, .rst_n,
    .alloc_valid(av), .alloc_ready(ar), .alloc_ifetch(aif), .alloc_rob_id(arob),
    .alloc_line_addr(34'h1234), .alloc_bytes(7'd8), .alloc_sd(asd),
    .avg_lat(avg), .commit_seq(cseq), .n_ge,
    .rel_valid(rv), .rel_sd(rsd), .rel_cost(rcost), .rel_counted(rcnt));

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // lat: average latency; n: cluster size; rob_t: cycle at which the ROB
  // condition is met (0 = never); ifetch: instruction hit
  task automatic one_hit(int lat, int n, int sd, int rob_t, bit ifetch);
    int t, rel_t, n_eff;
    real got, expc;
    @(negedge clk);
    avg = 10'(lat);
    n_ge = '0;
    n_ge[sd-1] = CNT_W'(n);
    arob = RID_W'($urandom);
    cseq = arob - RID_W'(100);            // access not yet committed
    av = 1; aif = ifetch; asd = SD_W'(sd);
    @(negedge clk);
    av = 0;
    t = 1; rel_t = -1;
    while (rel_t < 0 && t < 2000) begin
      if (rob_t > 0 && t == rob_t) cseq = arob + RID_W'(ROB);  // ROB_SIZE commits done
      else if (rob_t > 0 && t < rob_t) cseq = arob - RID_W'(100) + RID_W'(t * 300 / rob_t);
      @(negedge clk);
      if (rv) rel_t = t;
      t++;
    end
    n_eff = ifetch ? 1 : n;
    expc = real'(lat) / n_eff;
    got = real'(rcost) / (1 << COST_FRAC);
    checks++;
    if (rel_t < 0 || int'(rsd) != sd || rcnt != !ifetch ||
        got > expc + 0.5 || got < expc - 6.0 / n_eff - 0.5) begin
      failures++;
      $display("FAIL lat=%0d n=%0d rob_t=%0d if=%0d: cost %f exp %f at t=%0d", lat, n, rob_t, ifetch, got, expc, rel_t);
    end
    checks++;
    if (rob_t > 0 && !ifetch && rob_t < lat - 8) begin
      if (rel_t < rob_t || rel_t > rob_t + 4) begin
        failures++; $display("FAIL ROB exit at %0d, condition at %0d", rel_t, rob_t);
      end
    end else if (rel_t < lat - 8 || rel_t > lat + 9) begin
      failures++; $display("FAIL latency exit at %0d, latency %0d", rel_t, lat);
    end
  endtask

  initial begin
    av = 0; aif = 0; arob = '0; cseq = '0; asd = 1; avg = 300; n_ge = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 120; i++) begin
      int lat;
      lat = 40 + $urandom % 400;
      one_hit(lat, 1 + $urandom % 30, 1 + $urandom % 16,
              ($urandom % 2) ? 10 + $urandom % (lat - 20) : 0, ($urandom % 5) == 0);
    end
    // occupancy
    @(negedge clk);
    avg = 1000; cseq = '0;
    for (int i = 0; i < E; i++) begin
      av = 1; aif = 0; arob = RID_W'(10); asd = 3;
      @(negedge clk);
    end
    av = 0;
    checks++;
    if (ar) begin failures++; $display("FAIL alloc_ready with %0d live entries", E); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
