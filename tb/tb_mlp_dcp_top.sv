// tb_mlp_dcp_top: end-to-end run of the two-core MLP-aware partitioning
// unit in a behavioural system. The testbench plays the shared L2 (a hit
// is an access whose per-core LRU stack distance fits in the core's
// current ways), main memory (fills after 200..299 cycles) and the two
// cores (ROB positions and commit counts).
//
// Traffic, on ATD-sampled sets:
//   core 0: isolated misses, one access every 400 cycles, cycling over 12
//           lines of one set (stack distance 12);
//   core 1: the same reuse distance, but in bursts of 8 back-to-back
//           accesses (clustered misses), plus a 2-line loop that hits,
//           instruction fetches, and bursts that overflow the HSHR.
//           From interval 5 on its misses are isolated too, and it commits
//           8 instructions per cycle against core 0's 1, with the
//           IPC-weighted policy (MLP-IPC-DCP) selected.
//   Both:   bursts of misses to unsampled sets that fill the MSHR.
// Plain miss counts are equal for both cores, but isolated misses weigh 7
// and clustered ones little (isolated misses of 200..299 cycles weigh 4..6),
// so the first decision (MLP-DCP) must give
// core 0 enough ways (12) for its loop. Every decision, in both policies,
// is checked against an exhaustive search over the histograms captured at
// the decision's start and IPC weights computed from the commit counts.
// Each mechanism must be seen at least once; counts are printed.
module tb_mlp_dcp_top;
  import mlp_dcp_pkg::*;
  localparam int K = 16, NC = 2, INTERVAL = 30000, IPC_SHIFT = 8;
  localparam int RID_W = 10, W_W = 5;
  logic clk = 0, rst_n = 0;
  logic acc_valid, acc_ready, acc_hit, fill_valid, mode_ipc, decision_done;
  logic [0:0] acc_core, vs_req_core;
  acc_type_e acc_type;
  logic [33:0] acc_line_addr, fill_line_addr;
  logic [RID_W-1:0] acc_rob_id;
  logic [NC-1:0][RID_W-1:0] commit_seq;
  logic [NC-1:0][3:0] commit_cnt;
  logic [NC-1:0][W_W-1:0] ways;
  logic [K-1:0] vs_way_valid;
  logic [K-1:0][0:0] vs_way_owner;
  logic [K-1:0][3:0] vs_way_lru;
  logic [3:0] vs_victim;
  logic vs_from_own;
  logic [NC-1:0][K:0][31:0] sdh_hist;
  logic [9:0] avg_lat;
  logic [15:0] hshr_drops;
  int checks = 0, failures = 0;

  mlp_dcp_top #(.INTERVAL(INTERVAL), .IPC_SHIFT(IPC_SHIFT)) dut (
    .clk, .rst_n,
    .acc_valid, .acc_ready, .acc_core, .acc_type, .acc_line_addr, .acc_hit,
    .acc_rob_id, .acc_bytes(7'd8),
    .fill_valid, .fill_line_addr,
    .commit_seq, .commit_cnt, .mode_ipc,
    .ways, .decision_done,
    .vs_req_core, .vs_way_valid, .vs_way_owner, .vs_way_lru, .vs_victim, .vs_from_own,
    .sdh_hist, .avg_lat, .hshr_drops);

  always #5 clk = ~clk;

  localparam int CYCLES = 8 * INTERVAL + 2000;
  initial begin
    repeat (CYCLES + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ requests
  typedef struct {int core; longint addr; acc_type_e ty;} req_t;
  req_t rq[$];
  typedef struct {longint addr; longint t;} fill_t;
  fill_t fq[$];
  longint stk[string][$];   // per core/set LRU stack of the L2 model

  function automatic int l2_sd(int core, longint addr);
    string key;
    int pos;
    key = $sformatf("%0d_%0d", core, addr % 1024);
    pos = -1;
    foreach (stk[key][i]) if (stk[key][i] == addr && pos < 0) pos = i;
    if (pos >= 0) stk[key].delete(pos);
    stk[key].push_front(addr);
    return (pos >= 0) ? pos + 1 : K + 1;
  endfunction

  function automatic longint line(int set, int tag);
    return longint'(tag) * 1024 + set;
  endfunction

  // ------------------------------------------------------------ counters
  int n_miss, n_hit, n_iso7, n_clu, n_rob_exit, n_lat_exit, n_ifetch, n_stall;
  int n_ipc_differs;
  int n_dec, n_dec_ipc, n_halve, n_own, n_oth, n_change;
  longint t;
  int rate[NC];
  longint seqc[NC];
  longint ipc_acc[NC];
  longint ipc_w[NC];

  // reference decision
  longint snap[NC][K+1];
  longint snap_w[NC];
  bit     snap_mode;
  int exp_w0;
  bit done_d = 0;

  function automatic longint tm(int c, int w);
    longint s = 0;
    for (int j = w + 1; j <= K + 1; j++) s += snap[c][j-1];
    return s;
  endfunction

  always @(negedge clk) if (rst_n) begin
    // mechanism probes
    if (dut.m_rel_valid && dut.m_rel_tracked && dut.m_qcost >= 3'd5) n_iso7++;
    if (dut.m_rel_valid && dut.m_rel_tracked && dut.m_qcost <= 3'd2 && dut.m_rel_counted) n_clu++;
    for (int i = 0; i < 24; i++) begin
      if (dut.g_core[1].u_hshr.ent_q[i].valid && !dut.g_core[1].u_hshr.ent_q[i].done &&
          dut.g_core[1].u_hshr.rob_out[i]) n_rob_exit++;
      if (dut.g_core[0].u_hshr.ent_q[i].valid && !dut.g_core[0].u_hshr.ent_q[i].done &&
          dut.g_core[0].u_hshr.ent_q[i].pending <= 10'd6 && dut.g_core[0].u_hshr.grp_q == 3'(i / 4)) n_lat_exit++;
    end
    if (acc_valid && !acc_ready) n_stall++;
    // interval end: IPC weights from the commits driven so far
    if (dut.interval_end) begin
      for (int c = 0; c < NC; c++) begin
        ipc_w[c] = (ipc_acc[c] + commit_cnt[c]) >> IPC_SHIFT;
        if (ipc_w[c] > 4095) ipc_w[c] = 4095;
        ipc_acc[c] = -longint'(commit_cnt[c]);
      end
    end
    // decision start: capture the histograms the decider sees
    if (dut.halve) begin
      n_halve++;
      for (int c = 0; c < NC; c++) begin
        for (int j = 0; j <= K; j++) snap[c][j] = sdh_hist[c][j];
        snap_w[c] = ipc_w[c];
      end
      snap_mode = mode_ipc;
      begin
        longint best, cost, best_u;
        int wu;
        best_u = -1; wu = 0;
        for (int w0 = 1; w0 < K; w0++) begin
          cost = tm(0, w0) + tm(1, K - w0);
          if (best_u < 0 || cost < best_u) begin best_u = cost; wu = w0; end
        end
        best = -1;
        for (int w0 = 1; w0 < K; w0++) begin
          cost = (snap_mode ? snap_w[0] : 1) * tm(0, w0) + (snap_mode ? snap_w[1] : 1) * tm(1, K - w0);
          if (best < 0 || cost < best) begin best = cost; exp_w0 = w0; end
        end
        if (snap_mode && wu != exp_w0) n_ipc_differs++;
      end
    end
    if (done_d) begin
      n_dec++;
      if (snap_mode) n_dec_ipc++;
      checks++;
      if (int'(ways[0]) != exp_w0 || int'(ways[1]) != K - exp_w0) begin
        failures++;
        $display("FAIL decision %0d: ways %0d/%0d expected %0d/%0d", n_dec, ways[0], ways[1], exp_w0, K - exp_w0);
      end
      if (n_dec == 1) begin
        checks++;
        if (ways[0] < 12) begin
          failures++;
          $display("FAIL first decision gives the isolated-miss core only %0d ways", ways[0]);
        end
      end
      if (ways[0] != 5'd8) n_change++;
    end
    for (int c = 0; c < NC; c++) ipc_acc[c] += commit_cnt[c];
    done_d = decision_done;   // the partition is loaded one edge after done
  end

  // ------------------------------------------------------------ stimulus
  initial begin
    int tag0, tag1, loop1, uniq;
    acc_valid = 0; acc_core = 0; acc_type = ACC_LOAD; acc_line_addr = '0; acc_hit = 0;
    acc_rob_id = '0; fill_valid = 0; fill_line_addr = '0; mode_ipc = 0;
    commit_seq = '0; commit_cnt = '0;
    vs_req_core = 0; vs_way_valid = '1; vs_way_owner = '0; vs_way_lru = '0;
    rate[0] = 0; rate[1] = 4; seqc[0] = 0; seqc[1] = 0; ipc_acc[0] = 0; ipc_acc[1] = 0;
    tag0 = 0; tag1 = 0; loop1 = 0; uniq = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (t = 0; t < CYCLES; t++) begin
      @(negedge clk);
      // phase control
      if (t == 4 * INTERVAL) begin mode_ipc = 1; rate[0] = 1; rate[1] = 8; end
      // traffic generators
      if (t % 400 == 10) begin
        rq.push_back('{0, line(0, 100 + tag0), ACC_LOAD});
        tag0 = (tag0 + 1) % 12;
      end
      if (t % 400 == 200)
        for (int b = 0; b < (t >= 4 * INTERVAL ? 1 : 8); b++) begin
          rq.push_back('{1, line(16, 200 + tag1), ACC_LOAD});
          tag1 = (tag1 + 1) % 12;
        end
      if (t % 97 == 50) begin
        rq.push_back('{1, line(32, 300 + loop1), ACC_LOAD});
        loop1 = (loop1 + 1) % 2;
      end
      if (t % 1500 == 700) rq.push_back('{1, line(48, 400 + (t / 1500) % 3), ACC_IFETCH});
      if (t % 5000 == 3000)
        for (int b = 0; b < 30; b++) begin
          rq.push_back('{1, line(32, 300 + loop1), ACC_LOAD});
          loop1 = (loop1 + 1) % 2;
        end
      if (t % 7000 == 6000)
        for (int b = 0; b < 40; b++) begin
          rq.push_back('{b % 2, line(1 + b % 15, 5000 + uniq), ACC_STORE});
          uniq++;
        end
      // cores
      for (int c = 0; c < NC; c++) begin
        commit_cnt[c] = 4'(rate[c]);
        seqc[c] += rate[c];
        commit_seq[c] = RID_W'(seqc[c]);
      end
      // memory fills
      fill_valid = 0;
      if (fq.size() > 0 && fq[0].t <= t) begin
        fill_valid = 1;
        fill_line_addr = 34'(fq[0].addr);
        void'(fq.pop_front());
      end
      // issue one access
      acc_valid = 0;
      if (rq.size() > 0) begin
        acc_valid = 1;
        acc_core  = 1'(rq[0].core);
        acc_type  = rq[0].ty;
        acc_line_addr = 34'(rq[0].addr);
        acc_rob_id = RID_W'(seqc[rq[0].core] + 20);
      end
      #1;
      if (acc_valid && acc_ready) begin
        int sd;
        sd = l2_sd(rq[0].core, rq[0].addr);
        acc_hit = sd <= int'(ways[rq[0].core]);
        if (acc_hit) n_hit++;
        else begin
          n_miss++;
          fq.push_back('{rq[0].addr, t + 200 + $urandom % 100});
        end
        if (rq[0].ty == ACC_IFETCH) n_ifetch++;
        void'(rq.pop_front());
      end
      // victim selection: random sets against the current partition
      begin
        int perm[K];
        int owned, exp_v, want;
        foreach (perm[i]) perm[i] = i;
        perm.shuffle();
        vs_req_core = 1'($urandom);
        for (int w = 0; w < K; w++) begin
          vs_way_lru[w] = 4'(perm[w]);
          vs_way_owner[w] = 1'($urandom % 4 == 0 ? vs_req_core : $urandom);
        end
        #1;
        owned = 0;
        for (int w = 0; w < K; w++) if (vs_way_owner[w] == vs_req_core) owned++;
        want = owned >= int'(ways[vs_req_core]);
        exp_v = -1;
        for (int w = 0; w < K; w++)
          if ((vs_way_owner[w] == vs_req_core) == want && (exp_v < 0 || perm[w] > perm[exp_v])) exp_v = w;
        if (exp_v >= 0) begin
          checks++;
          if (int'(vs_victim) != exp_v) begin
            failures++;
            if (failures < 10) $display("FAIL victim %0d expected %0d", vs_victim, exp_v);
          end
          if (want) n_own++; else n_oth++;
        end
      end
    end
    // mechanisms
    $display("MECH misses=%0d hits=%0d isolated_w5plus=%0d clustered=%0d rob_exit=%0d lat_exit=%0d",
             n_miss, n_hit, n_iso7, n_clu, n_rob_exit, n_lat_exit);
    $display("MECH ifetch=%0d mshr_stall=%0d hshr_drops=%0d halvings=%0d decisions=%0d ipc_decisions=%0d changes=%0d ipc_differs=%0d victim_own=%0d victim_other=%0d avg_lat=%0d",
             n_ifetch, n_stall, hshr_drops, n_halve, n_dec, n_dec_ipc, n_change, n_ipc_differs, n_own, n_oth, avg_lat);
    checks++; if (n_miss == 0)     begin failures++; $display("FAIL no misses"); end
    checks++; if (n_hit == 0)      begin failures++; $display("FAIL no hits"); end
    checks++; if (n_iso7 == 0)     begin failures++; $display("FAIL no isolated miss of weight 5 or more"); end
    checks++; if (n_clu == 0)      begin failures++; $display("FAIL no clustered miss"); end
    checks++; if (n_rob_exit == 0) begin failures++; $display("FAIL no HSHR ROB exit"); end
    checks++; if (n_lat_exit == 0) begin failures++; $display("FAIL no HSHR latency exit"); end
    checks++; if (n_ifetch == 0)   begin failures++; $display("FAIL no instruction fetch"); end
    checks++; if (n_stall == 0)    begin failures++; $display("FAIL MSHR never full"); end
    checks++; if (hshr_drops == 0) begin failures++; $display("FAIL HSHR never full"); end
    checks++; if (n_halve < 7)     begin failures++; $display("FAIL too few halvings"); end
    checks++; if (n_dec < 7)       begin failures++; $display("FAIL too few decisions"); end
    checks++; if (n_dec_ipc == 0)  begin failures++; $display("FAIL no IPC-weighted decision"); end
    checks++; if (n_ipc_differs == 0) begin failures++; $display("FAIL IPC weighting never changed a decision"); end
    checks++; if (n_change == 0)   begin failures++; $display("FAIL partition never changed"); end
    checks++; if (n_own == 0 || n_oth == 0) begin failures++; $display("FAIL victim paths"); end
    checks++; if (avg_lat == 10'd300 || avg_lat < 10'd220 || avg_lat > 10'd280) begin
      failures++; $display("FAIL average latency %0d", avg_lat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
