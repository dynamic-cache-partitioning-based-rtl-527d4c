// tb_4c_harness: a four-core system around mlp_dcp_top for a given L2
// associativity K, ROB size and ATD sampling distance, used by
// tb_mlp_dcp_top_4c to run the four-core configurations (1MB 16-way and 2MB
// 32-way, both 1024 sets of 64B lines) and their ROB-size and sampling
// variants.
//
// The harness plays the shared L2 (an access hits when its per-core LRU
// stack distance fits in the core's current ways), main memory (fills after
// 200..299 cycles) and four cores committing 1, 2, 3 and 4 instructions per
// cycle. Traffic, all on ATD-sampled sets:
//   core 0: isolated misses, one access every 400 cycles cycling over
//           L = 3K/4 lines of one set;
//   core 1: the same reuse distance in bursts of 8 (clustered misses);
//   core 2: a 2-line loop that hits;
//   core 3: a stream of new lines (misses at every size).
// Every decision is compared with an exhaustive search, written here
// independently of the RTL, over the histograms and IPC weights the unit
// sees when the decision starts (the first candidate in the unit's search
// order wins ties). The time from the start of a decision to decision_done
// must be 2 + 4K + (K-1)^3 cycles. The first decision must give core 0 its
// L ways and core 2 its two. The last interval runs in the IPC-weighted
// mode. The harness raises finished with its own check and failure counts.
module tb_4c_harness #(
  parameter int K     = 16,
  parameter int ROB   = 256,
  parameter int SDIST = 16
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures
);
  import mlp_dcp_pkg::*;
  localparam int NC = 4, INTERVAL = 40_000, IPC_SHIFT = 8, NINT = 3;
  localparam int RID_W = $clog2(ROB) + 2, W_W = $clog2(K + 1), LRU_W = $clog2(K);
  localparam int L = 3 * K / 4;
  localparam longint DEC_LAT = 2 + NC * K + longint'(K - 1) ** (NC - 1);
  localparam int CYCLES = NINT * INTERVAL + 31_000;

  logic rst_n = 0;
  logic acc_valid, acc_ready, acc_hit, fill_valid, mode_ipc, decision_done;
  logic [1:0] acc_core, vs_req_core;
  acc_type_e acc_type;
  logic [33:0] acc_line_addr, fill_line_addr;
  logic [RID_W-1:0] acc_rob_id;
  logic [NC-1:0][RID_W-1:0] commit_seq;
  logic [NC-1:0][3:0] commit_cnt;
  logic [NC-1:0][W_W-1:0] ways;
  logic [K-1:0] vs_way_valid;
  logic [K-1:0][1:0] vs_way_owner;
  logic [K-1:0][LRU_W-1:0] vs_way_lru;
  logic [LRU_W-1:0] vs_victim;
  logic vs_from_own;
  logic [NC-1:0][K:0][31:0] sdh_hist;
  logic [9:0] avg_lat;
  logic [15:0] hshr_drops;

  mlp_dcp_top #(.NCORES(NC), .K(K), .SDIST(SDIST), .ROB(ROB), .INTERVAL(INTERVAL),
                .IPC_SHIFT(IPC_SHIFT)) dut (
    .clk, .rst_n,
    .acc_valid, .acc_ready, .acc_core, .acc_type, .acc_line_addr, .acc_hit,
    .acc_rob_id, .acc_bytes(7'd8),
    .fill_valid, .fill_line_addr,
    .commit_seq, .commit_cnt, .mode_ipc,
    .ways, .decision_done,
    .vs_req_core, .vs_way_valid, .vs_way_owner, .vs_way_lru, .vs_victim, .vs_from_own,
    .sdh_hist, .avg_lat, .hshr_drops);

  // ------------------------------------------------------------ L2 model
  typedef struct {int core; longint addr;} req_t;
  req_t rq[$];
  typedef struct {longint addr; longint t;} fill_t;
  fill_t fq[$];
  longint stk[string][$];

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

  // ------------------------------------------------------------ reference
  longint snap[NC][K+1];
  longint snap_w[NC];
  bit     snap_mode;
  int     exp_w[NC];
  longint ipc_acc[NC], ipc_w[NC], seqc[NC];
  longint t = 0, t_start;
  int n_miss, n_hit, n_dec, n_dec_ipc, n_halve;
  bit done_d = 0;

  function automatic longint tm(int c, int w);
    longint s = 0;
    for (int j = w + 1; j <= K + 1; j++) s += snap[c][j-1];
    return s;
  endfunction

  task automatic reference();
    longint best, cost;
    best = -1;
    // the unit's search order: w0 changes fastest, then w1, then w2
    for (int w2 = 1; w2 < K; w2++)
      for (int w1 = 1; w1 < K; w1++)
        for (int w0 = 1; w0 < K; w0++) begin
          int w3;
          w3 = K - w0 - w1 - w2;
          if (w3 >= 1) begin
            cost = (snap_mode ? snap_w[0] : 1) * tm(0, w0) + (snap_mode ? snap_w[1] : 1) * tm(1, w1)
                 + (snap_mode ? snap_w[2] : 1) * tm(2, w2) + (snap_mode ? snap_w[3] : 1) * tm(3, w3);
            if (best < 0 || cost < best) begin
              best = cost;
              exp_w = '{w0, w1, w2, w3};
            end
          end
        end
  endtask

  always @(negedge clk) if (rst_n) begin
    if (dut.interval_end)
      for (int c = 0; c < NC; c++) begin
        ipc_w[c] = (ipc_acc[c] + commit_cnt[c]) >> IPC_SHIFT;
        if (ipc_w[c] > 4095) ipc_w[c] = 4095;
        ipc_acc[c] = -longint'(commit_cnt[c]);
      end
    if (dut.halve) begin
      n_halve++;
      t_start = t;
      for (int c = 0; c < NC; c++) begin
        for (int j = 0; j <= K; j++) snap[c][j] = sdh_hist[c][j];
        snap_w[c] = ipc_w[c];
      end
      snap_mode = mode_ipc;
      reference();
    end
    if (decision_done) begin
      checks++;
      if (t - t_start != DEC_LAT) begin
        failures++;
        $display("FAIL K=%0d ROB=%0d d_s=%0d decision took %0d cycles, expected %0d", K, ROB, SDIST, t - t_start, DEC_LAT);
      end
    end
    if (done_d) begin
      n_dec++;
      if (snap_mode) n_dec_ipc++;
      checks++;
      if (int'(ways[0]) != exp_w[0] || int'(ways[1]) != exp_w[1] ||
          int'(ways[2]) != exp_w[2] || int'(ways[3]) != exp_w[3]) begin
        failures++;
        $display("FAIL K=%0d ROB=%0d d_s=%0d decision %0d: ways %0d/%0d/%0d/%0d expected %0d/%0d/%0d/%0d", K, ROB, SDIST, n_dec,
                 ways[0], ways[1], ways[2], ways[3], exp_w[0], exp_w[1], exp_w[2], exp_w[3]);
      end
      if (n_dec == 1) begin
        checks++;
        if (int'(ways[0]) < L || ways[2] < 2) begin
          failures++;
          $display("FAIL K=%0d ROB=%0d d_s=%0d first decision %0d/%0d/%0d/%0d", K, ROB, SDIST, ways[0], ways[1], ways[2], ways[3]);
        end
      end
    end
    for (int c = 0; c < NC; c++) ipc_acc[c] += commit_cnt[c];
    done_d = decision_done;
  end

  // ------------------------------------------------------------ stimulus
  initial begin
    int tag0, tag1, loop2, uniq;
    finished = 0; checks = 0; failures = 0;
    n_miss = 0; n_hit = 0; n_dec = 0; n_dec_ipc = 0; n_halve = 0;
    acc_valid = 0; acc_core = 0; acc_type = ACC_LOAD; acc_line_addr = '0; acc_hit = 0;
    acc_rob_id = '0; fill_valid = 0; fill_line_addr = '0; mode_ipc = 0;
    commit_seq = '0; commit_cnt = '0;
    vs_req_core = 0; vs_way_valid = '1; vs_way_owner = '0; vs_way_lru = '0;
    for (int c = 0; c < NC; c++) begin seqc[c] = 0; ipc_acc[c] = 0; ipc_w[c] = 0; end
    tag0 = 0; tag1 = 0; loop2 = 0; uniq = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (t = 0; t < CYCLES; t++) begin
      @(negedge clk);
      if (t == (NINT - 1) * INTERVAL) mode_ipc = 1;
      if (t % 400 == 10) begin
        rq.push_back('{0, line(0, 100 + tag0)});
        tag0 = (tag0 + 1) % L;
      end
      if (t % 400 == 200)
        for (int b = 0; b < 8; b++) begin
          rq.push_back('{1, line(16, 200 + tag1)});
          tag1 = (tag1 + 1) % L;
        end
      if (t % 97 == 50) begin
        rq.push_back('{2, line(32, 300 + loop2)});
        loop2 = (loop2 + 1) % 2;
      end
      if (t % 300 == 120) begin
        rq.push_back('{3, line(48, 1000 + uniq)});
        uniq++;
      end
      for (int c = 0; c < NC; c++) begin
        commit_cnt[c] = 4'(c + 1);
        seqc[c] += c + 1;
        commit_seq[c] = RID_W'(seqc[c]);
      end
      fill_valid = 0;
      if (fq.size() > 0 && fq[0].t <= t) begin
        fill_valid = 1;
        fill_line_addr = 34'(fq[0].addr);
        void'(fq.pop_front());
      end
      acc_valid = 0;
      if (rq.size() > 0) begin
        acc_valid = 1;
        acc_core  = 2'(rq[0].core);
        acc_type  = ACC_LOAD;
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
        void'(rq.pop_front());
      end
    end
    $display("MECH K=%0d ROB=%0d d_s=%0d misses=%0d hits=%0d halvings=%0d decisions=%0d ipc_decisions=%0d ways=%0d/%0d/%0d/%0d",
             K, ROB, SDIST, n_miss, n_hit, n_halve, n_dec, n_dec_ipc, ways[0], ways[1], ways[2], ways[3]);
    checks++; if (n_miss == 0) begin failures++; $display("FAIL K=%0d ROB=%0d d_s=%0d no misses", K, ROB, SDIST); end
    checks++; if (n_hit == 0)  begin failures++; $display("FAIL K=%0d ROB=%0d d_s=%0d no hits", K, ROB, SDIST); end
    checks++; if (n_dec != NINT) begin failures++; $display("FAIL K=%0d ROB=%0d d_s=%0d decisions %0d", K, ROB, SDIST, n_dec); end
    checks++; if (n_dec_ipc != 1) begin failures++; $display("FAIL K=%0d ROB=%0d d_s=%0d IPC decisions %0d", K, ROB, SDIST, n_dec_ipc); end
    finished = 1;
  end
endmodule
