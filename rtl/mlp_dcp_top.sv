// mlp_dcp_top: MLP-aware dynamic partitioning of a shared L2 cache.
//
// A shared L2 is split among the cores at way granularity, and the split is
// chosen again every interval. Instead of counting every miss the same, each
// L2 access is weighted by how much it would hurt performance as a miss:
// misses that overlap with others share the memory latency (memory-level
// parallelism, MLP), so isolated misses weigh more than clustered ones.
//
// Datapath of one access (Fig. "hardware implementation" of the design):
//   acc_*  --> ATD of the core (stack distance d, 1 cycle)
//          --> L2 miss: L2 MSHR entry, charged 1/N per cycle until the fill
//              L2 hit : the core's HSHR entry, charged 1/N per cycle for the
//                       average memory latency or until ROB_SIZE commits
//          --> quantifier (0..7) --> the core's MLP-aware SDH, bin d.
// N comes from per-core cluster counters (in-flight accesses of distance
// >= d). A latency monitor averages MSHR residency for the HSHRs. Every
// PERIOD cycles the controller starts the decision unit, which picks the
// partition minimising the (optionally IPC-weighted) total MLP cost; the
// histograms are halved at that moment, and the new partition is loaded
// when the decision ends. The partition is applied by the victim selector,
// brought out on vs_* for the L2's replacement logic.
//
// The L2 cache arrays, main memory and cores are outside this block: the
// L2 reports each access with its hit/miss result on acc_*, memory fills
// arrive on fill_*, and each core reports its commit position and commit
// count. Only accesses to ATD-sampled sets, and only data accesses for the
// cluster counts, take part in the MLP estimate; every L2 miss takes an MSHR
// entry. acc_ready is low when the MSHR could not take one more miss.
//
// Timing: an access presented with acc_valid && acc_ready is looked up in
// the ATD that cycle and allocated in the MSHR or HSHR one cycle later.
module mlp_dcp_top
  import mlp_dcp_pkg::*;
#(
  parameter int unsigned NCORES      = NUM_CORES,
  parameter int unsigned K           = ASSOC,
  parameter int unsigned SETS        = NUM_SETS,
  parameter int unsigned SDIST       = SAMPLE_DIST,
  parameter int unsigned AW          = LINE_ADDR_W,
  parameter int unsigned N_MSHR      = MSHR_ENTRIES,
  parameter int unsigned N_HSHR      = HSHR_ENTRIES,
  parameter int unsigned ADDERS      = NUM_ADDERS,
  parameter int unsigned ROB         = ROB_SIZE,
  parameter int unsigned LAT0        = MEM_LAT,
  parameter int unsigned HIST_W      = SDH_W,
  parameter int unsigned INTERVAL    = PERIOD,
  parameter int unsigned IPC_W       = 12,
  parameter int unsigned IPC_SHIFT   = 14,
  parameter int unsigned LAT_W       = 10,
  localparam int unsigned CORE_W = (NCORES > 1) ? $clog2(NCORES) : 1,
  localparam int unsigned SD_W   = $clog2(K + 2),
  localparam int unsigned W_W    = $clog2(K + 1),
  localparam int unsigned LRU_W  = $clog2(K),
  localparam int unsigned RID_W  = $clog2(ROB) + 2,
  localparam int unsigned MAXN   = N_MSHR + N_HSHR,
  localparam int unsigned CNT_W  = $clog2(MAXN + 1)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // L2 access with its result
  input  logic                              acc_valid,
  output logic                              acc_ready,
  input  logic [CORE_W-1:0]                 acc_core,
  input  acc_type_e                         acc_type,
  input  logic [AW-1:0]                     acc_line_addr,
  input  logic                              acc_hit,
  input  logic [RID_W-1:0]                  acc_rob_id,
  input  logic [6:0]                        acc_bytes,
  // line returning from memory
  input  logic                              fill_valid,
  input  logic [AW-1:0]                     fill_line_addr,
  // core commit state
  input  logic [NCORES-1:0][RID_W-1:0]      commit_seq,
  input  logic [NCORES-1:0][3:0]            commit_cnt,
  // policy: 0 = MLP-DCP, 1 = MLP-IPC-DCP
  input  logic                              mode_ipc,
  // partition
  output logic [NCORES-1:0][W_W-1:0]        ways,
  output logic                              decision_done,
  // victim selection for the L2 replacement logic
  input  logic [CORE_W-1:0]                 vs_req_core,
  input  logic [K-1:0]                      vs_way_valid,
  input  logic [K-1:0][CORE_W-1:0]          vs_way_owner,
  input  logic [K-1:0][LRU_W-1:0]           vs_way_lru,
  output logic [LRU_W-1:0]                  vs_victim,
  output logic                              vs_from_own,
  // observation
  output logic [NCORES-1:0][K:0][HIST_W-1:0] sdh_hist,
  output logic [LAT_W-1:0]                  avg_lat,
  output logic [15:0]                       hshr_drops
);

  // ---------------------------------------------------------------- stage 0
  logic acc_go;
  assign acc_go = acc_valid && acc_ready;

  logic [NCORES-1:0]           atd_rv, atd_rs;
  logic [NCORES-1:0][SD_W-1:0] atd_sd;

  for (genvar c = 0; c < NCORES; c++) begin : g_atd
    atd #(
      .ASSOC(K), .NUM_SETS(SETS), .SAMPLE_DIST(SDIST), .LINE_ADDR_W(AW)
    ) u_atd (
      .clk, .rst_n,
      .acc_valid     (acc_go && acc_core == CORE_W'(c)),
      .acc_line_addr (acc_line_addr),
      .res_valid     (atd_rv[c]),
      .res_sampled   (atd_rs[c]),
      .res_sd        (atd_sd[c])
    );
  end

  // ---------------------------------------------------------------- stage 1
  logic              s1_valid_q;
  logic [CORE_W-1:0] s1_core_q;
  acc_type_e         s1_type_q;
  logic [AW-1:0]     s1_addr_q;
  logic              s1_hit_q;
  logic [RID_W-1:0]  s1_rob_q;
  logic [6:0]        s1_bytes_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid_q <= 1'b0;
      s1_core_q  <= '0;
      s1_type_q  <= ACC_LOAD;
      s1_addr_q  <= '0;
      s1_hit_q   <= 1'b0;
      s1_rob_q   <= '0;
      s1_bytes_q <= '0;
    end else begin
      s1_valid_q <= acc_go;
      if (acc_go) begin
        s1_core_q  <= acc_core;
        s1_type_q  <= acc_type;
        s1_addr_q  <= acc_line_addr;
        s1_hit_q   <= acc_hit;
        s1_rob_q   <= acc_rob_id;
        s1_bytes_q <= acc_bytes;
      end
    end
  end

  logic            s1_sampled;
  logic [SD_W-1:0] s1_sd;
  assign s1_sampled = atd_rs[s1_core_q];
  assign s1_sd      = atd_sd[s1_core_q];

  logic s1_miss, s1_data;
  assign s1_miss = s1_valid_q && !s1_hit_q;
  assign s1_data = (s1_type_q != ACC_IFETCH);

  // ---------------------------------------------------------------- L2 MSHR
  logic [NCORES-1:0][K:0][CNT_W-1:0] n_ge;
  logic                       m_alloc_ready;
  logic [$clog2(N_MSHR)-1:0]  m_alloc_idx;
  logic [$clog2(N_MSHR):0]    m_free;
  logic                       m_fill_match;
  logic [$clog2(N_MSHR)-1:0]  m_fill_idx;
  logic                       m_rel_valid, m_rel_tracked, m_rel_counted;
  logic [CORE_W-1:0]          m_rel_core;
  logic [SD_W-1:0]            m_rel_sd;
  logic [COST_W-1:0]          m_rel_cost;

  assign acc_ready = m_free > (($clog2(N_MSHR)+1)'(s1_miss));

  l2_mshr #(
    .NCORES(NCORES), .K(K), .ENTRIES(N_MSHR), .ADDERS(ADDERS), .AW(AW),
    .MAX_COUNT(MAXN)
  ) u_mshr (
    .clk, .rst_n,
    .alloc_valid     (s1_miss),
    .alloc_ready     (m_alloc_ready),
    .alloc_idx       (m_alloc_idx),
    .alloc_core      (s1_core_q),
    .alloc_type      (s1_type_q),
    .alloc_line_addr (s1_addr_q),
    .alloc_bytes     (s1_bytes_q),
    .alloc_sd        (s1_sd),
    .alloc_tracked   (s1_sampled),
    .free_count      (m_free),
    .fill_valid      (fill_valid),
    .fill_line_addr  (fill_line_addr),
    .fill_match      (m_fill_match),
    .fill_idx        (m_fill_idx),
    .n_ge            (n_ge),
    .rel_valid       (m_rel_valid),
    .rel_core        (m_rel_core),
    .rel_sd          (m_rel_sd),
    .rel_cost        (m_rel_cost),
    .rel_tracked     (m_rel_tracked),
    .rel_counted     (m_rel_counted)
  );

  logic [QCOST_W-1:0] m_qcost;
  mlp_quantizer u_mquant (.cost(m_rel_cost), .qcost(m_qcost));

  mem_latency_monitor #(
    .IDX_W($clog2(N_MSHR)), .LAT_W(LAT_W), .INIT_LAT(LAT0)
  ) u_lat (
    .clk, .rst_n,
    .alloc_valid (s1_miss && m_alloc_ready),
    .alloc_idx   (m_alloc_idx),
    .fill_valid  (m_fill_match),
    .fill_idx    (m_fill_idx),
    .avg_lat     (avg_lat)
  );

  // ---------------------------------------------------------------- per core
  logic interval_end;
  logic halve;
  logic [NCORES-1:0][IPC_W-1:0] ipc_w;
  logic [NCORES-1:0]            h_drop;

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    logic               mine;
    logic               h_alloc, h_ready;
    logic               h_rel_valid, h_rel_counted;
    logic [SD_W-1:0]    h_rel_sd;
    logic [COST_W-1:0]  h_rel_cost;
    logic [QCOST_W-1:0] h_qcost;

    assign mine    = (s1_core_q == CORE_W'(c));
    assign h_alloc = s1_valid_q && s1_hit_q && s1_sampled && mine;
    assign h_drop[c] = h_alloc && !h_ready;

    hshr #(
      .K(K), .ENTRIES(N_HSHR), .ADDERS(ADDERS), .AW(AW), .ROB(ROB),
      .MAX_COUNT(MAXN), .LAT_W(LAT_W)
    ) u_hshr (
      .clk, .rst_n,
      .alloc_valid     (h_alloc),
      .alloc_ready     (h_ready),
      .alloc_ifetch    (!s1_data),
      .alloc_rob_id    (s1_rob_q),
      .alloc_line_addr (s1_addr_q),
      .alloc_bytes     (s1_bytes_q),
      .alloc_sd        (s1_sd),
      .avg_lat         (avg_lat),
      .commit_seq      (commit_seq[c]),
      .n_ge            (n_ge[c]),
      .rel_valid       (h_rel_valid),
      .rel_sd          (h_rel_sd),
      .rel_cost        (h_rel_cost),
      .rel_counted     (h_rel_counted)
    );

    mlp_quantizer u_hquant (.cost(h_rel_cost), .qcost(h_qcost));

    cluster_counters #(.ASSOC(K), .MAX_COUNT(MAXN)) u_clu (
      .clk, .rst_n,
      .inc_a_valid (s1_miss && m_alloc_ready && mine && s1_sampled && s1_data),
      .inc_a_sd    (s1_sd),
      .inc_b_valid (h_alloc && h_ready && s1_data),
      .inc_b_sd    (s1_sd),
      .dec_a_valid (m_rel_valid && m_rel_counted && m_rel_core == CORE_W'(c)),
      .dec_a_sd    (m_rel_sd),
      .dec_b_valid (h_rel_valid && h_rel_counted),
      .dec_b_sd    (h_rel_sd),
      .n_ge        (n_ge[c])
    );

    mlp_sdh #(.K(K), .CW(HIST_W)) u_sdh (
      .clk, .rst_n,
      .upd_a_valid (m_rel_valid && m_rel_tracked && m_rel_core == CORE_W'(c)),
      .upd_a_sd    (m_rel_sd),
      .upd_a_qcost (m_qcost),
      .upd_b_valid (h_rel_valid),
      .upd_b_sd    (h_rel_sd),
      .upd_b_qcost (h_qcost),
      .halve       (halve),
      .hist        (sdh_hist[c])
    );

    ipc_counter #(.IPC_W(IPC_W), .IPC_SHIFT(IPC_SHIFT)) u_ipc (
      .clk, .rst_n,
      .commit_cnt   (commit_cnt[c]),
      .interval_end (interval_end),
      .ipc_weight   (ipc_w[c])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      hshr_drops <= '0;
    else if (|h_drop && hshr_drops != '1)
      hshr_drops <= hshr_drops + 1'b1;
  end

  // ---------------------------------------------------------------- decision
  logic dec_busy, dec_done;
  logic [NCORES-1:0][W_W-1:0] dec_ways;
  logic [HIST_W+W_W+IPC_W+$clog2(NCORES)-1:0] dec_cost;

  // The IPC weights are latched one edge after interval_end, so the decision
  // starts one cycle later and the histograms are halved at that same edge,
  // right after the decision unit has taken its snapshot of them.
  logic start_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) start_q <= 1'b0;
    else        start_q <= interval_end;
  end
  assign halve = start_q && !dec_busy;

  partition_decider #(
    .NCORES(NCORES), .K(K), .SDH_W(HIST_W), .IPC_W(IPC_W)
  ) u_dec (
    .clk, .rst_n,
    .start      (halve),
    .mode_ipc   (mode_ipc),
    .hist       (sdh_hist),
    .ipc_weight (ipc_w),
    .busy       (dec_busy),
    .done       (dec_done),
    .best_ways  (dec_ways),
    .best_cost  (dec_cost)
  );

  dcp_controller #(.NCORES(NCORES), .K(K), .PERIOD(INTERVAL)) u_ctl (
    .clk, .rst_n,
    .interval_end   (interval_end),
    .new_valid      (dec_done),
    .new_ways       (dec_ways),
    .ways           (ways)
  );

  assign decision_done = dec_done;

  partition_victim_select #(.NCORES(NCORES), .K(K)) u_vs (
    .req_core  (vs_req_core),
    .way_valid (vs_way_valid),
    .way_owner (vs_way_owner),
    .way_lru   (vs_way_lru),
    .quota     (ways),
    .victim    (vs_victim),
    .from_own  (vs_from_own)
  );

endmodule
