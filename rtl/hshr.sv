// hshr: Hit Status Holding Registers of one core.
//
// An L2 hit of stack distance d would turn into a miss if the core were
// given fewer than d ways. The HSHR estimates what that miss would cost:
// each hit gets an entry that is charged 1/N of every cycle, with N the
// number of the core's in-flight accesses (MSHR misses and HSHR hits) of
// stack distance >= d, exactly like a miss in the L2 MSHR. An entry stays
// active until one of two things happens:
//   * the core has committed ROB_SIZE instructions since the access, so no
//     later miss could overlap with it any more; the cycles still pending
//     (average memory latency minus the cycles already charged) are then
//     charged at once, divided by the current N;
//   * the average memory latency has elapsed since the hit.
// Instruction fetch hits have no ROB entry: they are charged as if alone
// (N = 1) for the average memory latency, since instruction misses are
// serialised.
//
// Entry fields: valid, instruction (ROB) identifier, pending cycles, hit line
// address, bytes required, MLP_cost, stack distance, plus a done flag and an
// instruction-fetch flag. As in the L2 MSHR, NUM_ADDERS shared adders update
// one group of entries per cycle, adding P/N with P = ENTRIES/ADDERS and
// taking P from the pending cycles. An entry whose pending cycles are P or
// fewer, or whose ROB condition holds, becomes done; one done entry per
// cycle (the lowest index) gets its remaining pending/N added, leaves the
// HSHR and is reported on rel_*.
//
// The ROB identifier is the ROB index extended by two age bits, so that
// commit_seq - rob_id, read as a signed number, is the count of instructions
// committed since the access (negative while it has not committed). This
// width and the late charging of the last partial step are choices of this
// implementation. When no entry is free a hit is not tracked (alloc_ready is
// low), which gives it the minimum weight, as the design specifies.
//
// Timing: allocation at the clock edge when alloc_valid && alloc_ready;
// rel_* is registered, one cycle after the entry is selected for release.
module hshr
  import mlp_dcp_pkg::*;
#(
  parameter int unsigned K         = ASSOC,
  parameter int unsigned ENTRIES   = HSHR_ENTRIES,
  parameter int unsigned ADDERS    = NUM_ADDERS,
  parameter int unsigned AW        = LINE_ADDR_W,
  parameter int unsigned ROB       = ROB_SIZE,
  parameter int unsigned CW        = COST_W,
  parameter int unsigned CFRAC     = COST_FRAC,
  parameter int unsigned MAX_COUNT = MSHR_ENTRIES + HSHR_ENTRIES,
  parameter int unsigned LAT_W     = 10,
  localparam int unsigned SD_W   = $clog2(K + 2),
  localparam int unsigned CNT_W  = $clog2(MAX_COUNT + 1),
  localparam int unsigned RID_W  = $clog2(ROB) + 2,
  localparam int unsigned IDX_W  = $clog2(ENTRIES),
  localparam int unsigned P      = ENTRIES / ADDERS,
  localparam int unsigned NGRP   = ENTRIES / ADDERS,
  localparam int unsigned GRP_W  = (NGRP > 1) ? $clog2(NGRP) : 1,
  localparam int unsigned RECIP_EXTRA = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  // allocation on an L2 hit of this core
  input  logic                alloc_valid,
  output logic                alloc_ready,
  input  logic                alloc_ifetch,
  input  logic [RID_W-1:0]    alloc_rob_id,
  input  logic [AW-1:0]       alloc_line_addr,
  input  logic [6:0]          alloc_bytes,
  input  logic [SD_W-1:0]     alloc_sd,
  // average memory latency, cycles
  input  logic [LAT_W-1:0]    avg_lat,
  // sequence position of the next instruction to commit
  input  logic [RID_W-1:0]    commit_seq,
  // this core's cluster sizes
  input  logic [K:0][CNT_W-1:0] n_ge,
  // release (registered)
  output logic                rel_valid,
  output logic [SD_W-1:0]     rel_sd,
  output logic [CW-1:0]       rel_cost,
  output logic                rel_counted
);

  typedef struct packed {
    logic              valid;
    logic              done;
    logic              ifetch;
    logic [RID_W-1:0]  rob_id;
    logic [LAT_W-1:0]  pending;
    logic [AW-1:0]     addr;
    logic [6:0]        bytes;
    logic [CW-1:0]     cost;
    logic [SD_W-1:0]   sd;
  } entry_t;

  entry_t ent_q [ENTRIES];

  // P/N and 1/N tables in fixed point (N = 0 treated as 1)
  logic [CW-1:0]                share_lut [MAX_COUNT+1];
  logic [CFRAC+RECIP_EXTRA:0]   recip_lut [MAX_COUNT+1];
  for (genvar n = 0; n <= MAX_COUNT; n++) begin : g_lut
    localparam int unsigned DEN = (n == 0) ? 1 : n;
    assign share_lut[n] = CW'((P << CFRAC) / DEN);
    assign recip_lut[n] = (CFRAC+RECIP_EXTRA+1)'((1 << (CFRAC + RECIP_EXTRA)) / DEN);
  end

  function automatic logic [CW-1:0] sat_add(logic [CW-1:0] a, logic [CW-1:0] b);
    logic [CW:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[CW] ? '1 : s[CW-1:0];
  endfunction

  function automatic logic [CNT_W-1:0] cluster_n(entry_t e, logic [K:0][CNT_W-1:0] ng);
    logic [CNT_W-1:0] n;
    n = e.ifetch ? CNT_W'(1) : ng[e.sd - 1'b1];
    return n;
  endfunction

  // Free entry
  always_comb begin
    alloc_ready = 1'b0;
    for (int i = 0; i < ENTRIES; i++)
      if (!ent_q[i].valid) alloc_ready = 1'b1;
  end
  logic [IDX_W-1:0] alloc_idx;
  always_comb begin
    alloc_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--)
      if (!ent_q[i].valid) alloc_idx = i[IDX_W-1:0];
  end

  // ROB condition per entry
  logic [ENTRIES-1:0] rob_out;
  always_comb begin
    for (int i = 0; i < ENTRIES; i++) begin
      logic [RID_W-1:0] rdist;
      rdist = commit_seq - ent_q[i].rob_id;
      rob_out[i] = !ent_q[i].ifetch && !rdist[RID_W-1] && (rdist >= RID_W'(ROB));
    end
  end

  // Release selection: lowest done entry
  logic             fin_sel;
  logic [IDX_W-1:0] fin_idx;
  always_comb begin
    fin_sel = 1'b0;
    fin_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--)
      if (ent_q[i].valid && ent_q[i].done) begin
        fin_sel = 1'b1;
        fin_idx = i[IDX_W-1:0];
      end
  end

  // Final cost: cost + pending / N
  logic [CW-1:0] fin_cost;
  always_comb begin
    logic [LAT_W+CFRAC+RECIP_EXTRA:0] prod;
    entry_t e;
    e = ent_q[fin_idx];
    prod = (LAT_W+CFRAC+RECIP_EXTRA+1)'(e.pending) * recip_lut[cluster_n(e, n_ge)];
    fin_cost = sat_add(e.cost, CW'(prod >> RECIP_EXTRA));
  end

  logic [GRP_W-1:0] grp_q;
  logic do_alloc;
  assign do_alloc = alloc_valid && alloc_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ent_q[i] <= '0;
      grp_q <= '0;
    end else begin
      grp_q <= (int'(grp_q) == NGRP - 1) ? '0 : grp_q + 1'b1;
      for (int i = 0; i < ENTRIES; i++)
        if (ent_q[i].valid && !ent_q[i].done && rob_out[i])
          ent_q[i].done <= 1'b1;
      // shared adders
      for (int a = 0; a < ADDERS; a++) begin
        int unsigned i;
        i = int'(grp_q) * ADDERS + a;
        if (ent_q[i].valid && !ent_q[i].done && !rob_out[i]) begin
          if (ent_q[i].pending > LAT_W'(P)) begin
            ent_q[i].cost    <= sat_add(ent_q[i].cost, share_lut[cluster_n(ent_q[i], n_ge)]);
            ent_q[i].pending <= ent_q[i].pending - LAT_W'(P);
          end else begin
            ent_q[i].done <= 1'b1;
          end
        end
      end
      if (fin_sel)
        ent_q[fin_idx].valid <= 1'b0;
      if (do_alloc) begin
        ent_q[alloc_idx].valid   <= 1'b1;
        ent_q[alloc_idx].done    <= 1'b0;
        ent_q[alloc_idx].ifetch  <= alloc_ifetch;
        ent_q[alloc_idx].rob_id  <= alloc_rob_id;
        ent_q[alloc_idx].pending <= avg_lat;
        ent_q[alloc_idx].addr    <= alloc_line_addr;
        ent_q[alloc_idx].bytes   <= alloc_bytes;
        ent_q[alloc_idx].cost    <= '0;
        ent_q[alloc_idx].sd      <= alloc_sd;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rel_valid   <= 1'b0;
      rel_sd      <= '0;
      rel_cost    <= '0;
      rel_counted <= 1'b0;
    end else begin
      rel_valid   <= fin_sel;
      rel_sd      <= ent_q[fin_idx].sd;
      rel_cost    <= fin_cost;
      rel_counted <= !ent_q[fin_idx].ifetch;
    end
  end

endmodule
