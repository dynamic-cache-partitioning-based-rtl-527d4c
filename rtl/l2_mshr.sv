// l2_mshr: shared L2 Miss Status Holding Registers with MLP_cost tracking.
//
// Each entry holds one L2 miss until its line returns from main memory. On
// top of the usual fields (valid, owner core, access type, line address,
// bytes required) an entry carries the stack distance d reported by the
// owner's ATD and an MLP_cost accumulator, cleared at allocation. While the
// miss is outstanding, the entry is charged 1/N of every cycle, where N is
// the number of the owner's in-flight accesses with stack distance >= d
// (from that core's cluster counters): misses served in parallel share the
// memory latency. Instruction misses are serialised by the front end, so
// they are always charged as if alone (N = 1) and are not counted in
// clusters.
//
// The entries share NUM_ADDERS adders in a fixed round robin: each cycle one
// group of NUM_ADDERS consecutive entries is updated, so every entry is
// updated once every P = ENTRIES/NUM_ADDERS cycles and adds P/N at a time.
// P/N is read from a table computed at elaboration. Only entries whose set
// is sampled by the ATD (tracked) accumulate cost. The fixed round robin
// over all entries (rather than over valid ones) and the fixed-point cost
// format are this implementation's choices.
//
// Interface and timing:
//   alloc_*   allocates the lowest free entry at the clock edge when
//             alloc_valid && alloc_ready; alloc_idx names it in that cycle.
//   fill_*    the line returning from memory; the lowest valid entry with a
//             matching line address is freed at the clock edge.
//   rel_*     registered: one cycle after a fill, the freed entry's owner,
//             stack distance, final MLP_cost and whether it was tracked and
//             counted in a cluster.
module l2_mshr
  import mlp_dcp_pkg::*;
#(
  parameter int unsigned NCORES      = NUM_CORES,
  parameter int unsigned K           = ASSOC,
  parameter int unsigned ENTRIES     = MSHR_ENTRIES,
  parameter int unsigned ADDERS      = NUM_ADDERS,
  parameter int unsigned AW          = LINE_ADDR_W,
  parameter int unsigned CW          = COST_W,
  parameter int unsigned CFRAC       = COST_FRAC,
  parameter int unsigned MAX_COUNT   = MSHR_ENTRIES + HSHR_ENTRIES,
  localparam int unsigned CORE_W = (NCORES > 1) ? $clog2(NCORES) : 1,
  localparam int unsigned SD_W   = $clog2(K + 2),
  localparam int unsigned CNT_W  = $clog2(MAX_COUNT + 1),
  localparam int unsigned IDX_W  = $clog2(ENTRIES),
  localparam int unsigned P      = ENTRIES / ADDERS,
  localparam int unsigned NGRP   = ENTRIES / ADDERS,
  localparam int unsigned GRP_W  = (NGRP > 1) ? $clog2(NGRP) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // allocation on an L2 miss
  input  logic                alloc_valid,
  output logic                alloc_ready,
  output logic [IDX_W-1:0]    alloc_idx,
  input  logic [CORE_W-1:0]   alloc_core,
  input  acc_type_e           alloc_type,
  input  logic [AW-1:0]       alloc_line_addr,
  input  logic [6:0]          alloc_bytes,
  input  logic [SD_W-1:0]     alloc_sd,
  input  logic                alloc_tracked,
  output logic [IDX_W:0]      free_count,
  // fill from main memory
  input  logic                fill_valid,
  input  logic [AW-1:0]       fill_line_addr,
  output logic                fill_match,
  output logic [IDX_W-1:0]    fill_idx,
  // cluster sizes of every core
  input  logic [NCORES-1:0][K:0][CNT_W-1:0] n_ge,
  // release of a filled entry (registered)
  output logic                rel_valid,
  output logic [CORE_W-1:0]   rel_core,
  output logic [SD_W-1:0]     rel_sd,
  output logic [CW-1:0]       rel_cost,
  output logic                rel_tracked,
  output logic                rel_counted
);

  typedef struct packed {
    logic              valid;
    logic [CORE_W-1:0] owner;
    acc_type_e         atype;
    logic [AW-1:0]     addr;
    logic [6:0]        bytes;
    logic [CW-1:0]     cost;
    logic [SD_W-1:0]   sd;
    logic              tracked;
  } entry_t;

  entry_t ent_q [ENTRIES];

  // P/N in fixed point, N = 0..MAX_COUNT (N = 0 is treated as 1)
  logic [CW-1:0] share_lut [MAX_COUNT+1];
  for (genvar n = 0; n <= MAX_COUNT; n++) begin : g_lut
    localparam int unsigned DEN = (n == 0) ? 1 : n;
    assign share_lut[n] = CW'((P << CFRAC) / DEN);
  end

  // Free entry search
  always_comb begin
    alloc_ready = 1'b0;
    alloc_idx   = '0;
    free_count  = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (!ent_q[i].valid) begin
        alloc_ready = 1'b1;
        alloc_idx   = i[IDX_W-1:0];
        free_count  = free_count + 1'b1;
      end
    end
  end

  // Fill match
  always_comb begin
    fill_match = 1'b0;
    fill_idx   = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (fill_valid && ent_q[i].valid && ent_q[i].addr == fill_line_addr) begin
        fill_match = 1'b1;
        fill_idx   = i[IDX_W-1:0];
      end
    end
  end

  logic [GRP_W-1:0] grp_q;

  function automatic logic [CW-1:0] sat_add(logic [CW-1:0] a, logic [CW-1:0] b);
    logic [CW:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[CW] ? '1 : s[CW-1:0];
  endfunction

  // Shared adders: one group of ADDERS entries per cycle
  logic [CW-1:0] add_res [ADDERS];
  always_comb begin
    for (int a = 0; a < ADDERS; a++) begin
      int unsigned i;
      logic [CNT_W-1:0] n;
      i = int'(grp_q) * ADDERS + a;
      if (ent_q[i].atype == ACC_IFETCH)
        n = CNT_W'(1);
      else
        n = n_ge[ent_q[i].owner][ent_q[i].sd - 1'b1];
      add_res[a] = sat_add(ent_q[i].cost, share_lut[n]);
    end
  end

  logic do_alloc;
  assign do_alloc = alloc_valid && alloc_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ent_q[i] <= '0;
      grp_q <= '0;
    end else begin
      grp_q <= (int'(grp_q) == NGRP - 1) ? '0 : grp_q + 1'b1;
      for (int a = 0; a < ADDERS; a++) begin
        int unsigned i;
        i = int'(grp_q) * ADDERS + a;
        if (ent_q[i].valid && ent_q[i].tracked)
          ent_q[i].cost <= add_res[a];
      end
      if (fill_match)
        ent_q[fill_idx].valid <= 1'b0;
      if (do_alloc) begin
        ent_q[alloc_idx].valid   <= 1'b1;
        ent_q[alloc_idx].owner   <= alloc_core;
        ent_q[alloc_idx].atype   <= alloc_type;
        ent_q[alloc_idx].addr    <= alloc_line_addr;
        ent_q[alloc_idx].bytes   <= alloc_bytes;
        ent_q[alloc_idx].cost    <= '0;
        ent_q[alloc_idx].sd      <= alloc_sd;
        ent_q[alloc_idx].tracked <= alloc_tracked;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rel_valid   <= 1'b0;
      rel_core    <= '0;
      rel_sd      <= '0;
      rel_cost    <= '0;
      rel_tracked <= 1'b0;
      rel_counted <= 1'b0;
    end else begin
      rel_valid   <= fill_match;
      rel_core    <= ent_q[fill_idx].owner;
      rel_sd      <= ent_q[fill_idx].sd;
      rel_cost    <= ent_q[fill_idx].cost;
      rel_tracked <= ent_q[fill_idx].tracked;
      rel_counted <= ent_q[fill_idx].tracked && ent_q[fill_idx].atype != ACC_IFETCH;
    end
  end

endmodule
