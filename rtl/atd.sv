// atd: Auxiliary Tag Directory of one core.
//
// The ATD is a private copy of the L2 tags, as if the core owned all ASSOC
// ways of the shared cache, kept in true-LRU order. For every L2 access of
// its core it reports the stack distance of the access: the position, 1 for
// the MRU line up to ASSOC for the LRU line, at which the line was found in
// the LRU stack of its set, or ASSOC+1 when the line is not present. An
// access of stack distance d would hit in any partition that gives the core
// d ways or more.
//
// Only one set in every SAMPLE_DIST sets is tracked (sets whose index is a
// multiple of SAMPLE_DIST); accesses to the other sets are reported as not
// sampled and leave the directory untouched. Each entry holds a valid bit,
// the tag and a log2(ASSOC)-bit LRU position, as in the storage estimate of
// the design. Sampling, the entry format and true LRU follow the design;
// the set-index/tag split (low address bits index the set) and replacing the
// LRU way on a miss are this implementation's choices.
//
// The directory is one memory row per sampled set. It has no reset of its
// own: for NUM_SETS/SAMPLE_DIST cycles after reset the rows are written to
// their initial state, one per cycle, and accesses in that time are
// reported as not sampled.
//
// Timing: acc_valid/acc_line_addr are looked up in the cycle they are
// presented; the row is rewritten at the next clock edge and the result
// (res_valid, res_sampled, res_sd) is registered, so it appears one cycle
// after the request. One access per cycle.
module atd #(
  parameter int unsigned ASSOC       = 16,
  parameter int unsigned NUM_SETS    = 1024,
  parameter int unsigned SAMPLE_DIST = 16,
  parameter int unsigned LINE_ADDR_W = 34,
  localparam int unsigned SET_W  = $clog2(NUM_SETS),
  localparam int unsigned TAG_W  = LINE_ADDR_W - SET_W,
  localparam int unsigned NSAMP  = NUM_SETS / SAMPLE_DIST,
  localparam int unsigned SIDX_W = (NSAMP > 1) ? $clog2(NSAMP) : 1,
  localparam int unsigned LRU_W  = $clog2(ASSOC),
  localparam int unsigned SD_W   = $clog2(ASSOC + 2)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   acc_valid,
  input  logic [LINE_ADDR_W-1:0] acc_line_addr,
  output logic                   res_valid,
  output logic                   res_sampled,
  output logic [SD_W-1:0]        res_sd
);

  // One row per sampled set: ASSOC ways of {valid, tag, LRU position}.
  typedef struct packed {
    logic             vld;
    logic [TAG_W-1:0] tag;
    logic [LRU_W-1:0] lru;
  } way_t;
  typedef way_t [ASSOC-1:0] row_t;

  row_t mem [NSAMP];

  logic [SET_W-1:0]  set_idx;
  logic [TAG_W-1:0]  tag;
  logic              sampled;
  logic [SIDX_W-1:0] sidx;

  assign set_idx = acc_line_addr[SET_W-1:0];
  assign tag     = acc_line_addr[LINE_ADDR_W-1:SET_W];

  always_comb begin
    if (SAMPLE_DIST > 1) begin
      sampled = (set_idx % SET_W'(SAMPLE_DIST)) == '0;
      sidx    = SIDX_W'(set_idx / SET_W'(SAMPLE_DIST));
    end else begin
      sampled = 1'b1;
      sidx    = SIDX_W'(set_idx);
    end
  end

  // After reset, rows are written to their initial state one per cycle
  // (all ways invalid, LRU positions 0..ASSOC-1). Accesses during this
  // sweep are reported as not sampled.
  logic              init_q;
  logic [SIDX_W-1:0] init_idx_q;
  row_t              init_row;
  always_comb begin
    for (int w = 0; w < ASSOC; w++) begin
      init_row[w].vld = 1'b0;
      init_row[w].tag = '0;
      init_row[w].lru = LRU_W'(w);
    end
  end

  // Lookup in the addressed sampled set and the row after the access
  row_t             row, new_row;
  logic             hit;
  logic [LRU_W-1:0] hit_pos;
  logic [LRU_W-1:0] hit_way, lru_way;

  assign row = mem[sidx];

  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    hit_pos = '0;
    lru_way = '0;
    for (int w = 0; w < ASSOC; w++) begin
      if (row[w].vld && row[w].tag == tag && !hit) begin
        hit     = 1'b1;
        hit_way = LRU_W'(w);
        hit_pos = row[w].lru;
      end
      if (row[w].lru == LRU_W'(ASSOC - 1))
        lru_way = LRU_W'(w);
    end
    new_row = row;
    for (int w = 0; w < ASSOC; w++) begin
      if (hit) begin
        // Move the hit line to MRU; lines above it age by one.
        if (LRU_W'(w) == hit_way)
          new_row[w].lru = '0;
        else if (row[w].lru < hit_pos)
          new_row[w].lru = row[w].lru + 1'b1;
      end else begin
        // Replace the LRU line; every other line ages by one.
        if (LRU_W'(w) == lru_way) begin
          new_row[w].lru = '0;
          new_row[w].tag = tag;
          new_row[w].vld = 1'b1;
        end else begin
          new_row[w].lru = row[w].lru + 1'b1;
        end
      end
    end
  end

  logic do_upd;
  assign do_upd = acc_valid && sampled && !init_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_q     <= 1'b1;
      init_idx_q <= '0;
    end else if (init_q) begin
      init_idx_q <= init_idx_q + 1'b1;
      if (int'(init_idx_q) == NSAMP - 1) init_q <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (init_q)
      mem[init_idx_q] <= init_row;
    else if (do_upd)
      mem[sidx] <= new_row;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid   <= 1'b0;
      res_sampled <= 1'b0;
      res_sd      <= '0;
    end else begin
      res_valid   <= acc_valid;
      res_sampled <= sampled && !init_q;
      res_sd      <= hit ? SD_W'(hit_pos) + SD_W'(1) : SD_W'(ASSOC + 1);
    end
  end

endmodule
