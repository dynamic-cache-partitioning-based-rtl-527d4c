// partition_victim_select: replacement that enforces the way partition.
//
// The decided partition reserves ways[i] ways of every set for core i. It
// is enforced when a line is replaced, by augmenting LRU with a count of
// the lines each core owns in the set: if the requesting core already owns
// as many lines of the set as its quota, or more, the victim is the LRU line
// among its own lines; otherwise it is the LRU line among the other cores'
// lines, so the core grows toward its quota. An invalid way, if the set has
// one, is always used first. Counting the owned lines from the owner fields
// of the set (instead of keeping a counter per set) and the fallback to the
// set's LRU line when the chosen group is empty are this implementation's
// choices.
//
// Interface: purely combinational. way_lru[w] is the LRU stack position of
// way w in the set (0 = MRU, K-1 = LRU), way_owner[w] the core that brought
// the line in. victim is the way to replace; from_own tells whether it was
// taken from the requester's own lines.
module partition_victim_select #(
  parameter int unsigned NCORES = 2,
  parameter int unsigned K      = 16,
  localparam int unsigned CORE_W = (NCORES > 1) ? $clog2(NCORES) : 1,
  localparam int unsigned LRU_W  = $clog2(K),
  localparam int unsigned W_W    = $clog2(K + 1)
) (
  input  logic [CORE_W-1:0]            req_core,
  input  logic [K-1:0]                 way_valid,
  input  logic [K-1:0][CORE_W-1:0]     way_owner,
  input  logic [K-1:0][LRU_W-1:0]      way_lru,
  input  logic [NCORES-1:0][W_W-1:0]   quota,
  output logic [LRU_W-1:0]             victim,
  output logic                         from_own
);

  logic [W_W-1:0] owned;
  logic           over_quota;
  logic           inv_found, own_found, oth_found;
  logic [LRU_W-1:0] inv_way, own_way, oth_way, lru_way;
  logic [LRU_W-1:0] own_pos, oth_pos;

  always_comb begin
    owned     = '0;
    inv_found = 1'b0;
    own_found = 1'b0;
    oth_found = 1'b0;
    inv_way   = '0;
    own_way   = '0;
    oth_way   = '0;
    lru_way   = '0;
    own_pos   = '0;
    oth_pos   = '0;
    for (int w = 0; w < K; w++) begin
      if (!way_valid[w]) begin
        if (!inv_found) inv_way = LRU_W'(w);
        inv_found = 1'b1;
      end else if (way_owner[w] == req_core) begin
        owned = owned + 1'b1;
        if (!own_found || way_lru[w] > own_pos) begin
          own_way = LRU_W'(w);
          own_pos = way_lru[w];
        end
        own_found = 1'b1;
      end else begin
        if (!oth_found || way_lru[w] > oth_pos) begin
          oth_way = LRU_W'(w);
          oth_pos = way_lru[w];
        end
        oth_found = 1'b1;
      end
      if (way_lru[w] == LRU_W'(K - 1)) lru_way = LRU_W'(w);
    end
    over_quota = owned >= quota[req_core];

    from_own = 1'b0;
    if (inv_found) begin
      victim = inv_way;
    end else if (over_quota && own_found) begin
      victim   = own_way;
      from_own = 1'b1;
    end else if (!over_quota && oth_found) begin
      victim = oth_way;
    end else if (own_found) begin
      victim   = own_way;
      from_own = 1'b1;
    end else begin
      victim = lru_way;
    end
  end

endmodule
