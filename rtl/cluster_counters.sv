// cluster_counters: per-core counters of L2 accesses in flight, by stack
// distance.
//
// Counter d (d = 1..ASSOC+1) holds the number of this core's tracked L2
// accesses, misses waiting in the L2 MSHR and hits held in the core's HSHR,
// whose stack distance is d or greater. That number, N, is the size of the
// cluster of accesses that would be misses together in a partition giving
// the core fewer than d ways, so an access of distance d is charged 1/N of
// each cycle it is outstanding. The design keeps one hardware counter per
// possible stack distance; here there is one more, for distance ASSOC+1
// (accesses that miss in the ATD), which the storage estimate does not list.
//
// An access is counted from its allocation (inc_*) until it is released
// (dec_*). Two allocations and two releases can arrive in the same cycle,
// one each from the MSHR and the HSHR. Counts update at the clock edge;
// n_ge[d-1] is the registered count for distance d.
module cluster_counters #(
  parameter int unsigned ASSOC     = 16,
  parameter int unsigned MAX_COUNT = 56,
  localparam int unsigned SD_W  = $clog2(ASSOC + 2),
  localparam int unsigned CNT_W = $clog2(MAX_COUNT + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   inc_a_valid,
  input  logic [SD_W-1:0]        inc_a_sd,
  input  logic                   inc_b_valid,
  input  logic [SD_W-1:0]        inc_b_sd,
  input  logic                   dec_a_valid,
  input  logic [SD_W-1:0]        dec_a_sd,
  input  logic                   dec_b_valid,
  input  logic [SD_W-1:0]        dec_b_sd,
  output logic [ASSOC:0][CNT_W-1:0] n_ge
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_ge <= '0;
    end else begin
      for (int d = 1; d <= ASSOC + 1; d++) begin
        logic [1:0] up, dn;
        up = {1'b0, inc_a_valid && inc_a_sd >= SD_W'(d)}
           + {1'b0, inc_b_valid && inc_b_sd >= SD_W'(d)};
        dn = {1'b0, dec_a_valid && dec_a_sd >= SD_W'(d)}
           + {1'b0, dec_b_valid && dec_b_sd >= SD_W'(d)};
        n_ge[d-1] <= n_ge[d-1] + CNT_W'(up) - CNT_W'(dn);
      end
    end
  end

endmodule
