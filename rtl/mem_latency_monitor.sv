// mem_latency_monitor: average time an L2 miss spends in the L2 MSHR.
//
// The HSHR needs the average memory latency to know how long a hit that
// turned into a miss would wait. This block measures it with a single
// cycle counter: when it is idle it attaches to the next MSHR entry that is
// allocated, counts the cycles until that entry is filled, and adds the
// count to a sum. After 2**AVG_LOG samples the sum, divided by shifting, is
// the new average and a new sum is started. Until the first average is
// ready, avg_lat holds INIT_LAT (the nominal memory latency).
//
// The design only says that a dedicated counter measures and averages the
// cycles an entry stays in the MSHR; sampling one entry at a time and the
// block average of 16 samples are this implementation's choices. Counts
// saturate at 2**LAT_W-1.
//
// Interface: alloc_* and fill_* are the MSHR's allocation and fill events
// (entry index), sampled at the clock edge. avg_lat is a register.
module mem_latency_monitor #(
  parameter int unsigned IDX_W    = 5,
  parameter int unsigned LAT_W    = 10,
  parameter int unsigned INIT_LAT = 300,
  parameter int unsigned AVG_LOG  = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             alloc_valid,
  input  logic [IDX_W-1:0] alloc_idx,
  input  logic             fill_valid,
  input  logic [IDX_W-1:0] fill_idx,
  output logic [LAT_W-1:0] avg_lat
);

  logic                     busy_q;
  logic [IDX_W-1:0]         idx_q;
  logic [LAT_W-1:0]         cnt_q;
  logic [LAT_W+AVG_LOG-1:0] sum_q;
  logic [AVG_LOG-1:0]       nsamp_q;

  logic sample_done;
  assign sample_done = busy_q && fill_valid && fill_idx == idx_q;

  logic [LAT_W+AVG_LOG-1:0] sum_next;
  assign sum_next = sum_q + (LAT_W+AVG_LOG)'(cnt_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      idx_q   <= '0;
      cnt_q   <= '0;
      sum_q   <= '0;
      nsamp_q <= '0;
      avg_lat <= LAT_W'(INIT_LAT);
    end else begin
      if (busy_q && cnt_q != '1)
        cnt_q <= cnt_q + 1'b1;
      if (sample_done) begin
        busy_q  <= 1'b0;
        nsamp_q <= nsamp_q + 1'b1;
        if (nsamp_q == '1) begin
          avg_lat <= LAT_W'(sum_next >> AVG_LOG);
          sum_q   <= '0;
        end else begin
          sum_q   <= sum_next;
        end
      end else if (!busy_q && alloc_valid) begin
        busy_q <= 1'b1;
        idx_q  <= alloc_idx;
        cnt_q  <= LAT_W'(1);
      end
    end
  end

endmodule
