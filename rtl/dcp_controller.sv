// dcp_controller: interval timer and way-partition register.
//
// Runs the outer loop of the partitioning algorithm: start from an even
// partition, let the threads run for PERIOD cycles while the MLP-aware
// histograms are collected, then ask for a new partition, install it when
// the decision unit answers, and start the next interval. The decision runs
// while the next interval is already counting; the old partition stays in
// force until the new one arrives, which only costs a few cycles of a stale
// partition and never correctness.
//
// At reset every core gets ASSOC/NCORES ways; when the division is not
// exact, the first cores get one extra way (the design assumes an even
// split and does not say how a remainder is handed out).
//
// Interface: interval_end pulses for one cycle every PERIOD cycles.
// new_valid/new_ways load the partition at the clock edge. ways[i] is the
// number of ways reserved for core i.
module dcp_controller #(
  parameter int unsigned NCORES = 2,
  parameter int unsigned K      = 16,
  parameter int unsigned PERIOD = 5_000_000,
  localparam int unsigned W_W   = $clog2(K + 1),
  localparam int unsigned PER_W = $clog2(PERIOD)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  output logic                      interval_end,
  input  logic                      new_valid,
  input  logic [NCORES-1:0][W_W-1:0] new_ways,
  output logic [NCORES-1:0][W_W-1:0] ways
);

  logic [PER_W-1:0] cyc_q;

  assign interval_end = (cyc_q == PER_W'(PERIOD - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc_q <= '0;
      for (int i = 0; i < NCORES; i++)
        ways[i] <= W_W'(K / NCORES + ((i < (K % NCORES)) ? 1 : 0));
    end else begin
      if (interval_end) cyc_q <= '0;
      else              cyc_q <= cyc_q + 1'b1;
      if (new_valid)
        ways <= new_ways;
    end
  end

endmodule
