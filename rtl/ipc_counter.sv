// ipc_counter: per-core IPC measurement for the MLP-IPC-DCP policy.
//
// Counts the instructions the core commits during a partitioning interval.
// At the end of the interval (interval_end) the count, including the
// commits of that last cycle, is scaled down by 2**IPC_SHIFT into the
// IPC_W-bit register ipc_weight, and counting restarts from zero. Because
// every core is measured over the same number of cycles, ipc_weight is
// proportional to the core's IPC, which is all the weighted decision
// needs; no division by the interval length is made. The design only says
// that IPC is measured with one hardware counter per core; the scaling and
// widths are this implementation's choices (with a 5M-cycle interval and
// at most 8 commits per cycle, a shift of 14 keeps the weight below 2**12).
//
// Interface: commit_cnt is the number of instructions committed this cycle.
// ipc_weight changes one clock edge after interval_end and saturates.
module ipc_counter #(
  parameter int unsigned CNT_IN_W  = 4,
  parameter int unsigned ACC_W     = 32,
  parameter int unsigned IPC_W     = 12,
  parameter int unsigned IPC_SHIFT = 14
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [CNT_IN_W-1:0] commit_cnt,
  input  logic                interval_end,
  output logic [IPC_W-1:0]    ipc_weight
);

  logic [ACC_W-1:0] acc_q;
  logic [ACC_W:0]   acc_next;
  logic [ACC_W:0]   scaled;

  assign acc_next = {1'b0, acc_q} + (ACC_W+1)'(commit_cnt);
  assign scaled   = acc_next >> IPC_SHIFT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q      <= '0;
      ipc_weight <= '0;
    end else if (interval_end) begin
      acc_q      <= '0;
      ipc_weight <= (scaled > (ACC_W+1)'({IPC_W{1'b1}})) ? '1 : IPC_W'(scaled);
    end else begin
      acc_q      <= acc_next[ACC_W] ? '1 : acc_next[ACC_W-1:0];
    end
  end

endmodule
