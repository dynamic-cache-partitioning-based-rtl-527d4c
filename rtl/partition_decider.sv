// partition_decider: chooses the way partition for the next interval.
//
// From the MLP-aware histograms of all cores it finds the partition
// (w_0 .. w_{N-1}), every w_i >= 1 and sum w_i = K, that minimises
//     sum_i  c_i * TMLP(i, w_i),   TMLP(i, w) = sum_{j=w+1}^{K+1} SDH_i[j]
// i.e. the total MLP cost of the accesses that would miss with w ways. With
// mode_ipc = 0, c_i = 1 (MLP-DCP); with mode_ipc = 1, c_i is the core's IPC
// weight (MLP-IPC-DCP), favouring cores that run faster. Every partition
// is evaluated (exhaustive search), which gives the optimum.
//
// How it works, after a start pulse:
//   1. TMLP(i, w) for all i, w is computed from the histogram inputs as
//      suffix sums and latched together with the IPC weights (1 cycle).
//   2. The table of weighted costs c_i * TMLP(i, w) is filled, one entry per
//      cycle through a single multiplier (N*K cycles).
//   3. An odometer walks w_0..w_{N-2} over 1..K-1; w_{N-1} = K - sum. Each
//      cycle one candidate is evaluated with N-1 adders and kept if it is
//      strictly cheaper than the best so far ((K-1)^(N-1) cycles; the first
//      of equal-cost partitions in odometer order wins).
// Then done pulses for one cycle with the result on best_ways. For 2 cores
// and 16 ways the decision takes 1 + 32 + 15 cycles plus one for the
// result; for 4 cores about 3.4 thousand cycles.
//
// The sum starts at w+1: an access of stack distance w hits with w ways, as
// in the plain stack distance histogram example of the design; the design's
// printed TMLP formula starts the sum at w. Requiring at least one way per
// core follows the design's two-core case study (15 possible partitions of
// 16 ways). The table-then-odometer organisation is this implementation's.
module partition_decider #(
  parameter int unsigned NCORES = 2,
  parameter int unsigned K      = 16,
  parameter int unsigned SDH_W  = 32,
  parameter int unsigned IPC_W  = 12,
  localparam int unsigned W_W   = $clog2(K + 1),
  localparam int unsigned TM_W  = SDH_W + $clog2(K + 1),
  localparam int unsigned WT_W  = TM_W + IPC_W,
  localparam int unsigned SUM_W = WT_W + $clog2(NCORES),
  localparam int unsigned TI_W  = $clog2(NCORES * K + 1)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             start,
  input  logic                             mode_ipc,
  input  logic [NCORES-1:0][K:0][SDH_W-1:0] hist,
  input  logic [NCORES-1:0][IPC_W-1:0]     ipc_weight,
  output logic                             busy,
  output logic                             done,
  output logic [NCORES-1:0][W_W-1:0]       best_ways,
  output logic [SUM_W-1:0]                 best_cost
);

  typedef enum logic [1:0] {S_IDLE, S_WEIGHT, S_ENUM, S_DONE} state_e;
  state_e state_q;

  logic [TM_W-1:0]  tm_q  [NCORES][K];   // TMLP(i, w) at [i][w-1]
  logic [WT_W-1:0]  wt_q  [NCORES][K];   // weighted
  logic [IPC_W-1:0] ipc_q [NCORES];
  logic             mode_q;

  // Suffix sums of the histogram inputs
  logic [TM_W-1:0] tm_now [NCORES][K];
  always_comb begin
    for (int i = 0; i < NCORES; i++) begin
      logic [TM_W-1:0] acc;
      acc = TM_W'(hist[i][K]);               // distance K+1: misses in the ATD
      for (int w = K; w >= 1; w--) begin
        tm_now[i][w-1] = acc;                // sum of bins w+1 .. K+1
        acc = acc + TM_W'(hist[i][w-1]);
      end
    end
  end

  // Weighting: one table entry per cycle
  logic [TI_W-1:0] ti_q;
  logic [$clog2(NCORES)-1:0] ti_core;
  logic [$clog2(K)-1:0]      ti_way;
  assign ti_core = ($clog2(NCORES))'(ti_q / TI_W'(K));
  assign ti_way  = ($clog2(K))'(ti_q % TI_W'(K));

  logic [WT_W-1:0] wt_now;
  assign wt_now = mode_q ? WT_W'(tm_q[ti_core][ti_way]) * WT_W'(ipc_q[ti_core])
                         : WT_W'(tm_q[ti_core][ti_way]);

  // Odometer over w_0 .. w_{N-2}; the last core takes the rest
  logic [W_W-1:0] w_q [NCORES];
  logic [W_W+$clog2(NCORES):0] used;
  logic           cand_ok;
  logic [W_W-1:0] w_last;
  logic [SUM_W-1:0] cand_cost;
  always_comb begin
    used = '0;
    for (int i = 0; i < NCORES - 1; i++) used = used + (W_W+$clog2(NCORES)+1)'(w_q[i]);
    cand_ok   = used < (W_W+$clog2(NCORES)+1)'(K);
    w_last    = W_W'(K - int'(used));
    cand_cost = '0;
    for (int i = 0; i < NCORES - 1; i++)
      cand_cost = cand_cost + SUM_W'(wt_q[i][($clog2(K))'(w_q[i] - 1'b1)]);
    if (cand_ok)
      cand_cost = cand_cost + SUM_W'(wt_q[NCORES-1][($clog2(K))'(w_last - 1'b1)]);
  end

  logic odo_last;
  always_comb begin
    odo_last = 1'b1;
    for (int i = 0; i < NCORES - 1; i++)
      if (w_q[i] != W_W'(K - 1)) odo_last = 1'b0;
  end

  logic have_best_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      ti_q        <= '0;
      mode_q      <= 1'b0;
      have_best_q <= 1'b0;
      best_cost   <= '0;
      done        <= 1'b0;
      for (int i = 0; i < NCORES; i++) begin
        w_q[i]       <= W_W'(1);
        ipc_q[i]     <= '0;
        best_ways[i] <= W_W'(K / NCORES);
        for (int w = 0; w < K; w++) begin
          tm_q[i][w] <= '0;
          wt_q[i][w] <= '0;
        end
      end
    end else begin
      done <= 1'b0;
      case (state_q)
        S_IDLE: if (start) begin
          for (int i = 0; i < NCORES; i++) begin
            ipc_q[i] <= ipc_weight[i];
            for (int w = 0; w < K; w++) tm_q[i][w] <= tm_now[i][w];
          end
          mode_q  <= mode_ipc;
          ti_q    <= '0;
          state_q <= S_WEIGHT;
        end
        S_WEIGHT: begin
          wt_q[ti_core][ti_way] <= wt_now;
          if (ti_q == TI_W'(NCORES * K - 1)) begin
            for (int i = 0; i < NCORES; i++) w_q[i] <= W_W'(1);
            have_best_q <= 1'b0;
            state_q     <= S_ENUM;
          end else begin
            ti_q <= ti_q + 1'b1;
          end
        end
        S_ENUM: begin
          if (cand_ok && (!have_best_q || cand_cost < best_cost)) begin
            have_best_q <= 1'b1;
            best_cost   <= cand_cost;
            for (int i = 0; i < NCORES - 1; i++) best_ways[i] <= w_q[i];
            best_ways[NCORES-1] <= w_last;
          end
          if (odo_last) begin
            state_q <= S_DONE;
          end else begin
            // advance the odometer, digit 0 fastest
            logic carry;
            carry = 1'b1;
            for (int i = 0; i < NCORES - 1; i++) begin
              if (carry) begin
                if (w_q[i] == W_W'(K - 1)) begin
                  w_q[i] <= W_W'(1);
                end else begin
                  w_q[i] <= w_q[i] + 1'b1;
                  carry = 1'b0;
                end
              end
            end
          end
        end
        S_DONE: begin
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (state_q != S_IDLE);

endmodule
