// mlp_sdh: MLP-aware Stack Distance Histogram of one core.
//
// Bin j (j = 1..K) accumulates the quantified MLP_cost of the core's L2
// accesses of stack distance j; bin K+1 those that missed in the ATD. Unlike
// a plain stack distance histogram, which adds one per access, each access
// adds its 0..7 weight, so isolated misses count more than clustered ones.
// From the bins, the cost of giving the core w ways is the sum of bins w+1
// .. K+1.
//
// After each partition decision the whole histogram is multiplied by 0.5
// (rho) with a shift, keeping half of the past behaviour. Counters are
// SDH_W bits wide and saturate.
//
// Interface: two update ports (a: the L2 MSHR, b: the core's HSHR), each
// adding qcost to bin sd at the clock edge; both may name the same bin.
// halve shifts every bin right by one at the same edge, before that edge's
// updates are added. hist[j-1] is the registered bin j.
module mlp_sdh
  import mlp_dcp_pkg::*;
#(
  parameter int unsigned K  = ASSOC,
  parameter int unsigned CW = SDH_W,
  localparam int unsigned SD_W = $clog2(K + 2)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 upd_a_valid,
  input  logic [SD_W-1:0]      upd_a_sd,
  input  logic [QCOST_W-1:0]   upd_a_qcost,
  input  logic                 upd_b_valid,
  input  logic [SD_W-1:0]      upd_b_sd,
  input  logic [QCOST_W-1:0]   upd_b_qcost,
  input  logic                 halve,
  output logic [K:0][CW-1:0]   hist
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist <= '0;
    end else begin
      for (int j = 1; j <= K + 1; j++) begin
        logic [CW-1:0] base;
        logic [CW+1:0] sum;
        base = halve ? (hist[j-1] >> 1) : hist[j-1];
        sum  = {2'b00, base}
             + ((upd_a_valid && upd_a_sd == SD_W'(j)) ? (CW+2)'(upd_a_qcost) : '0)
             + ((upd_b_valid && upd_b_sd == SD_W'(j)) ? (CW+2)'(upd_b_qcost) : '0);
        hist[j-1] <= (sum[CW+1:CW] != 2'b00) ? '1 : sum[CW-1:0];
      end
    end
  end

endmodule
