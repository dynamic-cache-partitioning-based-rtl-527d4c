// mlp_quantizer: turns an MLP_cost, in cycles, into a 3-bit weight.
//
// The cost interval [0, 300] cycles (the memory latency) is cut into seven
// nearly equal parts, giving weights 0..6, and any cost of 300 cycles or
// more gets weight 7. The lower bounds of the levels are the ones of the
// design's quantification table (43, 86, 129, 171, 214, 257, 300 cycles), so
// an isolated miss that waits the full memory latency weighs 7 and each of
// two overlapped misses weighs 3. Taking exactly 300 cycles as level 7
// (the table's last two rows both name 300) is this implementation's choice.
//
// Interface: cost is unsigned fixed point with COST_FRAC fraction bits; only
// its integer part is compared, so the fraction bits of cost are unused on
// purpose. Purely combinational.
module mlp_quantizer
  import mlp_dcp_pkg::*;
#(
  parameter int unsigned CW    = COST_W,
  parameter int unsigned CFRAC = COST_FRAC
) (
  input  logic [CW-1:0]      cost,
  output logic [QCOST_W-1:0] qcost
);

  localparam int unsigned IW = CW - CFRAC;

  logic [IW-1:0] cycles;
  assign cycles = cost[CW-1:CFRAC];

  always_comb begin
    if      (cycles >= IW'(QUANT_LB7)) qcost = 3'd7;
    else if (cycles >= IW'(QUANT_LB6)) qcost = 3'd6;
    else if (cycles >= IW'(QUANT_LB5)) qcost = 3'd5;
    else if (cycles >= IW'(QUANT_LB4)) qcost = 3'd4;
    else if (cycles >= IW'(QUANT_LB3)) qcost = 3'd3;
    else if (cycles >= IW'(QUANT_LB2)) qcost = 3'd2;
    else if (cycles >= IW'(QUANT_LB1)) qcost = 3'd1;
    else                               qcost = 3'd0;
  end

endmodule
