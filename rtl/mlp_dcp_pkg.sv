// mlp_dcp_pkg: constants and types shared by the MLP-aware dynamic cache
// partitioning (DCP) blocks.
//
// The default configuration is the two-core system used for the storage
// estimate of the design: a 1MB, 16-way shared L2 with 64-byte lines (1024
// sets), 40-bit physical addresses, a 32-entry L2 MSHR, 24-entry HSHRs per
// core, a 256-entry ROB, a 300-cycle memory latency, 4-byte histogram
// counters and a 5 million cycle partitioning interval. The fixed-point
// format of MLP_cost (7 fractional bits in a 16-bit field) and the width of
// the ROB identifier (index plus two age bits) are choices of this design.
package mlp_dcp_pkg;

  // System configuration
  localparam int unsigned NUM_CORES     = 2;
  localparam int unsigned ASSOC         = 16;    // L2 ways (K)
  localparam int unsigned NUM_SETS      = 1024;  // 1MB / 64B / 16 ways
  localparam int unsigned SAMPLE_DIST   = 16;    // ATD sampling distance d_s
  localparam int unsigned LINE_ADDR_W   = 34;    // 40-bit address minus 6 offset bits
  localparam int unsigned ROB_SIZE      = 256;
  localparam int unsigned MEM_LAT       = 300;   // cycles, L2 to memory
  localparam int unsigned MSHR_ENTRIES  = 32;
  localparam int unsigned HSHR_ENTRIES  = 24;
  localparam int unsigned NUM_ADDERS    = 4;     // shared MLP_cost adders
  localparam int unsigned SDH_W         = 32;    // 4-byte histogram counters
  localparam int unsigned PERIOD        = 5_000_000;
  localparam int unsigned COMMIT_W      = 8;     // max instructions per cycle

  // MLP_cost: unsigned fixed point, COST_W bits with COST_FRAC fraction bits
  localparam int unsigned COST_W        = 16;
  localparam int unsigned COST_FRAC     = 7;

  // Quantified MLP_cost 0..7. Stack distances run 1..ASSOC for ATD hits
  // and ASSOC+1 for ATD misses; modules size them as $clog2(ASSOC+2) bits.
  localparam int unsigned QCOST_W       = 3;

  // Lower bounds, in cycles, of quantified MLP_cost levels 1..7 (Table of
  // the MLP_cost quantification for a 300-cycle memory latency).
  localparam int unsigned QUANT_LB1 = 43;
  localparam int unsigned QUANT_LB2 = 86;
  localparam int unsigned QUANT_LB3 = 129;
  localparam int unsigned QUANT_LB4 = 171;
  localparam int unsigned QUANT_LB5 = 214;
  localparam int unsigned QUANT_LB6 = 257;
  localparam int unsigned QUANT_LB7 = 300;

  // Kind of L2 access as seen by the MLP monitor
  typedef enum logic [1:0] {
    ACC_LOAD  = 2'd0,
    ACC_STORE = 2'd1,
    ACC_IFETCH = 2'd2
  } acc_type_e;

endpackage
