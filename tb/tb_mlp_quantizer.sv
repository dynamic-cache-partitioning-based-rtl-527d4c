// tb_mlp_quantizer: sweeps MLP_cost over 0..511 cycles with random fraction
// bits and compares the weight with the quantification table (levels start
// at 43, 86, 129, 171, 214, 257 and 300 cycles). Also checks the two named
// cases: an isolated miss (300 cycles -> 7) and one of two overlapped
// misses (150 cycles -> 3).
module tb_mlp_quantizer;
  import mlp_dcp_pkg::*;
  logic [COST_W-1:0]  cost;
  logic [QCOST_W-1:0] q;
  int checks = 0, failures = 0;

  mlp_quantizer dut (.cost(cost), .qcost(q));

  function automatic int ref_q(int cyc);
    int lb[7] = '{43, 86, 129, 171, 214, 257, 300};
    int r = 0;
    for (int i = 0; i < 7; i++) if (cyc >= lb[i]) r = i + 1;
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 512; c++) begin
      cost = COST_W'((c << COST_FRAC) | ($urandom % (1 << COST_FRAC)));
      #1;
      checks++;
      if (int'(q) != ref_q(c)) begin
        failures++;
        $display("FAIL cost=%0d cycles: q=%0d expected %0d", c, q, ref_q(c));
      end
    end
    cost = COST_W'(300 << COST_FRAC); #1; checks++; if (q != 3'd7) failures++;
    cost = COST_W'(150 << COST_FRAC); #1; checks++; if (q != 3'd3) failures++;
    cost = '1;                        #1; checks++; if (q != 3'd7) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
