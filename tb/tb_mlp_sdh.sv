// tb_mlp_sdh: random weighted updates on both ports, including same-bin
// collisions, and periodic halving, compared every cycle with a software
// model of the histogram. A second phase drives one bin to saturation.
module tb_mlp_sdh;
  localparam int K = 16;
  localparam int SD_W = $clog2(K + 2);
  localparam int CW = 12;
  logic clk = 0, rst_n = 0;
  logic av, bv, halve;
  logic [SD_W-1:0] asd, bsd;
  logic [2:0] aq, bq;
  logic [K:0][CW-1:0] hist;
  longint model[K+1];
  int checks = 0, failures = 0;

  mlp_sdh #(.K(K), .CW(CW)) dut (
    .clk, .rst_n, .upd_a_valid(av), .upd_a_sd(asd), .upd_a_qcost(aq),
    .upd_b_valid(bv), .upd_b_sd(bsd), .upd_b_qcost(bq), .halve, .hist);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step_model();
    for (int j = 0; j <= K; j++) if (halve) model[j] = model[j] >> 1;
    if (av) model[asd-1] += aq;
    if (bv) model[bsd-1] += bq;
    for (int j = 0; j <= K; j++) if (model[j] > (1 << CW) - 1) model[j] = (1 << CW) - 1;
  endtask

  initial begin
    foreach (model[j]) model[j] = 0;
    av = 0; bv = 0; halve = 0; asd = 1; bsd = 1; aq = 0; bq = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      for (int j = 0; j <= K; j++) begin
        checks++;
        if (longint'(hist[j]) != model[j]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d bin=%0d got %0d exp %0d", t, j + 1, hist[j], model[j]);
        end
      end
      av = ($urandom % 4) != 0; bv = ($urandom % 3) != 0;
      asd = SD_W'(1 + $urandom % (K + 1));
      bsd = ($urandom % 4 == 0) ? asd : SD_W'(1 + $urandom % (K + 1));
      aq = 3'($urandom); bq = 3'($urandom);
      halve = (t % 500) == 499;
      if (t > 3000) begin av = 1; asd = 5; aq = 7; halve = 0; end
      step_model();
    end
    @(negedge clk);
    checks++;
    if (hist[4] != '1) begin failures++; $display("FAIL no saturation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
