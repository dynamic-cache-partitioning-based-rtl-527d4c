// tb_mem_latency_monitor: allocates and fills MSHR entries with known
// residency times. The monitor follows one entry at a time; the testbench
// predicts which entries it samples and checks the block average of 16
// samples, and the initial value before any average exists.
module tb_mem_latency_monitor;
  logic clk = 0, rst_n = 0;
  logic av, fv;
  logic [4:0] ai, fi;
  logic [9:0] avg;
  int checks = 0, failures = 0;

  mem_latency_monitor #(.IDX_W(5), .LAT_W(10), .INIT_LAT(300), .AVG_LOG(4)) dut (
    .clk, .rst_n, .alloc_valid(av), .alloc_idx(ai), .fill_valid(fv), .fill_idx(fi), .avg_lat(avg));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum;
    av = 0; fv = 0; ai = 0; fi = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (avg != 300) begin failures++; $display("FAIL init %0d", avg); end
    for (int round = 0; round < 3; round++) begin
      sum = 0;
      for (int s = 0; s < 16; s++) begin
        int lat;
        lat = 20 + $urandom % 400;
        // allocate entry 3 (sampled), one cycle later entry 7 (not sampled:
        // the monitor is busy), fill 7 first then 3 after lat cycles
        @(negedge clk); av = 1; ai = 3;
        @(negedge clk); av = 1; ai = 7;
        @(negedge clk); av = 0; fv = 1; fi = 7;
        @(negedge clk); fv = 0;
        repeat (lat - 3) @(negedge clk);
        fv = 1; fi = 3;
        @(negedge clk); fv = 0;
        sum += lat;
      end
      @(negedge clk);
      checks++;
      if (int'(avg) != sum / 16) begin
        failures++; $display("FAIL round %0d avg %0d expected %0d", round, avg, sum / 16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
