// tb_dcp_controller: checks the even initial partition (16 ways over 3
// cores gives 6/5/5), that interval_end pulses exactly every PERIOD cycles,
// and that a new partition is loaded only when new_valid is high.
module tb_dcp_controller;
  localparam int N = 3, K = 16, PER = 37;
  localparam int W_W = $clog2(K + 1);
  logic clk = 0, rst_n = 0;
  logic ie, nv;
  logic [N-1:0][W_W-1:0] nw, ways;
  int checks = 0, failures = 0;

  dcp_controller #(.NCORES(N), .K(K), .PERIOD(PER)) dut (
    .clk, .rst_n, .interval_end(ie), .new_valid(nv), .new_ways(nw), .ways);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last, cyc, npulse;
    nv = 0; nw = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (ways[0] != 6 || ways[1] != 5 || ways[2] != 5) begin
      failures++; $display("FAIL initial partition %0d/%0d/%0d", ways[0], ways[1], ways[2]);
    end
    last = -1; npulse = 0;
    for (cyc = 1; cyc < 400; cyc++) begin
      if (ie) begin
        npulse++;
        checks++;
        if (last >= 0 && cyc - last != PER) begin
          failures++; $display("FAIL interval length %0d", cyc - last);
        end
        last = cyc;
      end
      nw[0] = W_W'(1 + cyc % 10); nw[1] = 2; nw[2] = W_W'(K - 3 - cyc % 10);
      nv = (cyc % 50 == 25);
      @(negedge clk);
      checks++;
      if (nv) begin
        if (ways != nw) begin failures++; $display("FAIL partition not loaded"); end
      end
      nv = 0;
    end
    checks++;
    if (npulse != 399 / PER) begin failures++; $display("FAIL %0d pulses", npulse); end
    // ways hold when new_valid is low
    nw = '0;
    @(negedge clk);
    checks++;
    if (ways == nw) begin failures++; $display("FAIL loaded without new_valid"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
