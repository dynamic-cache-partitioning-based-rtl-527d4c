// tb_partition_decider: random MLP-aware histograms for a 2-core and a
// 3-core 16-way decider, in both policies (plain and IPC-weighted). The
// chosen partition and its cost are compared with an exhaustive software
// search (every core at least one way, cost of w ways = sum of bins
// w+1..K+1, ties to the first in odometer order). The decision latency must
// be 1 + N*K + (K-1)^(N-1) + 1 cycles from the start pulse to done.
module tb_partition_decider;
  localparam int K = 16, SW = 20, IW = 6;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  // two instances
  logic start2, mode2, busy2, done2;
  logic [1:0][K:0][SW-1:0] hist2;
  logic [1:0][IW-1:0] ipc2;
  logic [1:0][4:0] ways2;
  logic [SW+5+IW:0] cost2;
  logic start3, mode3, busy3, done3;
  logic [2:0][K:0][SW-1:0] hist3;
  logic [2:0][IW-1:0] ipc3;
  logic [2:0][4:0] ways3;
  logic [SW+5+IW+1:0] cost3;

  partition_decider #(.NCORES(2), .K(K), .SDH_W(SW), .IPC_W(IW)) d2 (
    .clk, .rst_n, .start(start2), .mode_ipc(mode2), .hist(hist2), .ipc_weight(ipc2),
    .busy(busy2), .done(done2), .best_ways(ways2), .best_cost(cost2));
  partition_decider #(.NCORES(3), .K(K), .SDH_W(SW), .IPC_W(IW)) d3 (
    .clk, .rst_n, .start(start3), .mode_ipc(mode3), .hist(hist3), .ipc_weight(ipc3),
    .busy(busy3), .done(done3), .best_ways(ways3), .best_cost(cost3));

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint tmlp(longint h[K+1], int w);
    longint s = 0;
    for (int j = w + 1; j <= K + 1; j++) s += h[j-1];
    return s;
  endfunction

  initial begin
    longint h[3][K+1];
    longint c[3];
    longint best, cost;
    int bw[3];
    int cyc;
    start2 = 0; start3 = 0; mode2 = 0; mode3 = 0; hist2 = '0; hist3 = '0; ipc2 = '0; ipc3 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int n;
      bit m;
      n = (t % 2) ? 3 : 2;
      m = (t % 4) >= 2;
      for (int i = 0; i < 3; i++) begin
        c[i] = m ? 1 + $urandom % 63 : 1;
        for (int j = 0; j <= K; j++) h[i][j] = (t < 4) ? (j * 100 + i) : $urandom % 50000;
      end
      // reference
      best = -1;
      if (n == 2) begin
        for (int w0 = 1; w0 < K; w0++) begin
          cost = c[0] * tmlp(h[0], w0) + c[1] * tmlp(h[1], K - w0);
          if (best < 0 || cost < best) begin best = cost; bw[0] = w0; bw[1] = K - w0; end
        end
      end else begin
        for (int w1 = 1; w1 < K; w1++)
          for (int w0 = 1; w0 < K; w0++)
            if (w0 + w1 < K) begin
              cost = c[0] * tmlp(h[0], w0) + c[1] * tmlp(h[1], w1) + c[2] * tmlp(h[2], K - w0 - w1);
              if (best < 0 || cost < best) begin best = cost; bw[0] = w0; bw[1] = w1; bw[2] = K - w0 - w1; end
            end
      end
      @(negedge clk);
      for (int i = 0; i < 3; i++) begin
        for (int j = 0; j <= K; j++) begin
          if (i < 2) hist2[i][j] = SW'(h[i][j]);
          hist3[i][j] = SW'(h[i][j]);
        end
        if (i < 2) ipc2[i] = IW'(c[i]);
        ipc3[i] = IW'(c[i]);
      end
      mode2 = m; mode3 = m;
      if (n == 2) start2 = 1; else start3 = 1;
      @(negedge clk);
      start2 = 0; start3 = 0;
      hist2 = '0; hist3 = '0;        // the decider must work from its snapshot
      cyc = 1;
      while (!(n == 2 ? done2 : done3) && cyc < 5000) begin
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (cyc != 1 + n * K + ((n == 2) ? (K - 1) : (K - 1) * (K - 1)) + 1) begin
        failures++; $display("FAIL n=%0d latency %0d cycles", n, cyc);
      end
      checks++;
      if (n == 2) begin
        if (int'(ways2[0]) != bw[0] || int'(ways2[1]) != bw[1] || longint'(cost2) != best) begin
          failures++; $display("FAIL t=%0d n=2 mode=%0d got %0d/%0d cost %0d exp %0d/%0d cost %0d",
                               t, m, ways2[0], ways2[1], cost2, bw[0], bw[1], best);
        end
      end else begin
        if (int'(ways3[0]) != bw[0] || int'(ways3[1]) != bw[1] || int'(ways3[2]) != bw[2] || longint'(cost3) != best) begin
          failures++; $display("FAIL t=%0d n=3 mode=%0d got %0d/%0d/%0d exp %0d/%0d/%0d",
                               t, m, ways3[0], ways3[1], ways3[2], bw[0], bw[1], bw[2]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
