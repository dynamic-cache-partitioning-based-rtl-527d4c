// tb_cluster_counters: random allocations and releases on both ports,
// checked every cycle against a software list of in-flight stack
// distances (counter d must equal the number of entries with distance
// >= d).
module tb_cluster_counters;
  localparam int K = 16;
  localparam int SD_W = $clog2(K + 2);
  localparam int MAXC = 56;
  localparam int CNT_W = $clog2(MAXC + 1);
  logic clk = 0, rst_n = 0;
  logic ia, ib, da, db;
  logic [SD_W-1:0] ia_sd, ib_sd, da_sd, db_sd;
  logic [K:0][CNT_W-1:0] n_ge;
  int checks = 0, failures = 0;
  int inflight[$];

  cluster_counters #(.ASSOC(K), .MAX_COUNT(MAXC)) dut (
    .clk, .rst_n,
    .inc_a_valid(ia), .inc_a_sd(ia_sd), .inc_b_valid(ib), .inc_b_sd(ib_sd),
    .dec_a_valid(da), .dec_a_sd(da_sd), .dec_b_valid(db), .dec_b_sd(db_sd),
    .n_ge);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ia = 0; ib = 0; da = 0; db = 0;
    ia_sd = '0; ib_sd = '0; da_sd = '0; db_sd = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // check registered counts
      for (int d = 1; d <= K + 1; d++) begin
        int e;
        e = 0;
        foreach (inflight[i]) if (inflight[i] >= d) e++;
        checks++;
        if (int'(n_ge[d-1]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d d=%0d got %0d exp %0d", t, d, n_ge[d-1], e);
        end
      end
      ia = 0; ib = 0; da = 0; db = 0;
      if (inflight.size() > 0 && ($urandom % 3 == 0)) begin
        int i;
        i = $urandom % inflight.size();
        da = 1; da_sd = SD_W'(inflight[i]); inflight.delete(i);
      end
      if (inflight.size() > 0 && ($urandom % 3 == 0)) begin
        int i;
        i = $urandom % inflight.size();
        db = 1; db_sd = SD_W'(inflight[i]); inflight.delete(i);
      end
      if (inflight.size() < MAXC - 2 && ($urandom % 2 == 0)) begin
        ia = 1; ia_sd = SD_W'(1 + $urandom % (K + 1)); inflight.push_back(int'(ia_sd));
      end
      if (inflight.size() < MAXC - 2 && ($urandom % 2 == 0)) begin
        ib = 1; ib_sd = SD_W'(1 + $urandom % (K + 1)); inflight.push_back(int'(ib_sd));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
