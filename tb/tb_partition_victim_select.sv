// tb_partition_victim_select: random set states (owners, LRU order, some
// invalid ways) and random quotas for 4 cores; the victim is compared with
// a reference written from the replacement rule: invalid way first, else
// the LRU own line when the requester holds its quota or more, else the
// LRU line of the other cores.
module tb_partition_victim_select;
  localparam int N = 4, K = 16;
  logic [1:0] rc;
  logic [K-1:0] vld;
  logic [K-1:0][1:0] own;
  logic [K-1:0][3:0] lru;
  logic [N-1:0][4:0] quota;
  logic [3:0] victim;
  logic from_own;
  int checks = 0, failures = 0;

  partition_victim_select #(.NCORES(N), .K(K)) dut (
    .req_core(rc), .way_valid(vld), .way_owner(own), .way_lru(lru), .quota(quota),
    .victim(victim), .from_own(from_own));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm[K];
    int owned, exp_v, best;
    bit exp_own, any_inv;
    for (int t = 0; t < 3000; t++) begin
      foreach (perm[i]) perm[i] = i;
      perm.shuffle();
      for (int w = 0; w < K; w++) begin
        lru[w] = 4'(perm[w]);
        own[w] = 2'($urandom % N);
        vld[w] = ($urandom % 10) != 0 || t < 1500;
      end
      rc = 2'($urandom % N);
      for (int c = 0; c < N; c++) quota[c] = 5'(1 + $urandom % 8);
      #1;
      // reference
      owned = 0; any_inv = 0; exp_v = -1; exp_own = 0;
      for (int w = 0; w < K; w++) begin
        if (!vld[w] && !any_inv) begin any_inv = 1; exp_v = w; end
        if (vld[w] && own[w] == rc) owned++;
      end
      if (!any_inv) begin
        bit want_own;
        want_own = owned >= int'(quota[rc]);
        best = -1;
        for (int w = 0; w < K; w++)
          if ((own[w] == rc) == want_own && (best < 0 || lru[w] > lru[best])) best = w;
        if (best < 0) begin
          want_own = !want_own;
          for (int w = 0; w < K; w++)
            if ((own[w] == rc) == want_own && (best < 0 || lru[w] > lru[best])) best = w;
        end
        exp_v = best; exp_own = want_own;
      end
      checks++;
      if (int'(victim) != exp_v || (!any_inv && from_own != exp_own)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d victim %0d exp %0d own %0d exp %0d", t, victim, exp_v, from_own, exp_own);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
