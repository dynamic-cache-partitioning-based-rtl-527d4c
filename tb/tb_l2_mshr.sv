// tb_l2_mshr: checks the MLP_cost accounting of the L2 MSHR.
//  * Single misses held for a random time L with a cluster size N driven on
//    n_ge: the final cost must be L/N within one adder period (8/N cycles),
//    since an entry is charged a whole period at each of its group turns.
//  * Instruction misses are charged as if alone whatever n_ge says;
//    untracked misses keep a zero cost.
//  * The released owner, stack distance and tracked/counted flags.
//  * Filling all 32 entries drops alloc_ready and free_count to 0; fills
//    match entries by line address.
module tb_l2_mshr;
  import mlp_dcp_pkg::*;
  localparam int NC = 2, K = 16, E = 32, MAXC = 56;
  localparam int SD_W = $clog2(K + 2), CNT_W = $clog2(MAXC + 1);
  logic clk = 0, rst_n = 0;
  logic av, ar, tracked;
  logic [4:0] aidx;
  logic [0:0] acore;
  acc_type_e atype;
  logic [33:0] aaddr, faddr;
  logic [SD_W-1:0] asd;
  logic [5:0] free_count;
  logic fv, fm;
  logic [4:0] fidx;
  logic [NC-1:0][K:0][CNT_W-1:0] n_ge;
  logic rv, rtr, rcnt;
  logic [0:0] rcore;
  logic [SD_W-1:0] rsd;
  logic [COST_W-1:0] rcost;
  int checks = 0, failures = 0;

  l2_mshr #(.NCORES(NC), .K(K), .ENTRIES(E), .MAX_COUNT(MAXC)) dut (
    .clk, .rst_n,
    .alloc_valid(av), .alloc_ready(ar), .alloc_idx(aidx), .alloc_core(acore),
    .alloc_type(atype), .alloc_line_addr(aaddr), .alloc_bytes(7'd64), .alloc_sd(asd),
    .alloc_tracked(tracked), .free_count(free_count),
    .fill_valid(fv), .fill_line_addr(faddr), .fill_match(fm), .fill_idx(fidx),
    .n_ge, .rel_valid(rv), .rel_core(rcore), .rel_sd(rsd), .rel_cost(rcost),
    .rel_tracked(rtr), .rel_counted(rcnt));

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_miss(int lat, int n, int core, int sd, acc_type_e ty, bit trk);
    real expc, got;
    @(negedge clk);
    n_ge = '0;
    n_ge[core][sd-1] = CNT_W'(n);
    av = 1; acore = 1'(core); atype = ty; aaddr = 34'($urandom); asd = SD_W'(sd); tracked = trk;
    @(negedge clk);
    av = 0;
    repeat (lat - 1) @(negedge clk);
    fv = 1; faddr = aaddr;
    @(negedge clk);
    fv = 0;
    checks++;
    expc = !trk ? 0.0 : (ty == ACC_IFETCH) ? real'(lat) : real'(lat) / n;
    got = real'(rcost) / (1 << COST_FRAC);
    if (!rv || int'(rcore) != core || int'(rsd) != sd || rtr != trk ||
        rcnt != (trk && ty != ACC_IFETCH) ||
        got > expc + 8.0 / ((ty == ACC_IFETCH) ? 1 : n) + 0.5 || got < expc - 8.0 / ((ty == ACC_IFETCH) ? 1 : n) - 0.5) begin
      failures++;
      $display("FAIL lat=%0d n=%0d type=%0d trk=%0d: cost %f expected about %f (rv=%0d sd=%0d)",
               lat, n, ty, trk, got, expc, rv, rsd);
    end
  endtask

  initial begin
    av = 0; fv = 0; aaddr = '0; faddr = '0; acore = 0; atype = ACC_LOAD; asd = 1; tracked = 1;
    n_ge = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++)
      one_miss(20 + $urandom % 400, 1 + $urandom % 20, $urandom % 2, 1 + $urandom % 17,
               ($urandom % 5 == 0) ? ACC_IFETCH : ACC_LOAD, ($urandom % 6) != 0);
    // fill the MSHR
    @(negedge clk);
    checks++;
    if (free_count != 6'd32) begin failures++; $display("FAIL free_count %0d", free_count); end
    for (int i = 0; i < E; i++) begin
      av = 1; aaddr = 34'(1000 + i); atype = ACC_STORE;
      @(negedge clk);
    end
    av = 0;
    checks++;
    if (ar || free_count != 0) begin failures++; $display("FAIL not full"); end
    // fill entry holding address 1010 -> that entry index must be freed
    fv = 1; faddr = 34'(1010);
    #1;
    checks++;
    if (!fm || fidx != 5'd10) begin failures++; $display("FAIL fill match idx %0d", fidx); end
    @(negedge clk); fv = 0;
    checks++;
    if (!ar || free_count != 1) begin failures++; $display("FAIL free after fill"); end
    fv = 1; faddr = 34'(99999);
    #1;
    checks++;
    if (fm) begin failures++; $display("FAIL spurious match"); end
    @(negedge clk); fv = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
