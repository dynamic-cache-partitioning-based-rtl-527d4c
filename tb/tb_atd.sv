// tb_atd: compares the stack distances reported by the ATD with a software
// LRU stack per set, for a random access stream over few tags (so that all
// distances and misses occur) on a small 16-way directory sampling one set
// in four. Starts with the access stream A B C C A D B D, whose distances
// are -, -, -, 1, 3, -, 4, 2 (- = miss, reported as 17).
module tb_atd;
  localparam int K = 16, SETS = 32, DS = 4, AW = 20;
  localparam int SD_W = $clog2(K + 2);
  logic clk = 0, rst_n = 0;
  logic av;
  logic [AW-1:0] addr;
  logic rv, rs;
  logic [SD_W-1:0] sd;
  int checks = 0, failures = 0;
  int stack[SETS][$];

  atd #(.ASSOC(K), .NUM_SETS(SETS), .SAMPLE_DIST(DS), .LINE_ADDR_W(AW)) dut (
    .clk, .rst_n, .acc_valid(av), .acc_line_addr(addr),
    .res_valid(rv), .res_sampled(rs), .res_sd(sd));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model(int set, int tag);
    int pos;
    pos = -1;
    foreach (stack[set][i]) if (stack[set][i] == tag && pos < 0) pos = i;
    if (pos >= 0) stack[set].delete(pos);
    else if (stack[set].size() == K) void'(stack[set].pop_back());
    stack[set].push_front(tag);
    return (pos >= 0) ? pos + 1 : K + 1;
  endfunction

  task automatic access(int set, int tag, int exp_fixed);
    int e;
    bit smp;
    smp = (set % DS) == 0;
    @(negedge clk);
    av = 1;
    addr = AW'((tag << $clog2(SETS)) | set);
    e = smp ? model(set, tag) : 0;
    @(negedge clk);
    av = 0;
    checks++;
    if (!rv || rs != smp || (smp && int'(sd) != e) || (exp_fixed > 0 && int'(sd) != exp_fixed)) begin
      failures++;
      if (failures < 10) $display("FAIL set %0d tag %0d: sampled %0d sd %0d exp %0d", set, tag, rs, sd, e);
    end
  endtask

  initial begin
    av = 0; addr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (SETS / DS + 2) @(posedge clk);
    // A B C C A D B D in set 4
    access(4, 10, 17); access(4, 11, 17); access(4, 12, 17); access(4, 12, 1);
    access(4, 10, 3);  access(4, 13, 17); access(4, 11, 4);  access(4, 13, 2);
    for (int t = 0; t < 20000; t++)
      access($urandom % SETS, $urandom % 20, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
