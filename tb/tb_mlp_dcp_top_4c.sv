// tb_mlp_dcp_top_4c: the unit in its four-core configurations, side by
// side, each in a tb_4c_harness with a shortened interval of 40000 cycles
// (three intervals, the last IPC-weighted) and otherwise default sizes:
//   1MB 16-way L2 (K = 16) and 2MB 32-way L2 (K = 32), 1024 sets each;
//   the 16-way system with a 128-entry and with a 512-entry ROB;
//   the 16-way system with every set tracked by the ATDs (d_s = 1).
// Each harness drives four cores' traffic and checks every partition
// decision against an exhaustive reference search and its duration (3441
// cycles for 16 ways, 29921 for 32). The test ends when all harnesses are
// done; a watchdog ends it otherwise.
module tb_mlp_dcp_top_4c;
  localparam int NH = 5;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [NH-1:0] fin;
  int chk[NH], fail[NH];

  tb_4c_harness #(.K(16))              u_k16   (.clk, .finished(fin[0]), .checks(chk[0]), .failures(fail[0]));
  tb_4c_harness #(.K(32))              u_k32   (.clk, .finished(fin[1]), .checks(chk[1]), .failures(fail[1]));
  tb_4c_harness #(.K(16), .ROB(128))   u_rob128(.clk, .finished(fin[2]), .checks(chk[2]), .failures(fail[2]));
  tb_4c_harness #(.K(16), .ROB(512))   u_rob512(.clk, .finished(fin[3]), .checks(chk[3]), .failures(fail[3]));
  tb_4c_harness #(.K(16), .SDIST(1))   u_ds1   (.clk, .finished(fin[4]), .checks(chk[4]), .failures(fail[4]));

  initial begin
    int c, f;
    fork
      wait (&fin);
      begin
        repeat (200_000) @(posedge clk);
        $display("watchdog expired");
      end
    join_any
    c = 0;
    f = (&fin) ? 0 : 1;
    for (int i = 0; i < NH; i++) begin
      c += chk[i];
      f += fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
