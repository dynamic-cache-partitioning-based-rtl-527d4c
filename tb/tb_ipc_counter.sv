// tb_ipc_counter: random commit counts over several intervals; at each
// interval end the scaled count (including the last cycle's commits) must
// appear on ipc_weight, and a saturating case is checked.
module tb_ipc_counter;
  logic clk = 0, rst_n = 0;
  logic [3:0] cc;
  logic ie;
  logic [11:0] w;
  int checks = 0, failures = 0;
  longint acc;

  ipc_counter #(.IPC_W(12), .IPC_SHIFT(3)) dut (
    .clk, .rst_n, .commit_cnt(cc), .interval_end(ie), .ipc_weight(w));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cc = 0; ie = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int iv = 0; iv < 8; iv++) begin
      int len;
      longint expw;
      acc = 0;
      len = (iv == 7) ? 8000 : 100 + $urandom % 400;
      for (int t = 0; t < len; t++) begin
        @(negedge clk);
        cc = (iv == 7) ? 4'd8 : 4'($urandom % 9);
        ie = (t == len - 1);
        acc += cc;
      end
      @(negedge clk);
      ie = 0; cc = 0;
      expw = acc >> 3;
      if (expw > 4095) expw = 4095;
      checks++;
      if (longint'(w) != expw) begin
        failures++;
        $display("FAIL interval %0d: weight %0d expected %0d", iv, w, expw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
