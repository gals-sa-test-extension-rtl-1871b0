// Self-checking testbench for test_ext. It drives the command handshake as
// the serial control extension would, plays the test module's injection
// port (accepting after a random delay) and signature outputs, and checks
// that a user pattern is injected exactly once with the commanded value,
// that the signature read-back returns {sig, last_rx} in 24 bits, and that
// other commands answer with no data.
module tb_test_ext;
  import galssa_pkg::*;
  logic clk = 0, rst_n = 0;
  logic te_req = 0; logic [CMD_W-1:0] te_cmd = '0; logic [DMAX-1:0] te_data = '0;
  logic te_ack; logic [5:0] te_rlen; logic [RMAX-1:0] te_rdata;
  logic inj_valid, inj_ready = 0; logic [CH_W-1:0] inj_data;
  logic [SIG_W-1:0] sig = 16'hBEEF; logic [CH_W-1:0] last_rx = 8'h42;
  int checks = 0, failures = 0, injected = 0; logic [CH_W-1:0] inj_last;

  test_ext dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    inj_ready <= inj_valid && ($urandom % 3 == 0) && !inj_ready;
    if (rst_n && inj_valid && inj_ready) begin injected++; inj_last = inj_data; end
  end

  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic do_cmd(input logic [3:0] c, input logic [15:0] d);
    @(negedge clk); te_cmd = c; te_data = d; te_req = 1;
    while (!te_ack) @(posedge clk);
    @(negedge clk); te_req = 0;
    while (te_ack) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1; repeat (2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      logic [7:0] p;
      int n0;
      p = 8'($urandom); n0 = injected;
      do_cmd(CMD_EXT_PATTERN, {8'h00, p});
      chk(injected == n0 + 1 && inj_last == p && te_rlen == 0,
          $sformatf("pattern %h injected %0d times, last %h", p, injected - n0, inj_last));
      chk(!inj_valid, "injection request released");
    end
    do_cmd(CMD_EXT_SIGREAD, 16'h0);
    chk(te_rlen == 24 && te_rdata == 24'hBEEF42, $sformatf("sigread %0d bits %h", te_rlen, te_rdata));
    sig = 16'h1234; last_rx = 8'h9A;
    do_cmd(CMD_EXT_SIGREAD, 16'h0);
    chk(te_rdata == 24'h12349A, "sigread follows inputs");
    do_cmd(4'hB, 16'h0);
    chk(te_rlen == 0, "unknown command: no data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
