// Self-checking testbench for test_module. The module's output port is
// looped back to its own input port (out_port -> in_port), so one instance
// is both sender and receiver of the functional test. The testbench drives
// the 4-phase command handshake and checks: calibration write, a passing
// functional test (count, pass flag, and the signature against a reference
// LFSR and MISR written here), a failing one (mismatched seeds), the latency
// measurement, pattern injection from the extension port and user traffic.
module tb_test_module;
  import galssa_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmd_req = 0; logic [CMD_W-1:0] cmd = '0; logic [DMAX-1:0] cmd_data = '0;
  logic cmd_ack; logic [5:0] rlen; logic [RMAX-1:0] rdata; logic [CAL_W-1:0] cal;
  logic tx_valid, tx_ready, tx_ack_seen, tx_done, tx_req_up; logic [CH_W-1:0] tx_data;
  logic rx_valid; logic [CH_W-1:0] rx_data;
  logic inj_valid = 0, inj_ready; logic [CH_W-1:0] inj_data = '0;
  logic [SIG_W-1:0] sig; logic [CH_W-1:0] last_rx;
  logic usr_tx_valid = 0, usr_tx_ready, usr_rx_valid; logic [CH_W-1:0] usr_tx_data = '0, usr_rx_data;
  logic ch_req, ch_ack; logic [CH_W-1:0] ch_data;
  int checks = 0, failures = 0;
  int usr_rx_n = 0; logic [CH_W-1:0] usr_last;

  test_module #(.CAL_RESET(8'd20)) dut (.*);
  out_port u_op (.clk, .rst_n, .valid(tx_valid), .data(tx_data), .ready(tx_ready),
                 .ack_seen(tx_ack_seen), .done(tx_done), .req_up(tx_req_up),
                 .req_o(ch_req), .data_o(ch_data), .ack_i(ch_ack));
  in_port u_ip (.clk, .rst_n, .req_i(ch_req), .data_i(ch_data), .ack_o(ch_ack),
                .rx_valid, .rx_data);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && usr_rx_valid) begin usr_rx_n++; usr_last = usr_rx_data; end

  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference pattern generator and signature, written independently
  function automatic logic [7:0] ref_lfsr(logic [7:0] s);
    logic fb = s[0];
    s = s >> 1;
    if (fb) s = s ^ 8'b1011_1000;    // taps 8,6,5,4
    return s;
  endfunction
  function automatic logic [15:0] ref_misr(logic [15:0] s, logic [7:0] d);
    logic msb = s[15];
    s = s << 1;
    if (msb) s = s ^ 16'b0001_0000_0010_0001;   // x^12 + x^5 + 1
    return s ^ {8'h00, d};
  endfunction

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic do_cmd(input logic [3:0] c, input logic [15:0] d);
    @(negedge clk); cmd = c; cmd_data = d; cmd_req = 1;
    while (!cmd_ack) @(posedge clk);
    @(negedge clk); cmd_req = 0;
    while (cmd_ack) @(posedge clk);
  endtask

  initial begin
    logic [7:0] p; logic [15:0] s;
    repeat (3) @(posedge clk); rst_n = 1; repeat (2) @(posedge clk);
    chk(cal == 8'd20, "calibration reset value");
    do_cmd(CMD_CLK_CFG, 16'h0047);
    chk(cal == 8'h47 && rlen == 0, "calibration write");
    // passing functional test, 12 words from seed 0x3C
    do_cmd(CMD_RX_ARM, 16'h003C);
    do_cmd(CMD_FUNC_TX, 16'h3C0C);
    chk(rlen == 8 && rdata == 24'd12, $sformatf("func_tx acknowledged %0d", rdata));
    repeat (10) @(posedge clk);
    p = 8'h3C; s = '0;
    for (int i = 0; i < 12; i++) begin s = ref_misr(s, p); p = ref_lfsr(p); end
    chk(sig == s, $sformatf("signature %h expected %h", sig, s));
    do_cmd(CMD_RX_CHECK, 16'h0);
    chk(rlen == 9 && rdata == {15'd0, 1'b1, 8'd12}, $sformatf("rx_check %h", rdata));
    // failing functional test: receiver armed with another seed
    do_cmd(CMD_RX_ARM, 16'h0011);
    do_cmd(CMD_FUNC_TX, 16'h1205);
    repeat (10) @(posedge clk);
    do_cmd(CMD_RX_CHECK, 16'h0);
    chk(rdata == {15'd0, 1'b0, 8'd5}, $sformatf("mismatch detected %h", rdata));
    // not armed: words are not counted
    do_cmd(CMD_FUNC_TX, 16'h0103);
    repeat (10) @(posedge clk);
    do_cmd(CMD_RX_CHECK, 16'h0);
    chk(rdata[7:0] == 8'd5, "disarmed receiver does not count");
    // latency: req rise -> in_port sync (2) + ack (1) -> out_port sync (2)
    do_cmd(CMD_LAT_TEST, 16'h0);
    chk(rlen == 8 && rdata >= 24'd4 && rdata <= 24'd7, $sformatf("latency %0d", rdata));
    chk(last_rx == 8'h5A, "latency word received");
    // injection from the test extension
    @(negedge clk); inj_valid = 1; inj_data = 8'hE1;
    while (!inj_ready) @(posedge clk);
    @(negedge clk); inj_valid = 0;
    repeat (12) @(posedge clk);
    chk(last_rx == 8'hE1, "injected word received");
    // user traffic passes when no test runs
    begin
      int n0;
      n0 = usr_rx_n;
      @(negedge clk); usr_tx_valid = 1; usr_tx_data = 8'h77;
      while (!usr_tx_ready) @(posedge clk);
      @(negedge clk); usr_tx_valid = 0;
      repeat (12) @(posedge clk);
      chk(usr_rx_n == n0 + 1 && usr_last == 8'h77, "user word passed through");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
