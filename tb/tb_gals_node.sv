// Self-checking testbench for gals_node. One block is tested alone: its
// channel output is looped back to its own input, it is the last (and only)
// block of the chain, and the testbench sends frames bit by bit as the main
// serial controller would and reads the response frames. Checks: status,
// calibration (local clock period), a loop-back functional test with the
// signature read back through the extension, latency, the error statuses
// and the extension enable.
module tb_gals_node;
  import galssa_pkg::*;
  logic serClk = 0, rst_n = 1, ext_en = 0;
  logic serTxEn_i = 0, serTxData_i = 0, serRxEn_o, serRxData_o, serTxEn_o, serTxData_o;
  logic ch_req, ch_ack; logic [CH_W-1:0] ch_data;
  logic clk_local, usr_tx_ready, usr_rx_valid; logic [CH_W-1:0] usr_rx_data;
  int checks = 0, failures = 0;
  logic [63:0] resp; int resp_n;

  gals_node #(.CAL_RESET(8'd10)) dut (
    .serClk, .rst_n, .my_addr(4'd0), .is_last(1'b1), .ext_en,
    .serTxEn_i, .serTxData_i, .serRxEn_o, .serRxData_o, .serTxEn_o, .serTxData_o,
    .serRxEn_i(1'b0), .serRxData_i(1'b0),
    .ch_in_req(ch_req), .ch_in_data(ch_data), .ch_in_ack(ch_ack),
    .ch_out_req(ch_req), .ch_out_data(ch_data), .ch_out_ack(ch_ack),
    .clk_local, .usr_tx_valid(1'b0), .usr_tx_data(8'h00), .usr_tx_ready,
    .usr_rx_valid, .usr_rx_data);
  always #10 serClk = ~serClk;

  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [7:0] ref_lfsr(logic [7:0] s);
    logic fb = s[0];
    s = s >> 1;
    if (fb) s = s ^ 8'b1011_1000;
    return s;
  endfunction
  function automatic logic [15:0] ref_misr(logic [15:0] s, logic [7:0] d);
    logic msb = s[15];
    s = s << 1;
    if (msb) s = s ^ 16'b0001_0000_0010_0001;
    return s ^ {8'h00, d};
  endfunction

  // send a frame, collect the response (status in resp[dl+1:dl])
  task automatic frame(input logic [3:0] a, input logic [3:0] c, input logic [15:0] d, input int dl);
    logic [23:0] f;
    f = (24'({a, c}) << dl) | 24'(d & ((17'd1 << dl) - 1));
    for (int i = dl + 7; i >= 0; i--) begin @(negedge serClk); serTxEn_i = 1; serTxData_i = f[i]; end
    @(negedge serClk); serTxEn_i = 0; serTxData_i = 0;
    resp = '0; resp_n = 0;
    for (int i = 0; i < 20000 && !serRxEn_o; i++) begin @(posedge serClk); #1; end
    while (serRxEn_o) begin resp = {resp[62:0], serRxData_o}; resp_n++; @(posedge serClk); #1; end
  endtask

  task automatic expect_resp(input stat_e st, input int dl, input logic [23:0] d, string what);
    logic [63:0] e; e = 64'(st);
    for (int i = dl - 1; i >= 0; i--) e = {e[62:0], d[i]};
    chk(resp_n == dl + 2 && resp == e, $sformatf("%s: %0d bits %h expected %0d bits %h",
        what, resp_n, resp, dl + 2, e));
  endtask

  initial begin
    realtime t0, p;
    logic [7:0] pt; logic [15:0] sg;
    // assert reset long enough for the slowest possible local clock to see it
    #1 rst_n = 0;
    #2us rst_n = 1;
    repeat (4) @(posedge serClk);
    frame(0, CMD_STATUS, 0, 0);              expect_resp(ST_OK, 0, 0, "status");
    @(posedge clk_local); t0 = $realtime; repeat (4) @(posedge clk_local);
    chk(($realtime - t0) / 4 == 2.0 * (4 + 10), "reset calibration period");
    frame(0, CMD_CLK_CFG, 16'h0020, 8);      expect_resp(ST_OK, 0, 0, "clk_cfg");
    repeat (3) @(posedge clk_local);
    @(posedge clk_local); t0 = $realtime; repeat (4) @(posedge clk_local);
    chk(($realtime - t0) / 4 == 2.0 * (4 + 32), "new calibration period");
    frame(0, CMD_RX_ARM, 16'h0096, 8);       expect_resp(ST_OK, 0, 0, "rx_arm");
    frame(0, CMD_FUNC_TX, 16'h9630, 16);     expect_resp(ST_OK, 8, 24'd48, "func_tx");
    frame(0, CMD_RX_CHECK, 0, 0);            expect_resp(ST_OK, 9, {15'd0, 1'b1, 8'd48}, "rx_check");
    ext_en = 1;
    pt = 8'h96; sg = '0;
    for (int i = 0; i < 48; i++) begin sg = ref_misr(sg, pt); if (i < 47) pt = ref_lfsr(pt); end
    frame(0, CMD_EXT_SIGREAD, 0, 0);         expect_resp(ST_OK, 24, {sg, pt}, "sigread");
    frame(0, CMD_EXT_PATTERN, 16'h00C4, 8);  expect_resp(ST_OK, 0, 0, "ext pattern");
    repeat (20) @(posedge clk_local);
    frame(0, CMD_EXT_SIGREAD, 0, 0);         expect_resp(ST_OK, 24, {sg, 8'hC4}, "last word after pattern");
    frame(0, CMD_LAT_TEST, 0, 0);
    chk(resp_n == 10 && resp[9:8] == ST_OK && resp[7:0] >= 4 && resp[7:0] <= 7,
        $sformatf("latency %0d bits %h", resp_n, resp));
    frame(0, 4'hE, 0, 0);                    expect_resp(ST_BAD_CMD, 0, 0, "unknown ext cmd");
    ext_en = 0;
    frame(0, CMD_EXT_SIGREAD, 0, 0);         expect_resp(ST_BAD_CMD, 0, 0, "extension disabled");
    frame(5, CMD_STATUS, 0, 0);              expect_resp(ST_BAD_ADDR, 0, 0, "bad address");
    frame(0, CMD_RX_ARM, 16'h0003, 3);       expect_resp(ST_BAD_LEN, 0, 0, "bad length");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
