// Self-checking testbench for local_serial_ctrl. The testbench plays the
// previous interface (sends command frames), the next interface (injects
// response traffic to be forwarded), a behavioural test module (answers the
// req/ack handshake with a random result after a delay) and a behavioural
// serial control extension (answers ext_start with a fixed bit string).
// Checks: the handshake fields, the response frames for good commands and
// for each error status, no response for another module's address, the
// extension pass-through and output selection, and one-cycle forwarding.
module tb_local_serial_ctrl;
  import galssa_pkg::*;
  logic serClk = 0, rst_n = 0;
  logic [ADDR_W-1:0] my_addr = 4'd3; logic is_last = 1, ext_en = 0;
  logic serTxEn_i = 0, serTxData_i = 0, serRxEn_o, serRxData_o;
  logic serTxEn_o, serTxData_o, serRxEn_i = 0, serRxData_i = 0;
  logic tm_req; logic [CMD_W-1:0] tm_cmd; logic [DMAX-1:0] tm_data;
  logic tm_ack = 0; logic [5:0] tm_rlen = '0; logic [RMAX-1:0] tm_rdata = '0;
  logic ext_start; logic [CMD_W-1:0] ext_cmd; logic [DMAX-1:0] ext_data; logic [5:0] ext_len;
  logic ext_rx_en = 0, ext_rx_data = 0, ext_done = 0;
  int checks = 0, failures = 0;
  logic [63:0] resp; int resp_n;
  int tm_reqs = 0, ext_starts = 0;
  logic [CMD_W-1:0] seen_cmd; logic [DMAX-1:0] seen_data; logic [5:0] seen_len;
  logic [RMAX-1:0] r_dat; int r_len;

  local_serial_ctrl dut (.*);
  logic pTxEn, pTxD, pRxD;   // inputs as sampled at the last edge
  always @(posedge serClk) begin pTxEn <= serTxEn_i; pTxD <= serTxData_i; pRxD <= serRxData_i; end
  always #5 serClk = ~serClk;

  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // behavioural test module
  always @(posedge tm_req) begin
    tm_reqs++; seen_cmd = tm_cmd; seen_data = tm_data;
    repeat (3 + $urandom % 6) @(posedge serClk);
    tm_rlen = 6'(r_len); tm_rdata = r_dat; tm_ack = 1;
    wait (!tm_req);
    repeat (2) @(posedge serClk); tm_ack = 0;
  end
  // behavioural serial control extension: 5-bit answer 10110
  always @(posedge serClk) if (rst_n && ext_start) begin
    ext_starts++; seen_cmd = ext_cmd; seen_data = ext_data; seen_len = ext_len;
    repeat (4) @(negedge serClk);
    for (int i = 4; i >= 0; i--) begin
      ext_rx_en = 1; ext_rx_data = 5'b10110 >> i; @(negedge serClk);
    end
    ext_rx_en = 0; ext_rx_data = 0; @(negedge serClk);
    ext_done = 1; @(negedge serClk); ext_done = 0;
  end

  task automatic send(input logic [3:0] a, input logic [3:0] c, input logic [15:0] d, input int dl);
    logic [23:0] f = 24'({a, c}) << dl;
    f |= 24'(d & ((17'd1 << dl) - 1));   // header, then the low dl data bits
    for (int i = dl + 7; i >= 0; i--) begin
      @(negedge serClk); serTxEn_i = 1; serTxData_i = f[i];
    end
    @(negedge serClk); serTxEn_i = 0; serTxData_i = 0;
  endtask

  // collect one response frame; n = 0 if none within limit cycles
  task automatic collect(input int limit);
    resp = '0; resp_n = 0;
    #1;
    for (int i = 0; i < limit && !serRxEn_o; i++) begin @(posedge serClk); #1; end
    while (serRxEn_o) begin resp = {resp[62:0], serRxData_o}; resp_n++; @(posedge serClk); #1; end
  endtask

  task automatic expect_resp(input stat_e st, input int dl, input logic [RMAX-1:0] d, string what);
    logic [63:0] e = 64'(st);
    for (int i = dl - 1; i >= 0; i--) e = {e[62:0], d[i]};
    collect(200);
    chk(resp_n == dl + 2 && resp == e,
        $sformatf("%s: got %0d bits %h, expected %0d bits %h", what, resp_n, resp, dl + 2, e));
  endtask

  initial begin
    int n0;
    repeat (3) @(posedge serClk); rst_n = 1; repeat (2) @(posedge serClk);
    // good intrinsic commands
    r_len = 0; r_dat = '0; n0 = tm_reqs;
    send(4'd3, CMD_STATUS, 16'h0, 0);
    expect_resp(ST_OK, 0, '0, "status");
    chk(tm_reqs == n0 + 1 && seen_cmd == CMD_STATUS, "status reaches test module");
    r_len = 8; r_dat = 24'h0000C5;
    send(4'd3, CMD_FUNC_TX, 16'hA503, 16);
    expect_resp(ST_OK, 8, r_dat, "func_tx");
    chk(seen_cmd == CMD_FUNC_TX && seen_data == 16'hA503, "func_tx fields");
    r_len = 9; r_dat = 24'h00017F;
    send(4'd3, CMD_RX_CHECK, 16'h0, 0);
    expect_resp(ST_OK, 9, r_dat, "rx_check");
    r_len = 0;
    send(4'd3, CMD_CLK_CFG, 16'h0033, 8);
    expect_resp(ST_OK, 0, '0, "clk_cfg");
    chk(seen_data == 16'h0033, "clk_cfg data right aligned");
    // errors
    n0 = tm_reqs;
    send(4'd3, CMD_CLK_CFG, 16'h0013, 5);
    expect_resp(ST_BAD_LEN, 0, '0, "bad length");
    send(4'd3, 4'h7, 16'h0, 0);
    expect_resp(ST_BAD_CMD, 0, '0, "unknown command");
    send(4'd3, CMD_EXT_PATTERN, 16'h0055, 8);
    expect_resp(ST_BAD_CMD, 0, '0, "extension disabled");
    send(4'd9, CMD_STATUS, 16'h0, 0);
    expect_resp(ST_BAD_ADDR, 0, '0, "non-existent module");
    chk(tm_reqs == n0, "no test module access on errors");
    send(4'd1, CMD_STATUS, 16'h0, 0);
    collect(60);
    chk(resp_n == 0, "no answer for another module");
    is_last = 0;
    send(4'd9, CMD_STATUS, 16'h0, 0);
    collect(60);
    chk(resp_n == 0, "only the last module answers bad addresses");
    // extension
    ext_en = 1; n0 = ext_starts;
    send(4'd3, CMD_EXT_PATTERN, 16'h00E7, 8);
    collect(200);
    chk(resp_n == 5 && resp == 64'b10110, $sformatf("extension response %0d bits %b", resp_n, resp));
    chk(ext_starts == n0 + 1 && seen_cmd == CMD_EXT_PATTERN && seen_data == 16'h00E7 && seen_len == 8,
        "extension fields");
    send(4'd3, CMD_STATUS, 16'h0, 0);
    expect_resp(ST_OK, 0, '0, "intrinsic with extension enabled");
    // forwarding: command bus, then response bus from the next interface
    begin
      bit ok = 1;
      fork
        send(4'd5, CMD_FUNC_TX, 16'h1234, 16);
        for (int i = 0; i < 30; i++) begin
          @(posedge serClk); #1;
          if (serTxEn_o !== pTxEn || serTxData_o !== pTxD) ok = 0;
        end
      join
      chk(ok, "command bus forwarded with one cycle delay");
      ok = 1;
      for (int i = 0; i < 20; i++) begin
        @(negedge serClk); serRxEn_i = 1; serRxData_i = 1'($urandom);
        @(posedge serClk); #1;
        if (serRxEn_o !== 1'b1 || serRxData_o !== pRxD) ok = 0;
      end
      @(negedge serClk); serRxEn_i = 0;
      chk(ok, "response bus forwarded with one cycle delay");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
