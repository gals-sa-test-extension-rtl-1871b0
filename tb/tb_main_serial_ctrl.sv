// Self-checking testbench for main_serial_ctrl. A monitor records every
// command frame on serTxEn/serTxData; a behavioural target then answers with
// a response frame of random status and length after a random delay. The
// testbench checks the bits of each frame (addr, cmd and the data length
// chosen from the intrinsic table, from ext_len or from forced_len), the
// decoded response, the frame duration in serClk cycles, and the timeout.
module tb_main_serial_ctrl;
  import galssa_pkg::*;
  logic serClk = 0, rst_n = 0;
  logic start = 0; logic [ADDR_W-1:0] addr = '0; logic [CMD_W-1:0] cmd = '0;
  logic [DMAX-1:0] data = '0; logic force_len = 0; logic [5:0] forced_len = '0;
  logic ext_en = 0, busy, done, timeout;
  logic [STAT_W-1:0] resp_status; logic [5:0] resp_bits; logic [RMAX-1:0] resp_data;
  logic [CMD_W-1:0] ext_cmd; logic [5:0] ext_len;
  logic serTxEn, serTxData, serRxEn = 0, serRxData = 0;
  int checks = 0, failures = 0;
  bit responder_on = 1;
  // captured frame
  logic [63:0] cap; int cap_n; int en_cycles;
  // response the target sends
  logic [STAT_W-1:0] r_st; int r_len; logic [RMAX-1:0] r_dat;

  main_serial_ctrl #(.TIMEOUT(60)) dut (.*);
  assign ext_len = (ext_cmd == 4'hA) ? 6'd12 : 6'd3;  // test values only
  always #5 serClk = ~serClk;

  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // monitor + behavioural target
  always begin
    @(posedge serClk);
    if (rst_n && serTxEn) begin
      cap = '0; cap_n = 0;
      while (serTxEn) begin cap = {cap[62:0], serTxData}; cap_n++; @(posedge serClk); end
      if (responder_on) begin
        repeat (1 + $urandom % 10) @(negedge serClk);
        for (int i = r_len + STAT_W - 1; i >= 0; i--) begin
          serRxEn = 1; serRxData = (i >= r_len) ? r_st[i - r_len] : r_dat[i];
          @(negedge serClk);
        end
        serRxEn = 0; serRxData = 0;
      end
    end
  end

  task automatic run(input logic [3:0] a, input logic [3:0] c, input logic [15:0] d,
                     input int exp_len, input bit fl = 0, input int flen = 0);
    logic [63:0] expf;
    r_st = 2'($urandom); r_len = $urandom % (RMAX + 1); r_dat = RMAX'($urandom);
    if (r_len < RMAX) r_dat &= (RMAX'(1) << r_len) - 1;
    @(negedge serClk);
    addr = a; cmd = c; data = d; force_len = fl; forced_len = 6'(flen); start = 1;
    @(negedge serClk); start = 0;
    while (!done) @(posedge serClk);
    #1;
    expf = {a, c};
    for (int i = exp_len - 1; i >= 0; i--) expf = {expf[62:0], d[i]};
    chk(cap_n == 8 + exp_len, $sformatf("cmd %h frame length %0d expected %0d", c, cap_n, 8 + exp_len));
    chk(cap == expf, $sformatf("cmd %h frame bits %h expected %h", c, cap, expf));
    chk(!timeout && resp_status == r_st && resp_bits == 6'(r_len) && resp_data == r_dat,
        $sformatf("response st %0d/%0d bits %0d/%0d data %h/%h", resp_status, r_st,
                  resp_bits, r_len, resp_data, r_dat));
  endtask

  initial begin
    repeat (3) @(posedge serClk); rst_n = 1;
    repeat (2) @(posedge serClk);
    chk(!busy && !serTxEn, "idle after reset");
    run(4'h2, CMD_STATUS,  16'h0000, 0);
    run(4'h1, CMD_CLK_CFG, 16'h00A7, 8);
    run(4'h3, CMD_FUNC_TX, 16'h5C21, 16);
    run(4'h0, CMD_RX_ARM,  16'h0099, 8);
    run(4'h7, CMD_LAT_TEST, 16'hFFFF, 0);
    ext_en = 0;
    run(4'h1, 4'hA, 16'h0FFF, 0);     // extension disabled: header only
    ext_en = 1;
    run(4'h1, 4'hA, 16'h0ABC, 12);    // length from the extension input
    run(4'h1, 4'h9, 16'h0005, 3);
    run(4'h2, CMD_CLK_CFG, 16'h1234, 5, 1, 5);  // forced length
    for (int i = 0; i < 20; i++) begin
      logic [3:0] c;
      c = 4'($urandom % 6);
      run(4'($urandom), c, 16'($urandom), intr_len(c));
    end
    // frame duration: start sampled, then 8+len cycles of serTxEn
    begin
      int n = 0;
      @(negedge serClk); addr = 1; cmd = CMD_FUNC_TX; data = 16'hBEEF; force_len = 0; start = 1;
      @(negedge serClk); start = 0;
      while (!serTxEn) @(negedge serClk);
      while (serTxEn) begin n++; @(negedge serClk); end
      chk(n == 24, $sformatf("serTxEn high %0d cycles", n));
      while (!done) @(posedge serClk);
    end
    // timeout: no response
    responder_on = 0;
    @(negedge serClk); cmd = CMD_STATUS; start = 1; @(negedge serClk); start = 0;
    begin
      int n = 0;
      while (!done) begin @(posedge serClk); n++; end
      #1 chk(timeout, "timeout flagged");
      chk(n >= 60 && n <= 75, $sformatf("timeout after %0d cycles", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
