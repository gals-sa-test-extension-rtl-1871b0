// End-to-end testbench for galssa_top at its default size (four blocks).
// The testbench acts as the chip-level host of the main serial controller:
// it issues commands over the serial chain and checks every response frame
// against values computed here (reference LFSR and MISR). Each local clock
// runs at its own speed. Every mechanism of the design is exercised and
// counted; a mechanism that never happens counts as a failure:
//   calibration of a local clock (period measured before and after),
//   functional test pass and fail across a channel (including the ring
//   channel from the last block to the first), latency test, the error
//   statuses (non-existent module, unknown command, wrong length, extension
//   disabled), user-pattern injection and signature read-back through the
//   extension, and user traffic.
module tb_galssa_top;
  import galssa_pkg::*;
  localparam int N = 4;
  logic serClk = 0, rst_n = 1, ext_en = 0;
  logic start = 0; logic [ADDR_W-1:0] addr = '0; logic [CMD_W-1:0] cmd = '0;
  logic [DMAX-1:0] data = '0; logic force_len = 0; logic [5:0] forced_len = '0;
  logic busy, done, timeout; logic [STAT_W-1:0] resp_status; logic [5:0] resp_bits;
  logic [RMAX-1:0] resp_data;
  logic [N-1:0] clk_local, usr_tx_valid = '0, usr_tx_ready, usr_rx_valid;
  logic [N-1:0][CH_W-1:0] usr_tx_data = '0, usr_rx_data;
  int checks = 0, failures = 0;
  typedef enum int {M_CAL, M_FUNC_PASS, M_FUNC_FAIL, M_RING, M_LAT, M_BAD_ADDR,
                    M_BAD_CMD, M_BAD_LEN, M_EXT_OFF, M_EXT_PATTERN, M_EXT_SIGREAD,
                    M_USER, M_COUNT} mech_e;
  int mech[M_COUNT];

  galssa_top dut (.*);
  always #10 serClk = ~serClk;

  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

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

  initial begin
    #20ms; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic host(input int a, input logic [3:0] c, input logic [15:0] d,
                      input bit fl = 0, input int flen = 0);
    @(negedge serClk);
    addr = ADDR_W'(a); cmd = c; data = d; force_len = fl; forced_len = 6'(flen); start = 1;
    @(negedge serClk); start = 0;
    while (!done) @(posedge serClk);
    #1;
  endtask

  task automatic expect_ok(string what, input int bits = -1, input logic [23:0] val = '0);
    chk(!timeout && resp_status == ST_OK && (bits < 0 || (resp_bits == 6'(bits) && resp_data == val)),
        $sformatf("%s: timeout %0d status %0d bits %0d data %h", what, timeout, resp_status, resp_bits, resp_data));
  endtask

  task automatic expect_err(stat_e st, string what);
    chk(!timeout && resp_status == st && resp_bits == 0,
        $sformatf("%s: status %0d expected %0d", what, resp_status, st));
  endtask

  task automatic period(input int n, output realtime p);
    realtime t0;
    @(posedge clk_local[n]); t0 = $realtime;
    repeat (8) @(posedge clk_local[n]);
    p = ($realtime - t0) / 8;
  endtask

  // functional test from block s to block s+1 (mod N)
  task automatic func_test(input int s, input logic [7:0] seed_tx, input logic [7:0] seed_rx,
                           input int cnt);
    int r = (s + 1) % N;
    logic [7:0] p; logic [15:0] sg;
    bit pass;
    host(r, CMD_RX_ARM, {8'h00, seed_rx});
    expect_ok("rx_arm", 0, '0);
    host(s, CMD_FUNC_TX, {seed_tx, 8'(cnt)});
    expect_ok("func_tx", 8, 24'(cnt));
    pass = (seed_tx == seed_rx);
    host(r, CMD_RX_CHECK, 16'h0);
    expect_ok("rx_check", 9, {15'd0, pass, 8'(cnt)});
    if (!timeout && resp_status == ST_OK) begin
      if (resp_data[8]) mech[M_FUNC_PASS]++; else mech[M_FUNC_FAIL]++;
      if (s == N - 1) mech[M_RING]++;
    end
    // the extension reads back the receiver signature
    ext_en = 1;
    host(r, CMD_EXT_SIGREAD, 16'h0);
    p = seed_tx; sg = '0;
    for (int i = 0; i < cnt; i++) begin sg = ref_misr(sg, p); p = ref_lfsr(p); end
    expect_ok("sigread", 24, {sg, ref_last(seed_tx, cnt)});
    if (resp_status == ST_OK && resp_data[23:8] == sg) mech[M_EXT_SIGREAD]++;
    ext_en = 0;
  endtask

  function automatic logic [7:0] ref_last(logic [7:0] seed, int cnt);
    logic [7:0] p = seed;
    for (int i = 1; i < cnt; i++) p = ref_lfsr(p);
    return p;
  endfunction

  initial begin
    realtime p0, p1;
    // assert reset long enough for the slowest possible local clock to see it
    #1 rst_n = 0;
    #2us rst_n = 1;
    repeat (4) @(posedge serClk);
    // every block answers a status request
    for (int i = 0; i < N; i++) begin host(i, CMD_STATUS, 16'h0); expect_ok($sformatf("status %0d", i), 0, '0); end
    // clock calibration of block 2
    period(2, p0);
    host(2, CMD_CLK_CFG, 16'h0040);
    expect_ok("clk_cfg", 0, '0);
    repeat (4) @(posedge clk_local[2]);
    period(2, p1);
    chk(p0 == 2.0 * (4 + 26) && p1 == 2.0 * (4 + 64), $sformatf("periods %f -> %f", p0, p1));
    if (p1 == 2.0 * (4 + 64)) mech[M_CAL]++;
    // functional tests
    func_test(0, 8'h3C, 8'h3C, 20);
    func_test(1, 8'h01, 8'h01, 255);
    func_test(2, 8'h77, 8'h78, 9);
    func_test(3, 8'hA5, 8'hA5, 16);     // ring channel back to block 0
    // latency
    for (int i = 0; i < N; i++) begin
      host(i, CMD_LAT_TEST, 16'h0);
      expect_ok("latency");
      chk(resp_bits == 8 && resp_data > 0 && resp_data < 24'd20, $sformatf("latency %0d", resp_data));
      if (resp_status == ST_OK && resp_data > 0) mech[M_LAT]++;
    end
    // error statuses
    host(9, CMD_STATUS, 16'h0);           expect_err(ST_BAD_ADDR, "bad address"); mech[M_BAD_ADDR] += resp_status == ST_BAD_ADDR;
    host(1, 4'h6, 16'h0);                 expect_err(ST_BAD_CMD, "bad command");  mech[M_BAD_CMD]  += resp_status == ST_BAD_CMD;
    host(2, CMD_FUNC_TX, 16'h0003, 1, 4); expect_err(ST_BAD_LEN, "bad length");   mech[M_BAD_LEN]  += resp_status == ST_BAD_LEN;
    host(0, CMD_EXT_PATTERN, 16'h0033);   expect_err(ST_BAD_CMD, "ext off");      mech[M_EXT_OFF]  += resp_status == ST_BAD_CMD;
    // user patterns through the extension, checked at the receiver
    ext_en = 1;
    host(2, CMD_RX_ARM, 16'h0001);
    begin
      logic [15:0] sg; logic [7:0] pats[4];
      sg = '0; pats = '{8'h00, 8'hFF, 8'h55, 8'hAA};
      foreach (pats[k]) begin
        host(1, CMD_EXT_PATTERN, {8'h00, pats[k]});
        expect_ok("ext pattern", 0, '0);
        sg = ref_misr(sg, pats[k]);
      end
      host(2, CMD_EXT_SIGREAD, 16'h0);
      expect_ok("sigread after user patterns", 24, {sg, 8'hAA});
      if (resp_status == ST_OK && resp_data == {sg, 8'hAA}) mech[M_EXT_PATTERN]++;
    end
    host(2, CMD_RX_CHECK, 16'h0);
    expect_ok("user patterns fail the PRBS check", 9, {15'd0, 1'b0, 8'd4});
    host(1, CMD_EXT_PATTERN, 16'h0033, 1, 5);
    expect_err(ST_BAD_LEN, "ext bad length");
    ext_en = 0;
    // user traffic: block 3 -> block 0 over the ring channel
    begin
      int got; got = 0;
      fork
        begin
          @(negedge clk_local[3]); usr_tx_valid[3] = 1; usr_tx_data[3] = 8'hC9;
          @(posedge clk_local[3]); while (!usr_tx_ready[3]) @(posedge clk_local[3]);
          @(negedge clk_local[3]); usr_tx_valid[3] = 0;
        end
        begin
          while (!(usr_rx_valid[0])) @(posedge clk_local[0]);
          got = usr_rx_data[0];
        end
      join
      chk(got == 8'hC9, $sformatf("user word %h", got));
      if (got == 8'hC9) mech[M_USER]++;
    end
    // mechanisms
    foreach (mech[m]) begin
      chk(mech[m] > 0, $sformatf("mechanism %s never happened", mech_e'(m)));
      $display("mechanism %-14s %0d", mech_e'(m), mech[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
