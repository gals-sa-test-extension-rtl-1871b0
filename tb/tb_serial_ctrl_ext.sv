// Self-checking testbench for serial_ctrl_ext. It issues extended commands
// as the local serial interface would (ext_start with cmd, data and length),
// plays a behavioural test extension behind the req/ack handshake, captures
// the serialised response on rx_en/rx_data and checks it against the
// expected frame: {ST_OK, data} for good commands, ST_BAD_CMD and
// ST_BAD_LEN otherwise, with done one cycle after the last bit.
module tb_serial_ctrl_ext;
  import galssa_pkg::*;
  logic serClk = 0, rst_n = 0;
  logic ext_start = 0; logic [CMD_W-1:0] ext_cmd = '0; logic [DMAX-1:0] ext_data = '0;
  logic [5:0] ext_len = '0; logic rx_en, rx_data, done;
  logic te_req; logic [CMD_W-1:0] te_cmd; logic [DMAX-1:0] te_data;
  logic te_ack = 0; logic [5:0] te_rlen = '0; logic [RMAX-1:0] te_rdata = '0;
  int checks = 0, failures = 0, reqs = 0;
  logic [CMD_W-1:0] seen_cmd; logic [DMAX-1:0] seen_data;

  serial_ctrl_ext dut (.*);
  always #5 serClk = ~serClk;

  always @(posedge te_req) begin
    reqs++; seen_cmd = te_cmd; seen_data = te_data;
    repeat (2 + $urandom % 5) @(posedge serClk);
    if (te_cmd == CMD_EXT_SIGREAD) begin te_rlen = 24; te_rdata = 24'hA1B2C3; end
    else begin te_rlen = 0; te_rdata = '0; end
    te_ack = 1; wait (!te_req); repeat (2) @(posedge serClk); te_ack = 0;
  end

  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input logic [3:0] c, input logic [15:0] d, input int l,
                     input stat_e st, input int dl, input logic [23:0] exp_d);
    logic [63:0] got = '0, e = 64'(st); int n = 0; bit done_ok;
    for (int i = dl - 1; i >= 0; i--) e = {e[62:0], exp_d[i]};
    @(negedge serClk); ext_cmd = c; ext_data = d; ext_len = 6'(l); ext_start = 1;
    @(negedge serClk); ext_start = 0;
    while (!rx_en) begin @(posedge serClk); #1; end
    while (rx_en) begin got = {got[62:0], rx_data}; n++; @(posedge serClk); #1; end
    done_ok = done;
    chk(n == dl + 2 && got == e, $sformatf("cmd %h: %0d bits %h expected %0d bits %h", c, n, got, dl + 2, e));
    chk(done_ok, "done right after the last bit");
    @(posedge serClk);
  endtask

  initial begin
    int n0;
    repeat (3) @(posedge serClk); rst_n = 1; repeat (2) @(posedge serClk);
    run(CMD_EXT_PATTERN, 16'h00D4, 8, ST_OK, 0, '0);
    chk(seen_cmd == CMD_EXT_PATTERN && seen_data == 16'h00D4, "pattern handed over");
    run(CMD_EXT_SIGREAD, 16'h0, 0, ST_OK, 24, 24'hA1B2C3);
    n0 = reqs;
    run(CMD_EXT_PATTERN, 16'h0004, 4, ST_BAD_LEN, 0, '0);
    run(4'hC, 16'h0, 0, ST_BAD_CMD, 0, '0);
    chk(reqs == n0, "errors do not reach the test extension");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
