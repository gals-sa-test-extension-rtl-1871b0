// Testbench for main_serial_ext: every command code is applied and the data
// length compared with the extended-frame length table (8 bits for the user
// pattern command, 0 for signature read-back and for everything else).
module tb_main_serial_ext;
  import galssa_pkg::*;
  logic [CMD_W-1:0] ext_cmd; logic [5:0] ext_len;
  int checks = 0, failures = 0;
  main_serial_ext dut (.*);
  initial begin
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int c = 0; c < 16; c++) begin
      int exp_len;
      ext_cmd = CMD_W'(c); #1;
      exp_len = (c == 8) ? 8 : 0;
      checks++;
      if (ext_len != 6'(exp_len)) begin
        failures++; $display("FAIL: cmd %0d len %0d expected %0d", c, ext_len, exp_len);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
