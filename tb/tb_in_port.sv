// Self-checking testbench for in_port. A behavioural 4-phase sender drives
// random words with random timing; the testbench checks that each word is
// delivered once with rx_valid, that ack follows req in both phases, and the
// latency from req to ack (two synchroniser cycles plus one).
module tb_in_port;
  import galssa_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_i = 0; logic [CH_W-1:0] data_i = '0;
  logic ack_o, rx_valid; logic [CH_W-1:0] rx_data;
  int checks = 0, failures = 0;
  logic [CH_W-1:0] got[$];

  in_port dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && rx_valid) got.push_back(rx_data);

  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [CH_W-1:0] sent[$];
    int lat;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 25; i++) begin
      repeat ($urandom % 4) @(posedge clk);
      #1 data_i = 8'($urandom); sent.push_back(data_i);
      #2 req_i = 1; lat = 0;
      while (!ack_o) begin @(posedge clk); #1 lat++; end
      chk(lat >= 2 && lat <= 3, $sformatf("req to ack %0d cycles", lat));
      #2 req_i = 0; #1 data_i = 8'($urandom);
      while (ack_o) @(posedge clk);
      #1;
    end
    repeat (3) @(posedge clk);
    chk(got.size() == 25, $sformatf("words delivered %0d", got.size()));
    foreach (sent[i]) if (i < got.size()) chk(got[i] == sent[i], $sformatf("word %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
