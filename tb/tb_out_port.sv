// Self-checking testbench for out_port. A behavioural 4-phase receiver
// answers req with ack after a random delay and records the bundled data at
// the moment req rises. Checks: every word offered arrives in order, req
// only falls after ack, ready/done/ack_seen behave, and the cycle count of a
// transfer with a fixed ack delay.
module tb_out_port;
  import galssa_pkg::*;
  logic clk = 0, rst_n = 0;
  logic valid = 0; logic [CH_W-1:0] data = '0;
  logic ready, ack_seen, done, req_up, req_o, ack_i = 0;
  logic [CH_W-1:0] data_o;
  int checks = 0, failures = 0;
  int ack_delay = 3;
  logic [CH_W-1:0] got[$];

  out_port dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // behavioural receiver
  always @(posedge req_o) begin
    got.push_back(data_o);
    repeat (ack_delay) @(posedge clk);
    ack_i = 1;
    wait (!req_o);
    repeat (ack_delay) @(posedge clk);
    ack_i = 0;
  end
  always @(negedge req_o) if (rst_n) chk(ack_i == 1, "req fell before ack");

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [CH_W-1:0] sent[$];
    int t0, n_seen, n_done;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    chk(ready && !req_o, "idle after reset");
    for (int i = 0; i < 20; i++) begin
      ack_delay = 1 + ($urandom % 5);
      @(negedge clk); valid = 1; data = 8'($urandom);
      sent.push_back(data);
      @(posedge clk); while (!ready) @(posedge clk);
      @(negedge clk); valid = 0;
      n_seen = 0; n_done = 0;
      while (!ready) begin @(posedge clk); n_seen += ack_seen; n_done += done; end
      chk(n_seen == 1 && n_done == 1, "one ack_seen and one done per word");
    end
    repeat (5) @(posedge clk);
    chk(got.size() == 20, "word count");
    foreach (sent[i]) if (i < got.size()) chk(got[i] == sent[i], $sformatf("word %0d", i));
    // timing: fixed ack delay of 2 cycles. Cycle 0 word taken, 1 req rises,
    // ack rises 2 cycles later, +2 synchroniser, +1 req falls ...
    ack_delay = 2;
    @(negedge clk); valid = 1; data = 8'hC3;
    @(posedge clk); t0 = 0; @(negedge clk); valid = 0;
    while (!done) begin @(posedge clk); t0++; end
    chk(t0 >= 10 && t0 <= 13, $sformatf("4-phase cycle took %0d cycles", t0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
