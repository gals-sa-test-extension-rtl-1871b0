// Testbench for the local_clock_gen behavioural model: measures the clock
// period for several calibration codes against 2*(BASE_HALF_T + cal*STEP_T),
// and checks that the clock stops while en is low.
module tb_local_clock_gen;
  import galssa_pkg::*;
  logic en = 1; logic [CAL_W-1:0] cal = 8'd0; logic clk;
  int checks = 0, failures = 0;
  local_clock_gen #(.BASE_HALF_T(4), .STEP_T(1)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    realtime t0, t1;
    for (int c = 0; c < 40; c += 7) begin
      cal = 8'(c);
      repeat (3) @(posedge clk);
      t0 = $realtime; repeat (10) @(posedge clk); t1 = $realtime;
      chk((t1 - t0) == 10.0 * 2 * (4 + c), $sformatf("cal %0d period %f", c, (t1 - t0) / 10));
    end
    en = 0; repeat (2) #100;
    t0 = $realtime; #500;
    chk(clk == 0, "clock low when disabled");
    fork begin @(posedge clk); chk(0, "edge while disabled"); end join_none
    #500 disable fork;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
