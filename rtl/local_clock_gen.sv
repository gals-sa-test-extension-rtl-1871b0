// local_clock_gen: behavioural model of the local clock generator of a GALS
// wrapper. It is not synthesisable logic: the real part is a calibrated
// oscillator (ring oscillator or similar) built in the platform's intrinsic
// layer. The model produces a free-running clock whose half period is
// BASE_HALF_T + cal * STEP_T time units, where cal is the calibration code
// written over the serial link. The clock runs while en is high and stops low
// while en is low. The delay is never zero as long as BASE_HALF_T > 0.
//
// The document states only that local clock generators exist in every
// wrapper and are calibrated through the serial link; the period law, the
// enable and the code width are this design's own.
module local_clock_gen
  import galssa_pkg::*;
#(
  parameter int unsigned BASE_HALF_T = 4,
  parameter int unsigned STEP_T      = 1
) (
  input  logic             en,
  input  logic [CAL_W-1:0] cal,
  output logic             clk
);
  initial clk = 1'b0;
  always begin
    #(BASE_HALF_T + int'(cal) * STEP_T);
    clk = en ? ~clk : 1'b0;
  end
endmodule
