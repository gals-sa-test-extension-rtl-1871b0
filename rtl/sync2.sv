// sync2: two-flop synchroniser for a single-bit level crossing into the
// clk domain. Output follows the input two rising edges later; reset clears
// both flops. Used for every handshake wire that crosses between the serial
// clock and a local clock, and for the req/ack wires of the asynchronous
// channel. Helper of this design, not a block of the document.
module sync2 (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= 1'b0;
      q    <= 1'b0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
