// in_port: input port controller of the asynchronous wrapper. When the
// synchronised req of a 4-phase bundled-data channel is seen high, the word
// on data_i is latched, presented on rx_data with a one-cycle rx_valid
// pulse, and ack_o is raised; when req is seen low, ack_o falls.
//
// The receiver always accepts a word: there is no back-pressure towards the
// local module. The document names the port controller and the 4-phase
// bundled-data protocol (Figs. 1 and 3); the synchronous implementation with
// a two-flop synchroniser on req is this design's choice (see out_port).
module in_port
  import galssa_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // channel side
  input  logic            req_i,
  input  logic [CH_W-1:0] data_i,
  output logic            ack_o,
  // local side
  output logic            rx_valid,
  output logic [CH_W-1:0] rx_data
);
  logic req_s;
  sync2 u_sync_req (.clk, .rst_n, .d(req_i), .q(req_s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_o    <= 1'b0;
      rx_valid <= 1'b0;
      rx_data  <= '0;
    end else begin
      rx_valid <= 1'b0;
      if (!ack_o && req_s) begin
        rx_data  <= data_i;
        rx_valid <= 1'b1;
        ack_o    <= 1'b1;
      end else if (ack_o && !req_s) begin
        ack_o    <= 1'b0;
      end
    end
  end
endmodule
