// out_port: output port controller of the asynchronous wrapper. It sends one
// word over a 4-phase bundled-data channel: the word is placed on data_o,
// one cycle later req_o rises; when ack (synchronised) is seen high req_o
// falls; when ack is seen low again the port is ready for the next word.
//
// Interface: the local side offers a word with valid/data and it is taken in
// the cycle valid && ready. ack_seen pulses for one cycle when the rising ack
// is observed (used by the latency test); done pulses when the 4-phase cycle
// has completed. req_up is high while req_o is high.
//
// The document names the 4-phase bundled-data protocol and the port
// controller (Figs. 1 and 3). Its port controllers are asynchronous state
// machines working with a pausable local clock; this one is a synchronous
// state machine with a two-flop synchroniser on ack, which is this design's
// choice and adds two local cycles of latency per transition.
module out_port
  import galssa_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            valid,
  input  logic [CH_W-1:0] data,
  output logic            ready,
  output logic            ack_seen,
  output logic            done,
  output logic            req_up,
  // channel side
  output logic            req_o,
  output logic [CH_W-1:0] data_o,
  input  logic            ack_i
);
  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_WAIT_H, S_WAIT_L} st_e;
  st_e  st;
  logic ack_s;

  sync2 u_sync_ack (.clk, .rst_n, .d(ack_i), .q(ack_s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      req_o    <= 1'b0;
      data_o   <= '0;
      ack_seen <= 1'b0;
      done     <= 1'b0;
    end else begin
      ack_seen <= 1'b0;
      done     <= 1'b0;
      unique case (st)
        S_IDLE:   if (valid) begin data_o <= data; st <= S_SETUP; end
        S_SETUP:  begin req_o <= 1'b1; st <= S_WAIT_H; end
        S_WAIT_H: if (ack_s) begin req_o <= 1'b0; ack_seen <= 1'b1; st <= S_WAIT_L; end
        S_WAIT_L: if (!ack_s) begin done <= 1'b1; st <= S_IDLE; end
        default:  st <= S_IDLE;
      endcase
    end
  end

  assign ready  = (st == S_IDLE);
  assign req_up = req_o;

  // 4-phase rule: req only falls after ack was seen high.
  a_req_fall: assert property (@(posedge clk) disable iff (!rst_n)
                               $fell(req_o) |-> $past(ack_s));
endmodule
