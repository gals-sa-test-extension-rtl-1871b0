// test_ext: test extension logic, built on the programmable logic block and
// running in the block's local clock domain. It adds two channel tests to
// the intrinsic ones:
//  * CMD_EXT_PATTERN: the user-selected 8-bit pattern in the command data is
//    sent over the asynchronous channel through the test module's injection
//    port (instead of the intrinsic pseudorandom series). The command is
//    complete when the output port has taken the word; no response data.
//  * CMD_EXT_SIGREAD: returns the receiver signature computed by the
//    functional test and the last word received (24 bits: {sig, last_rx}),
//    so that failing values can be observed during debug.
// Command interface: 4-phase level handshake from serial_ctrl_ext (req is
// synchronised here, ack returns with rlen/rdata stable until req falls).
//
// The two tests follow the document; the encodings, widths and the
// completion rule are this design's choices.
module test_ext
  import galssa_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             te_req,
  input  logic [CMD_W-1:0] te_cmd,
  input  logic [DMAX-1:0]  te_data,
  output logic             te_ack,
  output logic [5:0]       te_rlen,
  output logic [RMAX-1:0]  te_rdata,
  // towards the test module
  output logic             inj_valid,
  output logic [CH_W-1:0]  inj_data,
  input  logic             inj_ready,
  input  logic [SIG_W-1:0] sig,
  input  logic [CH_W-1:0]  last_rx
);
  typedef enum logic [1:0] {X_IDLE, X_INJ, X_ACK} xst_e;
  xst_e st;
  logic req_s;

  sync2 u_sync_req (.clk, .rst_n, .d(te_req), .q(req_s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= X_IDLE;
      te_ack    <= 1'b0;
      te_rlen   <= '0;
      te_rdata  <= '0;
      inj_valid <= 1'b0;
      inj_data  <= '0;
    end else begin
      unique case (st)
        X_IDLE: if (req_s && !te_ack) begin
          te_rlen  <= '0;
          te_rdata <= '0;
          if (te_cmd == CMD_EXT_PATTERN) begin
            inj_valid <= 1'b1;
            inj_data  <= te_data[CH_W-1:0];
            st        <= X_INJ;
          end else begin
            if (te_cmd == CMD_EXT_SIGREAD) begin
              te_rlen  <= 6'(SIG_W + CH_W);
              te_rdata <= {sig, last_rx};
            end
            st <= X_ACK;
          end
        end
        X_INJ: if (inj_ready) begin
          inj_valid <= 1'b0;
          st        <= X_ACK;
        end
        X_ACK: begin
          te_ack <= 1'b1;
          if (te_ack && !req_s) begin
            te_ack <= 1'b0;
            st     <= X_IDLE;
          end
        end
        default: st <= X_IDLE;
      endcase
    end
  end
endmodule
