// serial_ctrl_ext: serial control extension, built on the programmable logic
// block rather than in the intrinsic test layer. It runs on serClk.
//
// On ext_start the local serial interface hands over an extended command,
// its right-aligned data and the number of data bits received. The extension
// checks the command (ST_BAD_CMD if it does not implement it) and the length
// (ST_BAD_LEN), otherwise passes cmd/data to the test extension over a
// 4-phase req/ack handshake into the local clock domain and takes the result
// (te_rlen bits of te_rdata). It then serialises its own response frame,
// status first, MSB first, on rx_en/rx_data, and pulses done one cycle after
// the last bit.
//
// That the extension composes and serialises its own response frame, so the
// intrinsic serialiser need not grow, follows the document (Fig. 7 'out'
// register in the extension). The handshake and encodings are this design's.
module serial_ctrl_ext
  import galssa_pkg::*;
(
  input  logic             serClk,
  input  logic             rst_n,
  // from the local serial interface
  input  logic             ext_start,
  input  logic [CMD_W-1:0] ext_cmd,
  input  logic [DMAX-1:0]  ext_data,
  input  logic [5:0]       ext_len,
  output logic             rx_en,
  output logic             rx_data,
  output logic             done,
  // to the test extension (local clock domain)
  output logic             te_req,
  output logic [CMD_W-1:0] te_cmd,
  output logic [DMAX-1:0]  te_data,
  input  logic             te_ack,
  input  logic [5:0]       te_rlen,
  input  logic [RMAX-1:0]  te_rdata
);
  localparam int unsigned OW = STAT_W + RMAX;
  typedef enum logic [2:0] {E_IDLE, E_REQ, E_REL, E_SEND, E_DONE} est_e;
  est_e          st;
  logic [OW-1:0] osr;
  logic [5:0]    ocnt;
  logic          ack_s;

  sync2 u_sync_ack (.clk(serClk), .rst_n, .d(te_ack), .q(ack_s));

  always_ff @(posedge serClk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= E_IDLE;
      osr     <= '0;
      ocnt    <= '0;
      rx_en   <= 1'b0;
      rx_data <= 1'b0;
      done    <= 1'b0;
      te_req  <= 1'b0;
      te_cmd  <= '0;
      te_data <= '0;
    end else begin
      done  <= 1'b0;
      rx_en <= 1'b0;
      unique case (st)
        E_IDLE: if (ext_start) begin
          if (!ext_known(ext_cmd)) begin
            osr <= {ST_BAD_CMD, RMAX'(0)}; ocnt <= 6'(STAT_W); st <= E_SEND;
          end else if (ext_len != 6'(ext_dlen(ext_cmd))) begin
            osr <= {ST_BAD_LEN, RMAX'(0)}; ocnt <= 6'(STAT_W); st <= E_SEND;
          end else begin
            te_cmd  <= ext_cmd;
            te_data <= ext_data;
            te_req  <= 1'b1;
            st      <= E_REQ;
          end
        end
        E_REQ: if (ack_s) begin
          te_req <= 1'b0;
          osr    <= {ST_OK, te_rdata << (6'(RMAX) - te_rlen)};
          ocnt   <= te_rlen + 6'(STAT_W);
          st     <= E_REL;
        end
        E_REL: if (!ack_s) st <= E_SEND;
        E_SEND: begin
          rx_en   <= 1'b1;
          rx_data <= osr[OW-1];
          osr     <= {osr[OW-2:0], 1'b0};
          ocnt    <= ocnt - 6'd1;
          if (ocnt == 6'd1) st <= E_DONE;
        end
        E_DONE: begin done <= 1'b1; st <= E_IDLE; end
        default: st <= E_IDLE;
      endcase
    end
  end
endmodule
