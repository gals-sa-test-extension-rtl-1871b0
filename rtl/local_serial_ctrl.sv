// local_serial_ctrl: local serial interface of one synchronous logic block.
// All of it runs on the serial clock serClk.
//
// Chain: the command bus (serTxEn/serTxData) from the previous interface is
// re-registered and passed to the next one, so every interface sees every
// frame one serClk later than its predecessor. The response bus
// (serRxEn/serRxData) from the next interface is re-registered towards the
// previous one, except while this interface sends its own response.
//
// Receive: while serTxEn is high, bits are shifted MSB first into a shift
// register. When serTxEn falls the frame is decoded: addr (4 bits), cmd
// (4 bits), and the remaining bits as right-aligned data. A frame for this
// module (addr == my_addr) is checked and then
//   * an intrinsic command is handed to the test module over a 4-phase
//     req/ack handshake into the local clock domain; on ack the result is
//     taken and the response frame {ST_OK, data} is serialised;
//   * an extended command, when ext_en is high, is passed with its data and
//     length to the serial control extension (ext_start pulse), which checks
//     it and sends its own response frame; this interface only selects the
//     extension's serial output (ext_rx_*) until ext_done;
//   * an unknown command, or an extended one with ext_en low, is answered
//     with ST_BAD_CMD, a wrong data length with ST_BAD_LEN.
// The last interface of the chain (is_last) answers ST_BAD_ADDR for an
// address above its own, so that a frame for a non-existent module still
// gets a response. Frames shorter than the header are ignored.
//
// The shift-register receiver, the pass-through of command and data to the
// extension, and the selection between intrinsic and extension serialiser
// follow the document; the chain forwarding, the addressing rule for
// non-existent modules and the handshake are this design's choices.
module local_serial_ctrl
  import galssa_pkg::*;
(
  input  logic              serClk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] my_addr,
  input  logic              is_last,
  input  logic              ext_en,
  // previous serial interface
  input  logic              serTxEn_i,
  input  logic              serTxData_i,
  output logic              serRxEn_o,
  output logic              serRxData_o,
  // next serial interface
  output logic              serTxEn_o,
  output logic              serTxData_o,
  input  logic              serRxEn_i,
  input  logic              serRxData_i,
  // test module (crosses into the local clock domain)
  output logic              tm_req,
  output logic [CMD_W-1:0]  tm_cmd,
  output logic [DMAX-1:0]   tm_data,
  input  logic              tm_ack,
  input  logic [5:0]        tm_rlen,
  input  logic [RMAX-1:0]   tm_rdata,
  // test extension interface
  output logic              ext_start,
  output logic [CMD_W-1:0]  ext_cmd,
  output logic [DMAX-1:0]   ext_data,
  output logic [5:0]        ext_len,
  input  logic              ext_rx_en,
  input  logic              ext_rx_data,
  input  logic              ext_done
);
  localparam int unsigned SRW = HDR_W + DMAX;
  localparam int unsigned OW  = STAT_W + RMAX;

  typedef enum logic [2:0] {L_IDLE, L_DECODE, L_TM_REQ, L_TM_REL, L_SEND, L_EXT} lst_e;
  lst_e             st;
  logic [SRW-1:0]   sr;
  logic [5:0]       nbits;
  logic             en_q;
  logic [OW-1:0]    osr;
  logic [5:0]       ocnt;
  logic             own_en, own_data;
  logic             ack_s;
  logic [ADDR_W-1:0] f_addr;
  logic [CMD_W-1:0]  f_cmd;
  logic [DMAX-1:0]   f_data;
  logic [5:0]        f_dlen;

  sync2 u_sync_ack (.clk(serClk), .rst_n, .d(tm_ack), .q(ack_s));

  // fields of the received frame (valid in L_DECODE)
  always_comb begin
    logic [HDR_W-1:0] hdr;
    f_dlen = (nbits >= 6'(HDR_W)) ? nbits - 6'(HDR_W) : 6'd0;
    hdr    = HDR_W'(sr >> f_dlen);
    f_addr = hdr[HDR_W-1:CMD_W];
    f_cmd  = hdr[CMD_W-1:0];
    f_data = DMAX'(sr & ((SRW'(1) << f_dlen) - SRW'(1)));
  end

  task automatic respond(input stat_e s, input logic [5:0] dl, input logic [RMAX-1:0] d);
    // status then dl data bits, MSB first, left aligned in osr
    osr  <= {s, d << (6'(RMAX) - dl)};
    ocnt <= dl + 6'(STAT_W);
    st   <= L_SEND;
  endtask

  always_ff @(posedge serClk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= L_IDLE;
      sr          <= '0;
      nbits       <= '0;
      en_q        <= 1'b0;
      osr         <= '0;
      ocnt        <= '0;
      own_en      <= 1'b0;
      own_data    <= 1'b0;
      tm_req      <= 1'b0;
      tm_cmd      <= '0;
      tm_data     <= '0;
      ext_start   <= 1'b0;
      ext_cmd     <= '0;
      ext_data    <= '0;
      ext_len     <= '0;
      serTxEn_o   <= 1'b0;
      serTxData_o <= 1'b0;
      serRxEn_o   <= 1'b0;
      serRxData_o <= 1'b0;
    end else begin
      // chain forwarding
      serTxEn_o   <= serTxEn_i;
      serTxData_o <= serTxData_i;
      if (own_en || (st == L_EXT && ext_rx_en)) begin
        serRxEn_o   <= 1'b1;
        serRxData_o <= own_en ? own_data : ext_rx_data;
      end else begin
        serRxEn_o   <= serRxEn_i;
        serRxData_o <= serRxData_i;
      end
      // receive shift register
      en_q <= serTxEn_i;
      if (serTxEn_i) begin
        sr <= {sr[SRW-2:0], serTxData_i};
        if (!en_q) nbits <= 6'd1;
        else if (nbits != 6'h3F) nbits <= nbits + 6'd1;
      end
      ext_start <= 1'b0;
      own_en    <= 1'b0;
      unique case (st)
        L_IDLE: if (en_q && !serTxEn_i) st <= L_DECODE;
        L_DECODE: begin
          st <= L_IDLE;
          if (nbits < 6'(HDR_W) || nbits > 6'(SRW)) begin
            if (nbits > 6'(SRW)) respond(ST_BAD_LEN, 6'd0, '0);
          end else if (f_addr == my_addr) begin
            if (is_ext_cmd(f_cmd)) begin
              if (ext_en) begin
                ext_start <= 1'b1;
                ext_cmd   <= f_cmd;
                ext_data  <= f_data;
                ext_len   <= f_dlen;
                st        <= L_EXT;
              end else respond(ST_BAD_CMD, 6'd0, '0);
            end else if (!intr_known(f_cmd)) respond(ST_BAD_CMD, 6'd0, '0);
            else if (f_dlen != 6'(intr_len(f_cmd))) respond(ST_BAD_LEN, 6'd0, '0);
            else begin
              tm_cmd  <= f_cmd;
              tm_data <= f_data;
              tm_req  <= 1'b1;
              st      <= L_TM_REQ;
            end
          end else if (is_last && f_addr > my_addr) respond(ST_BAD_ADDR, 6'd0, '0);
        end
        L_TM_REQ: if (ack_s) begin
          tm_req <= 1'b0;
          osr    <= {ST_OK, tm_rdata << (6'(RMAX) - tm_rlen)};
          ocnt   <= tm_rlen + 6'(STAT_W);
          st     <= L_TM_REL;
        end
        L_TM_REL: if (!ack_s) st <= L_SEND;
        L_SEND: begin
          own_en   <= 1'b1;
          own_data <= osr[OW-1];
          osr      <= {osr[OW-2:0], 1'b0};
          ocnt     <= ocnt - 6'd1;
          if (ocnt == 6'd1) st <= L_IDLE;
        end
        L_EXT: if (ext_done) st <= L_IDLE;
        default: st <= L_IDLE;
      endcase
    end
  end

  // handshake rule towards the test module: cmd/data stay stable while req
  a_tm_stable: assert property (@(posedge serClk) disable iff (!rst_n)
                                tm_req && $past(tm_req) |-> $stable(tm_cmd) && $stable(tm_data));
endmodule
