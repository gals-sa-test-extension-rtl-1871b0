// main_serial_ctrl: main serial controller of the GALS-SA platform. It turns
// a host command (from the chip-level test access, e.g. JTAG) into a command
// frame on the serial chain and returns the response frame to the host.
//
// Link (6 wires): serClk and serRstN are distributed to every local serial
// interface; serTxEn/serTxData carry the command frame, serRxEn/serRxData the
// response frame. Both frames are variable length: the enable wire marks the
// valid bits, MSB first.
//
// Operation: on start (while !busy) the controller latches addr, cmd and the
// right-aligned data and sends addr, cmd and the data bits. The number of
// data bits comes from the intrinsic table for an intrinsic command, from
// the main serial extension (ext_len, looked up from ext_cmd) for an
// extended command when ext_en is set, and is 0 for an extended command when
// ext_en is clear. force_len replaces it by forced_len (used to test frame
// checking). The controller then waits for serRxEn, shifts the response in
// while it is high and, when it falls, reports status (first 2 bits),
// resp_bits (number of data bits) and resp_data (right-aligned) with a done
// pulse. If no response starts within TIMEOUT serClk cycles, done pulses with
// timeout set.
//
// The enable input for the extension and the length input from the
// extension logic follow the document; the timeout, the host interface and
// the length override are this design's own.
module main_serial_ctrl
  import galssa_pkg::*;
#(
  parameter int unsigned TIMEOUT = 65535
) (
  input  logic              serClk,
  input  logic              rst_n,
  // host side
  input  logic              start,
  input  logic [ADDR_W-1:0] addr,
  input  logic [CMD_W-1:0]  cmd,
  input  logic [DMAX-1:0]   data,
  input  logic              force_len,
  input  logic [5:0]        forced_len,
  input  logic              ext_en,
  output logic              busy,
  output logic              done,
  output logic              timeout,
  output logic [STAT_W-1:0] resp_status,
  output logic [5:0]        resp_bits,
  output logic [RMAX-1:0]   resp_data,
  // main serial extension
  output logic [CMD_W-1:0]  ext_cmd,
  input  logic [5:0]        ext_len,
  // serial link
  output logic              serTxEn,
  output logic              serTxData,
  input  logic              serRxEn,
  input  logic              serRxData
);
  localparam int unsigned TW = HDR_W + DMAX;
  localparam int unsigned RW = STAT_W + RMAX;
  typedef enum logic [1:0] {M_IDLE, M_SEND, M_WAIT, M_RECV} mst_e;
  mst_e            st;
  logic [TW-1:0]   tsr;
  logic [5:0]      tcnt;
  logic [RW-1:0]   rsr;
  logic [5:0]      rcnt;
  logic [31:0]     tmo;
  logic [5:0]      dlen;

  assign ext_cmd = cmd;

  always_comb begin
    if (force_len)              dlen = forced_len;
    else if (!is_ext_cmd(cmd))  dlen = 6'(intr_len(cmd));
    else if (ext_en)            dlen = ext_len;
    else                        dlen = '0;
    if (dlen > 6'(DMAX)) dlen = 6'(DMAX);
  end

  assign busy = (st != M_IDLE);

  always_ff @(posedge serClk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= M_IDLE;
      tsr         <= '0;
      tcnt        <= '0;
      rsr         <= '0;
      rcnt        <= '0;
      tmo         <= '0;
      serTxEn     <= 1'b0;
      serTxData   <= 1'b0;
      done        <= 1'b0;
      timeout     <= 1'b0;
      resp_status <= '0;
      resp_bits   <= '0;
      resp_data   <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        M_IDLE: if (start) begin
          tsr     <= {addr, cmd, data << (6'(DMAX) - dlen)};
          tcnt    <= dlen + 6'(HDR_W);
          timeout <= 1'b0;
          st      <= M_SEND;
        end
        M_SEND: begin
          serTxEn   <= 1'b1;
          serTxData <= tsr[TW-1];
          tsr       <= {tsr[TW-2:0], 1'b0};
          tcnt      <= tcnt - 6'd1;
          if (tcnt == 6'd1) begin
            st  <= M_WAIT;
            tmo <= '0;
          end
        end
        M_WAIT: begin
          serTxEn   <= 1'b0;
          serTxData <= 1'b0;
          rcnt      <= '0;
          if (serRxEn) begin
            rsr  <= RW'(serRxData);
            rcnt <= 6'd1;
            st   <= M_RECV;
          end else if (tmo == TIMEOUT) begin
            timeout <= 1'b1;
            done    <= 1'b1;
            st      <= M_IDLE;
          end else tmo <= tmo + 32'd1;
        end
        M_RECV: if (serRxEn) begin
          rsr  <= {rsr[RW-2:0], serRxData};
          rcnt <= rcnt + 6'd1;
        end else begin
          resp_status <= STAT_W'(rsr >> (rcnt - 6'(STAT_W)));
          resp_bits   <= rcnt - 6'(STAT_W);
          resp_data   <= RMAX'(rsr & ((RW'(1) << (rcnt - 6'(STAT_W))) - RW'(1)));
          done        <= 1'b1;
          st          <= M_IDLE;
        end
        default: st <= M_IDLE;
      endcase
    end
  end
endmodule
