// test_module: intrinsic test module attached to one synchronous logic
// block. It runs in the block's local clock domain and performs the two
// intrinsic tests of the asynchronous channels, plus clock calibration:
//
//  * functional test: the sending block (CMD_FUNC_TX) pushes `count`
//    pseudorandom words, produced by an 8-bit LFSR from `seed`, through its
//    output port; the receiving block, armed before with the same seed
//    (CMD_RX_ARM), regenerates the sequence, compares each received word,
//    counts the words and folds them into a 16-bit signature register.
//    CMD_RX_CHECK returns the pass flag and the count and disarms.
//  * structural test (CMD_LAT_TEST): one word is sent and the number of
//    local clock cycles from req rising until ack is seen is returned.
//  * CMD_CLK_CFG writes the calibration code of the local clock generator.
//
// Command interface (from local_serial_ctrl, serial clock domain): a 4-phase
// level handshake. cmd/data are held stable while cmd_req is high; the
// module synchronises cmd_req, executes, places rlen/rdata and raises
// cmd_ack; when cmd_req falls, cmd_ack falls. rdata is right aligned.
//
// Channel transmit path: the module owns the output port while it sends;
// otherwise words from the test extension (inj_*) and then from the user
// logic (usr_*) are passed through, in that priority. Received words always
// go to the user logic; while armed they are also checked.
//
// The two tests, their pseudorandom patterns and the signature follow the
// document. Polynomials, widths, the command set and the handshake are this
// design's own.
module test_module
  import galssa_pkg::*;
#(
  parameter logic [CAL_W-1:0] CAL_RESET = 8'd20
) (
  input  logic             clk,
  input  logic             rst_n,
  // command handshake (crosses from the serial clock domain)
  input  logic             cmd_req,
  input  logic [CMD_W-1:0] cmd,
  input  logic [DMAX-1:0]  cmd_data,
  output logic             cmd_ack,
  output logic [5:0]       rlen,
  output logic [RMAX-1:0]  rdata,
  // local clock calibration
  output logic [CAL_W-1:0] cal,
  // output port
  output logic             tx_valid,
  output logic [CH_W-1:0]  tx_data,
  input  logic             tx_ready,
  input  logic             tx_ack_seen,
  input  logic             tx_done,
  input  logic             tx_req_up,
  // input port
  input  logic             rx_valid,
  input  logic [CH_W-1:0]  rx_data,
  // test extension: pattern injection and observation
  input  logic             inj_valid,
  input  logic [CH_W-1:0]  inj_data,
  output logic             inj_ready,
  output logic [SIG_W-1:0] sig,
  output logic [CH_W-1:0]  last_rx,
  // user logic
  input  logic             usr_tx_valid,
  input  logic [CH_W-1:0]  usr_tx_data,
  output logic             usr_tx_ready,
  output logic             usr_rx_valid,
  output logic [CH_W-1:0]  usr_rx_data
);
  typedef enum logic [2:0] {T_IDLE, T_DECODE, T_SEND, T_WAIT, T_ACK} tst_e;
  tst_e            st;
  logic            req_s;
  logic [CMD_W-1:0] cur;
  logic [CH_W-1:0] pat;       // sender LFSR
  logic [7:0]      remain;    // words still to send
  logic [7:0]      sent;      // words whose 4-phase cycle completed
  logic [7:0]      lat;
  logic            lat_run;
  // receiver state
  logic            armed;
  logic [CH_W-1:0] ref_pat;
  logic [7:0]      rx_cnt;
  logic            rx_err;

  sync2 u_sync_req (.clk, .rst_n, .d(cmd_req), .q(req_s));

  function automatic logic [CH_W-1:0] nz(logic [CH_W-1:0] s);
    return (s == '0) ? 8'h01 : s;
  endfunction

  wire own = (st == T_SEND);

  always_comb begin
    tx_valid     = 1'b0;
    tx_data      = usr_tx_data;
    inj_ready    = 1'b0;
    usr_tx_ready = 1'b0;
    if (own) begin
      tx_valid = 1'b1;
      tx_data  = pat;
    end else if (st == T_IDLE && inj_valid) begin
      tx_valid  = 1'b1;
      tx_data   = inj_data;
      inj_ready = tx_ready;
    end else if (st == T_IDLE) begin
      tx_valid     = usr_tx_valid;
      usr_tx_ready = tx_ready;
    end
  end

  assign usr_rx_valid = rx_valid;
  assign usr_rx_data  = rx_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= T_IDLE;
      cmd_ack <= 1'b0;
      rlen    <= '0;
      rdata   <= '0;
      cal     <= CAL_RESET;
      cur     <= CMD_STATUS;
      pat     <= 8'h01;
      remain  <= '0;
      sent    <= '0;
      lat     <= '0;
      lat_run <= 1'b0;
      armed   <= 1'b0;
      ref_pat <= 8'h01;
      rx_cnt  <= '0;
      rx_err  <= 1'b0;
      sig     <= '0;
      last_rx <= '0;
    end else begin
      // ---------------- receiver side of the functional test
      if (rx_valid) begin
        last_rx <= rx_data;
        if (armed) begin
          sig     <= misr_next(sig, rx_data);
          rx_cnt  <= rx_cnt + 8'd1;
          ref_pat <= lfsr_next(ref_pat);
          if (rx_data != ref_pat) rx_err <= 1'b1;
        end
      end
      // ---------------- latency counter
      if (lat_run) begin
        if (tx_ack_seen) lat_run <= 1'b0;
        else if (tx_req_up && lat != 8'hFF) lat <= lat + 8'd1;
      end
      // ---------------- command sequencer
      unique case (st)
        T_IDLE: if (req_s && !cmd_ack) begin
          cur <= cmd;
          st  <= T_DECODE;
        end
        T_DECODE: begin
          rlen  <= 6'(intr_rlen(cur));
          rdata <= '0;
          st    <= T_ACK;
          unique case (cur)
            CMD_CLK_CFG: cal <= cmd_data[CAL_W-1:0];
            CMD_RX_ARM: begin
              armed   <= 1'b1;
              ref_pat <= nz(cmd_data[7:0]);
              rx_cnt  <= '0;
              rx_err  <= 1'b0;
              sig     <= '0;
            end
            CMD_FUNC_TX: begin
              pat    <= nz(cmd_data[15:8]);
              remain <= cmd_data[7:0];
              sent   <= '0;
              if (cmd_data[7:0] != 8'd0) st <= T_SEND;
            end
            CMD_RX_CHECK: begin
              rdata <= RMAX'({~rx_err, rx_cnt});
              armed <= 1'b0;
            end
            CMD_LAT_TEST: begin
              pat     <= 8'h5A;
              remain  <= 8'd1;
              sent    <= '0;
              lat     <= '0;
              lat_run <= 1'b1;
              st      <= T_SEND;
            end
            default: ;
          endcase
        end
        T_SEND: if (tx_ready) begin
          remain <= remain - 8'd1;
          st     <= T_WAIT;
        end
        T_WAIT: if (tx_done) begin
          sent <= sent + 8'd1;
          if (remain == 8'd0) begin
            rdata <= (cur == CMD_LAT_TEST) ? RMAX'(lat) : RMAX'(sent + 8'd1);
            st    <= T_ACK;
          end else begin
            pat <= lfsr_next(pat);
            st  <= T_SEND;
          end
        end
        T_ACK: begin
          cmd_ack <= 1'b1;
          if (cmd_ack && !req_s) begin
            cmd_ack <= 1'b0;
            st      <= T_IDLE;
          end
        end
        default: st <= T_IDLE;
      endcase
    end
  end
endmodule
