// gals_node: one synchronous logic block of the GALS-SA platform with its
// asynchronous wrapper and test resources: local clock generator, input and
// output port controllers, intrinsic test module and local serial interface
// (intrinsic layer), plus the serial control extension and the test
// extension (on the programmable logic block). The user's locally
// synchronous logic is outside this module: its channel data ports are
// usr_*.
//
// Clocking: the local serial interface and the serial control extension run
// on serClk; the test module, test extension and port controllers on the
// local clock clk_local, generated here from the calibration code held by
// the test module. rst_n (serial reset) resets the serial side
// asynchronously; a two-flop synchroniser releases the local side.
// clk_local is brought out for observation.
//
// Structure follows the document's block diagrams of the wrapper with test
// resources and of the test extension; the split into clock domains and the
// handshakes between them are this design's choices.
module gals_node
  import galssa_pkg::*;
#(
  parameter logic [CAL_W-1:0] CAL_RESET    = 8'd20,
  parameter int unsigned      BASE_HALF_T  = 4,
  parameter int unsigned      STEP_T       = 1
) (
  input  logic              serClk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] my_addr,
  input  logic              is_last,
  input  logic              ext_en,
  // serial chain
  input  logic              serTxEn_i,
  input  logic              serTxData_i,
  output logic              serRxEn_o,
  output logic              serRxData_o,
  output logic              serTxEn_o,
  output logic              serTxData_o,
  input  logic              serRxEn_i,
  input  logic              serRxData_i,
  // asynchronous channel, input side
  input  logic              ch_in_req,
  input  logic [CH_W-1:0]   ch_in_data,
  output logic              ch_in_ack,
  // asynchronous channel, output side
  output logic              ch_out_req,
  output logic [CH_W-1:0]   ch_out_data,
  input  logic              ch_out_ack,
  // locally synchronous user logic
  output logic              clk_local,
  input  logic              usr_tx_valid,
  input  logic [CH_W-1:0]   usr_tx_data,
  output logic              usr_tx_ready,
  output logic              usr_rx_valid,
  output logic [CH_W-1:0]   usr_rx_data
);
  logic             lrst_n;
  logic [CAL_W-1:0] cal;
  // serial <-> test module
  logic             tm_req, tm_ack;
  logic [CMD_W-1:0] tm_cmd;
  logic [DMAX-1:0]  tm_data;
  logic [5:0]       tm_rlen;
  logic [RMAX-1:0]  tm_rdata;
  // serial <-> extension
  logic             ext_start, ext_rx_en, ext_rx_data, ext_done;
  logic [CMD_W-1:0] ext_cmd;
  logic [DMAX-1:0]  ext_data;
  logic [5:0]       ext_len;
  logic             te_req, te_ack;
  logic [CMD_W-1:0] te_cmd;
  logic [DMAX-1:0]  te_data;
  logic [5:0]       te_rlen;
  logic [RMAX-1:0]  te_rdata;
  // ports
  logic             tx_valid, tx_ready, tx_ack_seen, tx_done, tx_req_up;
  logic [CH_W-1:0]  tx_data;
  logic             rx_valid;
  logic [CH_W-1:0]  rx_data;
  logic             inj_valid, inj_ready;
  logic [CH_W-1:0]  inj_data, last_rx;
  logic [SIG_W-1:0] sig;

  local_clock_gen #(.BASE_HALF_T(BASE_HALF_T), .STEP_T(STEP_T)) u_clk (
    .en(1'b1), .cal, .clk(clk_local));

  sync2 u_rst_sync (.clk(clk_local), .rst_n, .d(1'b1), .q(lrst_n));

  local_serial_ctrl u_lsc (
    .serClk, .rst_n, .my_addr, .is_last, .ext_en,
    .serTxEn_i, .serTxData_i, .serRxEn_o, .serRxData_o,
    .serTxEn_o, .serTxData_o, .serRxEn_i, .serRxData_i,
    .tm_req, .tm_cmd, .tm_data, .tm_ack, .tm_rlen, .tm_rdata,
    .ext_start, .ext_cmd, .ext_data, .ext_len,
    .ext_rx_en, .ext_rx_data, .ext_done);

  test_module #(.CAL_RESET(CAL_RESET)) u_tm (
    .clk(clk_local), .rst_n(lrst_n),
    .cmd_req(tm_req), .cmd(tm_cmd), .cmd_data(tm_data), .cmd_ack(tm_ack),
    .rlen(tm_rlen), .rdata(tm_rdata), .cal,
    .tx_valid, .tx_data, .tx_ready, .tx_ack_seen, .tx_done, .tx_req_up,
    .rx_valid, .rx_data,
    .inj_valid, .inj_data, .inj_ready, .sig, .last_rx,
    .usr_tx_valid, .usr_tx_data, .usr_tx_ready, .usr_rx_valid, .usr_rx_data);

  serial_ctrl_ext u_sce (
    .serClk, .rst_n, .ext_start, .ext_cmd, .ext_data, .ext_len,
    .rx_en(ext_rx_en), .rx_data(ext_rx_data), .done(ext_done),
    .te_req, .te_cmd, .te_data, .te_ack, .te_rlen, .te_rdata);

  test_ext u_te (
    .clk(clk_local), .rst_n(lrst_n), .te_req, .te_cmd, .te_data, .te_ack,
    .te_rlen, .te_rdata, .inj_valid, .inj_data, .inj_ready, .sig, .last_rx);

  out_port u_op (
    .clk(clk_local), .rst_n(lrst_n), .valid(tx_valid), .data(tx_data),
    .ready(tx_ready), .ack_seen(tx_ack_seen), .done(tx_done), .req_up(tx_req_up),
    .req_o(ch_out_req), .data_o(ch_out_data), .ack_i(ch_out_ack));

  in_port u_ip (
    .clk(clk_local), .rst_n(lrst_n), .req_i(ch_in_req), .data_i(ch_in_data),
    .ack_o(ch_in_ack), .rx_valid, .rx_data);
endmodule
