// galssa_top: GALS-SA platform with its serial test infrastructure and the
// test extension. The main serial controller, with the main serial
// extension supplying extended frame lengths, drives a daisy chain of
// NUM_NODES wrapped synchronous logic blocks (gals_node). Node i has
// address i; the last node answers for non-existent addresses. The
// asynchronous channels join the nodes in a ring: node i's output port
// drives node (i+1) mod NUM_NODES's input port. The command bus that the
// last node forwards has no receiver and is left open.
//
// Ports: serClk/rst_n (serial clock and reset), the host command interface
// of the main serial controller (which a JTAG controller would drive),
// ext_en (the programmable enable of the test extension, applied to the main
// controller and every local interface), and per node the user channel data
// ports and the local clock. The user logic itself is not part of this RTL.
//
// The chain of serial interfaces with one test module per block follows the
// document; NUM_NODES and the ring of channels are this design's choices.
module galssa_top
  import galssa_pkg::*;
#(
  parameter int unsigned NUM_NODES = 4
) (
  input  logic                          serClk,
  input  logic                          rst_n,
  input  logic                          ext_en,
  // host command interface
  input  logic                          start,
  input  logic [ADDR_W-1:0]             addr,
  input  logic [CMD_W-1:0]              cmd,
  input  logic [DMAX-1:0]               data,
  input  logic                          force_len,
  input  logic [5:0]                    forced_len,
  output logic                          busy,
  output logic                          done,
  output logic                          timeout,
  output logic [STAT_W-1:0]             resp_status,
  output logic [5:0]                    resp_bits,
  output logic [RMAX-1:0]               resp_data,
  // user logic of each block
  output logic [NUM_NODES-1:0]          clk_local,
  input  logic [NUM_NODES-1:0]          usr_tx_valid,
  input  logic [NUM_NODES-1:0][CH_W-1:0] usr_tx_data,
  output logic [NUM_NODES-1:0]          usr_tx_ready,
  output logic [NUM_NODES-1:0]          usr_rx_valid,
  output logic [NUM_NODES-1:0][CH_W-1:0] usr_rx_data
);
  logic [CMD_W-1:0] ext_cmd;
  logic [5:0]       ext_len;
  // chain wires: index i is the link into node i; index NUM_NODES is past the last
  logic [NUM_NODES:0] tx_en, tx_d, rx_en, rx_d;
  // channel wires: ch_*[i] is driven by node i's output port
  logic [NUM_NODES-1:0]           ch_req, ch_ack;
  logic [NUM_NODES-1:0][CH_W-1:0] ch_data;

  main_serial_ext u_mse (.ext_cmd, .ext_len);

  main_serial_ctrl u_msc (
    .serClk, .rst_n, .start, .addr, .cmd, .data, .force_len, .forced_len,
    .ext_en, .busy, .done, .timeout, .resp_status, .resp_bits, .resp_data,
    .ext_cmd, .ext_len,
    .serTxEn(tx_en[0]), .serTxData(tx_d[0]),
    .serRxEn(rx_en[0]), .serRxData(rx_d[0]));

  assign rx_en[NUM_NODES] = 1'b0;
  assign rx_d[NUM_NODES]  = 1'b0;

  for (genvar i = 0; i < NUM_NODES; i++) begin : g_node
    localparam int unsigned PREV = (i + NUM_NODES - 1) % NUM_NODES;
    gals_node #(
      .CAL_RESET(CAL_W'(20 + 3 * i))   // blocks start at different speeds
    ) u_node (
      .serClk, .rst_n, .my_addr(ADDR_W'(i)), .is_last(i == NUM_NODES - 1),
      .ext_en,
      .serTxEn_i(tx_en[i]), .serTxData_i(tx_d[i]),
      .serRxEn_o(rx_en[i]), .serRxData_o(rx_d[i]),
      .serTxEn_o(tx_en[i+1]), .serTxData_o(tx_d[i+1]),
      .serRxEn_i(rx_en[i+1]), .serRxData_i(rx_d[i+1]),
      .ch_in_req(ch_req[PREV]), .ch_in_data(ch_data[PREV]), .ch_in_ack(ch_ack[PREV]),
      .ch_out_req(ch_req[i]), .ch_out_data(ch_data[i]), .ch_out_ack(ch_ack[i]),
      .clk_local(clk_local[i]),
      .usr_tx_valid(usr_tx_valid[i]), .usr_tx_data(usr_tx_data[i]),
      .usr_tx_ready(usr_tx_ready[i]), .usr_rx_valid(usr_rx_valid[i]),
      .usr_rx_data(usr_rx_data[i]));
  end
endmodule
