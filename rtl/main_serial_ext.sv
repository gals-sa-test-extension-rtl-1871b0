// main_serial_ext: main serial extension, built on a programmable logic
// block next to the main serial controller. From the command field of the
// frame being sent it gives the length, in bits, of the command-specific
// data of an extended test frame. It is combinational; the main serial
// controller samples ext_len while it loads a frame. Commands it does not
// know get length 0.
//
// The document states that this length comes from logic on the logic blocks
// and depends on the extended command type; the lengths are this design's
// (8 bits for CMD_EXT_PATTERN, none for CMD_EXT_SIGREAD).
module main_serial_ext
  import galssa_pkg::*;
(
  input  logic [CMD_W-1:0] ext_cmd,
  output logic [5:0]       ext_len
);
  always_comb begin
    ext_len = '0;
    if (is_ext_cmd(ext_cmd) && ext_known(ext_cmd))
      ext_len = 6'(ext_dlen(ext_cmd));
  end
endmodule
