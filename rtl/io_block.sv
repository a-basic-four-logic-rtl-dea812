// io_block: one programmable chip pin.
//
// The pin has a tri-state output driver, an input path from the pad to the
// fabric, and switchable pull-up and pull-down resistors, set by 3
// configuration bits (bit 0 output enable, bit 1 pull-up, bit 2 pull-down;
// the bit order is this design's choice). The architecture names these parts
// but leaves the pull resistors out of its digital model; here they decide
// the level of a pad that nobody drives, so they can be used and tested.
//
// Two-state model of the pad (this design's own): the chip drives the pad
// when the output enable is set and the IO output box has a source selected
// for this pin (from_fabric_drv). Otherwise an external driver, when present
// (pad_i_en), sets it; otherwise the pull-up gives 1 (it wins if both pulls
// are on) and the pull-down or no pull gives 0; pad_float flags the last
// case, a pad with no driver and no pull, whose real level is undefined. The
// pad level always goes back to the fabric through to_fabric, where the IO
// input box may pick it.
//
// Interface: pad_i/pad_i_en from outside; pad_o (pad level), pad_oe (chip is
// driving) and pad_float to outside; combinational.
module io_block
  import fpga_pkg::*;
(
  input  logic prog_clk,
  input  logic prog_en,
  input  logic prog_in,
  output logic prog_out,
  input  logic pad_i,
  input  logic pad_i_en,
  output logic pad_o,
  output logic pad_oe,
  output logic pad_float,
  input  logic from_fabric,
  input  logic from_fabric_drv,
  output logic to_fabric
);

  logic [IOB_CFG-1:0] control;

  shift_reg #(.WIDTH(IOB_CFG)) control_bits (
    .prog_clk (prog_clk),
    .prog_en  (prog_en),
    .prog_in  (prog_in),
    .prog_out (prog_out),
    .control  (control)
  );

  always_comb begin
    pad_oe = control[0] && from_fabric_drv;
    if (pad_oe)          pad_o = from_fabric;
    else if (pad_i_en)   pad_o = pad_i;
    else if (control[1]) pad_o = 1'b1;
    else                 pad_o = 1'b0;
    pad_float = !pad_oe && !pad_i_en && !control[1] && !control[2];
    to_fabric = pad_o;
  end

endmodule
