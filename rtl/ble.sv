// ble: basic logic element, a 4-input look-up table and a flip-flop.
//
// Structure (as in the architecture): a 16-to-1 mux reads the 16 LUT bits
// with the inputs as select, three 2-to-1 muxes pick (a) input A or the
// flip-flop output as the LUT's A input (feedback), (b) input D or constant 1
// as the flip-flop's clock enable, and (c) the LUT or the flip-flop as the
// BLE output. The 19 configuration bits sit in one two-bank shift_reg; their
// order (fpga_pkg::ble_cfg_t, LUT bit index {D,C,B,A}) is this design's own.
//
// The flip-flop takes the LUT output on the rising edge of the global user
// clock `clk`. It is cleared while prog_en is high, so a freshly programmed
// design starts from 0; that clear is this design's choice.
//
// Interface: in[0..3] are inputs A..D, out is the BLE output. in -> out is
// combinational when the LUT output is selected, one clk cycle otherwise.
module ble
  import fpga_pkg::*;
(
  input  logic             clk,
  input  logic             prog_clk,
  input  logic             prog_en,
  input  logic             prog_in,
  output logic             prog_out,
  input  logic [LUT_K-1:0] in,
  output logic             out
);

  logic [BLE_CFG-1:0] control;
  ble_cfg_t           cfg;
  logic [LUT_K-1:0]   lut_sel;
  logic               lut_out;
  logic               ff_ce;
  logic               ff_q;

  shift_reg #(.WIDTH(BLE_CFG)) control_bits (
    .prog_clk (prog_clk),
    .prog_en  (prog_en),
    .prog_in  (prog_in),
    .prog_out (prog_out),
    .control  (control)
  );

  assign cfg = ble_cfg_t'(control);

  always_comb begin
    lut_sel    = in;
    lut_sel[0] = cfg.feedback ? ff_q : in[0];
    lut_out    = cfg.lut[lut_sel];
    ff_ce      = cfg.ce_from_d ? in[3] : 1'b1;
    out        = cfg.reg_out ? ff_q : lut_out;
  end

  always_ff @(posedge clk) begin
    if (prog_en)    ff_q <= 1'b0;
    else if (ff_ce) ff_q <= lut_out;
  end

endmodule
