// logic_cluster: five BLEs and the interconnect matrix that feeds them.
//
// The interconnect matrix is a conn_box with 15 sources: the 10 wires of the
// fabric bus the cluster reads (sources 0..9, mux inputs 1..10) and the 5 BLE
// outputs (sources 10..14, mux inputs 11..15), so every BLE input can take
// any fabric wire or any BLE output of the same cluster, or ground (mux input
// 0). Local BLE-to-BLE nets therefore never use the global fabric. Matrix
// output 4*b+i drives input i (A..D) of BLE b. This follows the architecture
// (5 BLEs, 16-input muxes, 80 + 5*19 = 175 configuration bits); the numbering
// of sources and outputs is this design's own. The cluster's outputs go to
// the fabric through a separate cluster-output connection box.
//
// Chain order: interconnect matrix first (next to prog_in), then BLE 0..4.
//
// The BLE outputs feed back into the matrix, so the netlist has a structural
// combinational loop through each LUT. That is inherent to a programmable
// cluster; a configuration that closes such a loop without a flip-flop is
// an invalid bitstream, as it is on any FPGA.
//
// Interface: fabric[9:0] in, ble_out[4:0] out; combinational from fabric to
// ble_out for LUT outputs, registered on clk for flip-flop outputs.
module logic_cluster
  import fpga_pkg::*;
(
  input  logic                   clk,
  input  logic                   prog_clk,
  input  logic                   prog_en,
  input  logic                   prog_in,
  output logic                   prog_out,
  input  logic [FABRIC_W-1:0]    fabric,
  output logic [BLES_PER_LC-1:0] ble_out
);

  logic [BLES_PER_LC:0]   chain;
  logic [IM_OUT-1:0]      im_out;
  logic [IM_OUT-1:0]      im_drive;   // unused: a cluster input with no source reads ground

  conn_box #(.N_SRC(FABRIC_W + BLES_PER_LC), .N_OUT(IM_OUT)) im (
    .prog_clk (prog_clk),
    .prog_en  (prog_en),
    .prog_in  (prog_in),
    .prog_out (chain[0]),
    .src      ({ble_out, fabric}),
    .out      (im_out),
    .drive    (im_drive)
  );

  for (genvar b = 0; b < BLES_PER_LC; b++) begin : g_ble
    ble u_ble (
      .clk      (clk),
      .prog_clk (prog_clk),
      .prog_en  (prog_en),
      .prog_in  (chain[b]),
      .prog_out (chain[b+1]),
      .in       (im_out[LUT_K*b +: LUT_K]),
      .out      (ble_out[b])
    );
  end

  assign prog_out = chain[BLES_PER_LC];

endmodule
