// switch_block: disjoint switch block joining four 10-wire fabric buses.
//
// Wire i of a side can only ever connect to wire i of the other three sides
// (the disjoint pattern): a signal keeps its track number across the whole
// fabric. Each of the 40 side/wire pins has a 2-bit prog_mux; select 0 leaves
// the pin undriven (the high-z default), selects 1, 2 and 3 drive it from the
// same wire on the side 1, 2 or 3 steps clockwise (for the north pin: east,
// south, west). 40 x 2 = 80 configuration bits, as in the architecture; the
// select coding and the mux order in the chain (side N, E, S, W, wire 0..9
// within a side, north wire 0 next to prog_in) are this design's choices.
//
// The buses are bidirectional. Without tri-state nets, each pin is split into
// bus_in (the resolved value of the wire outside the block) and a
// bus_out/bus_drv pair (this block's contribution and whether it drives);
// the wire's value is resolved where the bus is, in fpga_top. Routing a wire
// back into itself through two switch blocks is an invalid bitstream.
//
// Interface: bus_in[side][wire] in; bus_out, bus_drv [side][wire] out;
// combinational.
module switch_block
  import fpga_pkg::*;
(
  input  logic                prog_clk,
  input  logic                prog_en,
  input  logic                prog_in,
  output logic                prog_out,
  input  logic [FABRIC_W-1:0] bus_in  [4],
  output logic [FABRIC_W-1:0] bus_out [4],
  output logic [FABRIC_W-1:0] bus_drv [4]
);

  logic [4*FABRIC_W:0] chain;
  assign chain[0] = prog_in;

  for (genvar s = 0; s < 4; s++) begin : g_side
    for (genvar w = 0; w < FABRIC_W; w++) begin : g_wire
      prog_mux #(.N_IN(4), .SEL_W(SB_SEL)) mux (
        .prog_clk (prog_clk),
        .prog_en  (prog_en),
        .prog_in  (chain[s*FABRIC_W + w]),
        .prog_out (chain[s*FABRIC_W + w + 1]),
        .in       ({bus_in[(s+3)%4][w], bus_in[(s+2)%4][w], bus_in[(s+1)%4][w], 1'b0}),
        .out      (bus_out[s][w]),
        .active   (bus_drv[s][w])
      );
    end
  end

  assign prog_out = chain[4*FABRIC_W];

endmodule
