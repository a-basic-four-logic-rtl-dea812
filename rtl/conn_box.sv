// conn_box: connection box, one programmable mux per output pin.
//
// Every output pin has its own prog_mux that can pick any of the N_SRC source
// signals, or none. Mux input 0 is "none"; source j is mux input j+1, so a
// mux needs ceil(log2(N_SRC+1)) configuration bits. This is the architecture's
// fully connected connection box. The muxes sit in the configuration chain in
// output order: output 0's mux is next to prog_in, output N_OUT-1's mux
// drives prog_out.
//
// The same module serves four roles (sizes from fpga_pkg):
//   IO input box      5 IO pads    -> 10 fabric wires   (30 bits)
//   IO output box     10 wires     -> 5 IO pads         (20 bits)
//   cluster output    5 BLE outputs-> 10 fabric wires   (30 bits)
//   interconnect      10 wires + 5 BLE outputs -> 20 BLE inputs (80 bits)
// On the fabric an output whose mux selects "none" must not drive its wire:
// `drive` carries that, standing in for the tri-state driver. Inside a logic
// cluster the same output simply reads 0 (ground), which is what the cluster
// uses.
//
// Interface: src[N_SRC-1:0] in, out[N_OUT-1:0] and drive[N_OUT-1:0] out,
// purely combinational apart from the configuration chain.
module conn_box #(
  parameter int unsigned N_SRC = 5,
  parameter int unsigned N_OUT = 10
) (
  input  logic             prog_clk,
  input  logic             prog_en,
  input  logic             prog_in,
  output logic             prog_out,
  input  logic [N_SRC-1:0] src,
  output logic [N_OUT-1:0] out,
  output logic [N_OUT-1:0] drive
);

  localparam int unsigned N_IN  = N_SRC + 1;
  localparam int unsigned SEL_W = $clog2(N_IN);

  logic [N_OUT:0]  chain;
  logic [N_IN-1:0] mux_in;

  assign mux_in   = {src, 1'b0};
  assign chain[0] = prog_in;

  for (genvar o = 0; o < N_OUT; o++) begin : g_out
    prog_mux #(.N_IN(N_IN), .SEL_W(SEL_W)) mux (
      .prog_clk (prog_clk),
      .prog_en  (prog_en),
      .prog_in  (chain[o]),
      .prog_out (chain[o+1]),
      .in       (mux_in),
      .out      (out[o]),
      .active   (drive[o])
    );
  end

  assign prog_out = chain[N_OUT];

endmodule
