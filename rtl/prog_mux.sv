// prog_mux: programmable multiplexer, the building block of every connection
// box and switch block.
//
// A plain N_IN-to-1 mux whose select lines are the active bank of a
// SEL_W-bit configuration shift register (SEL_W = ceil(log2 N_IN)), which sits
// in the chip's configuration chain between prog_in and prog_out. This
// structure follows the architecture. Input 0 is by convention "no source":
// the owner ties it to 0 and uses `active` to decide whether to drive. A
// select value of 0, or one of N_IN or more (possible when N_IN is not a power
// of two), gives out = 0 and active = 0; this handling of unused codes is this
// design's choice.
//
// Interface: in[N_IN-1:0] data inputs, out the selected bit, active high when
// a real source (1..N_IN-1) is selected. The path in -> out is combinational.
module prog_mux #(
  parameter int unsigned N_IN  = 8,
  parameter int unsigned SEL_W = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic            prog_clk,
  input  logic            prog_en,
  input  logic            prog_in,
  output logic            prog_out,
  input  logic [N_IN-1:0] in,
  output logic            out,
  output logic            active
);

  logic [SEL_W-1:0] sel;

  shift_reg #(.WIDTH(SEL_W)) control_bits (
    .prog_clk (prog_clk),
    .prog_en  (prog_en),
    .prog_in  (prog_in),
    .prog_out (prog_out),
    .control  (sel)
  );

  always_comb begin
    active = (sel != '0) && (32'(sel) < N_IN);
    out    = active ? in[sel] : 1'b0;
  end

endmodule
