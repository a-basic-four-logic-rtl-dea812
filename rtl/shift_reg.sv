// shift_reg: one link of the configuration chain, with two banks.
//
// The programming bank shifts one bit per rising prog_clk edge while prog_en
// is high: prog_in enters at bit 0 and bit WIDTH-1 leaves on prog_out, which
// feeds the next link. The active bank, which the block's logic sees on
// `control`, is copied from the programming bank once programming ends, so
// the logic never sees the half-shifted pattern. Two banks loaded at the end
// of programming follow the architecture; how "the end" is detected is this
// design's choice: the copy happens on the first prog_clk edge that finds
// prog_en low, and `control` reads as all zeros from the moment prog_en rises
// until that copy. All-zero is every block's idle setting (muxes undriven or
// grounded, LUTs 0), so the fabric is quiet, and free of configured
// combinational loops, whenever it is being programmed.
//
// Timing: prog_in is sampled on the rising prog_clk edge. After prog_en
// falls, one more rising prog_clk edge makes the new configuration live.
module shift_reg #(
  parameter int unsigned WIDTH = 3
) (
  input  logic             prog_clk,
  input  logic             prog_en,
  input  logic             prog_in,
  output logic             prog_out,
  output logic [WIDTH-1:0] control
);

  logic [WIDTH-1:0] shift_q;   // programming bank
  logic [WIDTH-1:0] active_q;  // active bank
  logic             live_q;    // active bank holds a completed configuration

  always_ff @(posedge prog_clk) begin
    if (prog_en) begin
      shift_q <= (shift_q << 1) | WIDTH'(prog_in);
      live_q <= 1'b0;
    end else if (!live_q) begin
      active_q <= shift_q;
      live_q   <= 1'b1;
    end
  end

  assign prog_out = shift_q[WIDTH-1];
  assign control  = (live_q && !prog_en) ? active_q : '0;

endmodule
