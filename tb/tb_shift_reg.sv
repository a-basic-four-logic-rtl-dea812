// tb_shift_reg: checks the two-bank configuration shift register.
//
// Two instances (3 and 19 bits) share one chain: the 3-bit link's prog_out
// feeds the 19-bit link. Random patterns are shifted in; the test checks that
// control reads 0 while programming, that prog_out delays prog_in by exactly
// WIDTH edges, that the pattern appears on control exactly one prog_clk edge
// after prog_en falls, and that prog_in is ignored while prog_en is low.
module tb_shift_reg;
  localparam int unsigned WA = 3;
  localparam int unsigned WB = 19;

  logic clk = 1'b0;
  logic prog_en = 1'b1;
  logic prog_in = 1'b0;
  logic mid, prog_out;
  logic [WA-1:0] ctl_a;
  logic [WB-1:0] ctl_b;
  int checks = 0, failures = 0;

  shift_reg #(.WIDTH(WA)) dut_a (.prog_clk(clk), .prog_en, .prog_in, .prog_out(mid), .control(ctl_a));
  shift_reg #(.WIDTH(WB)) dut_b (.prog_clk(clk), .prog_en, .prog_in(mid), .prog_out, .control(ctl_b));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Shift one bit in; return what came out of the chain before the edge.
  task automatic shift_bit(input logic b, output logic out_b);
    @(negedge clk);
    prog_in = b;
    out_b   = prog_out;
    @(posedge clk);
  endtask

  initial begin
    logic [WA+WB-1:0] pat, prev;
    logic             ob;
    prev = '0;
    @(posedge clk);
    for (int round = 0; round < 6; round++) begin
      prog_en = 1'b1;
      pat = (WA+WB)'({$urandom, $urandom});
      // Load the whole 22-bit chain: last link's MSB first.
      for (int i = WA + WB - 1; i >= 0; i--) begin
        shift_bit(pat[i], ob);
        // Bits leaving the chain are the previous round's pattern, MSB first.
        if (round > 0) check(ob == prev[i], "prog_out delays prog_in by the chain length");
        check(ctl_a == '0 && ctl_b == '0, "control is 0 while programming");
      end
      @(negedge clk);
      prog_en = 1'b0;
      #1;
      check(ctl_a == '0 && ctl_b == '0, "control still 0 before the load edge");
      @(posedge clk); #1;
      check(ctl_a == pat[WA-1:0], "3-bit link loaded one edge after prog_en falls");
      check(ctl_b == pat[WA+WB-1:WA], "19-bit link loaded one edge after prog_en falls");
      // prog_in is ignored while not programming.
      for (int i = 0; i < 8; i++) begin
        @(negedge clk);
        prog_in = 1'($urandom);
        @(posedge clk); #1;
        check(ctl_a == pat[WA-1:0] && ctl_b == pat[WA+WB-1:WA], "configuration holds while prog_en is low");
      end
      // The programming bank must not have moved either.
      prev = pat;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
