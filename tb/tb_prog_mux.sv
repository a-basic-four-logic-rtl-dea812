// tb_prog_mux: checks the programmable multiplexer.
//
// Two muxes in one chain: 8 inputs (3 select bits, every code used) and 11
// inputs (4 select bits, codes 11..15 unused). For every select code the
// test programs both muxes through the chain and compares out and active
// with a model: code 0 or an unused code gives out 0 and active 0, any other
// code c gives out = in[c] and active 1, for 16 random input words each.
module tb_prog_mux;
  logic clk = 1'b0;
  logic prog_en = 1'b1;
  logic prog_in = 1'b0;
  logic mid, prog_out;
  logic [7:0]  in_a;
  logic [10:0] in_b;
  logic out_a, act_a, out_b, act_b;
  int checks = 0, failures = 0;

  prog_mux #(.N_IN(8))  dut_a (.prog_clk(clk), .prog_en, .prog_in, .prog_out(mid), .in(in_a), .out(out_a), .active(act_a));
  prog_mux #(.N_IN(11)) dut_b (.prog_clk(clk), .prog_en, .prog_in(mid), .prog_out, .in(in_b), .out(out_b), .active(act_b));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  task automatic load_cfg(input logic [6:0] bits);
    for (int i = 6; i >= 0; i--) begin
      @(negedge clk);
      prog_en = 1'b1;
      prog_in = bits[i];
    end
    @(negedge clk);
    prog_en = 1'b0;
    @(posedge clk); #1;
  endtask

  initial begin
    @(posedge clk);
    for (int code = 0; code < 16; code++) begin
      logic [2:0] sa;
      logic [3:0] sb;
      sa = 3'(code);
      sb = 4'(15 - code);
      load_cfg({sb, sa});
      for (int r = 0; r < 16; r++) begin
        in_a = 8'($urandom);
        in_b = 11'($urandom);
        #1;
        check(act_a == (sa != 0), $sformatf("8-input active for code %0d", sa));
        check(out_a == ((sa != 0) ? in_a[sa] : 1'b0), $sformatf("8-input out for code %0d", sa));
        check(act_b == (sb != 0 && sb < 11), $sformatf("11-input active for code %0d", sb));
        check(out_b == ((sb != 0 && sb < 11) ? in_b[sb] : 1'b0), $sformatf("11-input out for code %0d", sb));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
