// tb_io_block: checks the IO block for every configuration and input.
//
// All 8 settings of the 3 configuration bits are programmed in turn, and for
// each every combination of pad_i, pad_i_en, from_fabric and
// from_fabric_drv is applied. Expected: the chip drives the pad only with the
// output enable set and a source selected; otherwise an external driver
// wins; otherwise the pull-up gives 1 and anything else 0, with pad_float set
// only when there is no pull at all. to_fabric always equals the pad level.
module tb_io_block;
  logic clk = 1'b0;
  logic prog_en = 1'b1;
  logic prog_in = 1'b0;
  logic prog_out;
  logic pad_i, pad_i_en, from_fabric, from_fabric_drv;
  logic pad_o, pad_oe, pad_float, to_fabric;
  int checks = 0, failures = 0;

  io_block dut (.prog_clk(clk), .prog_en, .prog_in, .prog_out, .pad_i, .pad_i_en, .pad_o,
                .pad_oe, .pad_float, .from_fabric, .from_fabric_drv, .to_fabric);

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

  task automatic load_cfg(input logic [2:0] bits);
    for (int i = 2; i >= 0; i--) begin
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
    for (int cfg = 0; cfg < 8; cfg++) begin
      bit oe, pu, pd;
      oe = cfg[0]; pu = cfg[1]; pd = cfg[2];
      load_cfg(3'(cfg));
      for (int v = 0; v < 16; v++) begin
        bit exp_oe, exp_lvl, exp_float;
        {pad_i, pad_i_en, from_fabric, from_fabric_drv} = 4'(v);
        #1;
        exp_oe    = oe && from_fabric_drv;
        exp_lvl   = exp_oe ? from_fabric : pad_i_en ? pad_i : pu;
        exp_float = !exp_oe && !pad_i_en && !pu && !pd;
        check(pad_oe == exp_oe, $sformatf("pad_oe cfg=%0d v=%0d", cfg, v));
        check(pad_o == exp_lvl, $sformatf("pad_o cfg=%0d v=%0d", cfg, v));
        check(pad_float == exp_float, $sformatf("pad_float cfg=%0d v=%0d", cfg, v));
        check(to_fabric == exp_lvl, $sformatf("to_fabric cfg=%0d v=%0d", cfg, v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
