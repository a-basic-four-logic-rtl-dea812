// tb_conn_box: checks the connection box in its IO-input size (5 sources,
// 10 outputs, 3 select bits each, 30 bits in the chain).
//
// 40 random settings are programmed (each output gets a code 0..7, so both
// "no source" codes 0, 6 and 7 and every real source appear), and for each
// 16 random source words are applied. Output o must equal source sel-1 and
// drive must be set exactly for codes 1..5; otherwise out reads 0. A chain
// readback check confirms that the box passes 30 bits from prog_in to
// prog_out.
module tb_conn_box;
  localparam int unsigned N_SRC = 5;
  localparam int unsigned N_OUT = 10;
  localparam int unsigned SEL_W = 3;
  localparam int unsigned L     = N_OUT * SEL_W;

  logic clk = 1'b0;
  logic prog_en = 1'b1;
  logic prog_in = 1'b0;
  logic prog_out;
  logic [N_SRC-1:0] src = '0;
  logic [N_OUT-1:0] out, drive;
  int checks = 0, failures = 0;

  conn_box #(.N_SRC(N_SRC), .N_OUT(N_OUT)) dut (.prog_clk(clk), .prog_en, .prog_in, .prog_out,
                                               .src, .out, .drive);

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

  // Shift a configuration in; the bits that fall out are the previous one.
  task automatic load_cfg(input logic [L-1:0] bits, input logic [L-1:0] prev, input bit cmp);
    for (int i = L - 1; i >= 0; i--) begin
      @(negedge clk);
      prog_en = 1'b1;
      if (cmp) check(prog_out == prev[i], "chain passes 30 bits through");
      prog_in = bits[i];
    end
    @(negedge clk);
    prog_en = 1'b0;
    @(posedge clk); #1;
  endtask

  initial begin
    logic [L-1:0] bits, prev;
    prev = '0;
    @(posedge clk);
    for (int k = 0; k < 40; k++) begin
      for (int o = 0; o < N_OUT; o++) bits[o*SEL_W +: SEL_W] = SEL_W'((o + k) % 8);
      if (k >= 8) bits = L'({$urandom, $urandom});
      load_cfg(bits, prev, k > 0);
      prev = bits;
      for (int r = 0; r < 16; r++) begin
        src = N_SRC'($urandom);
        #1;
        for (int o = 0; o < N_OUT; o++) begin
          int unsigned s;
          bit exp_drv;
          s = int'(bits[o*SEL_W +: SEL_W]);
          exp_drv = (s >= 1) && (s <= N_SRC);
          check(drive[o] == exp_drv, $sformatf("drive[%0d] code %0d", o, s));
          check(out[o] == (exp_drv ? src[s-1] : 1'b0), $sformatf("out[%0d] code %0d", o, s));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
