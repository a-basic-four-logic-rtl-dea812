// tb_ble: checks the basic logic element against a cycle model.
//
// Directed settings first (pure 4-input XOR LUT, registered AND with clock
// enable from D, a toggle flip-flop built with the feedback path), then 60
// random 19-bit settings. After each programming the flip-flop must read 0;
// then for 40 clk cycles random inputs are applied and the output is compared
// before every edge with a model of the LUT, the feedback mux, the enable mux
// and the output mux. The flip-flop must update on the edge that samples the
// LUT, i.e. one cycle of latency.
module tb_ble;
  import fpga_pkg::*;

  logic clk = 1'b0;
  logic prog_en = 1'b1;
  logic prog_in = 1'b0;
  logic prog_out;
  logic [3:0] in = '0;
  logic out;
  int checks = 0, failures = 0;

  ble dut (.clk, .prog_clk(clk), .prog_en, .prog_in, .prog_out, .in, .out);

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

  task automatic load_cfg(input ble_cfg_t c);
    logic [BLE_CFG-1:0] bits;
    bits = c;
    for (int i = BLE_CFG - 1; i >= 0; i--) begin
      @(negedge clk);
      prog_en = 1'b1;
      prog_in = bits[i];
    end
    @(negedge clk);
    prog_en = 1'b0;
    @(posedge clk); #1;
  endtask

  // Run n cycles with random (or fixed-pattern) inputs against the model.
  task automatic run(input ble_cfg_t c, input int n);
    logic q, a, lut, ce, exp_out;
    logic [3:0] idx;
    q = 1'b0;
    for (int t = 0; t < n; t++) begin
      @(negedge clk);
      in = 4'($urandom);
      #1;
      idx    = in;
      a      = c.feedback ? q : in[0];
      idx[0] = a;
      lut    = c.lut[idx];
      ce     = c.ce_from_d ? in[3] : 1'b1;
      exp_out = c.reg_out ? q : lut;
      check(out == exp_out, $sformatf("cfg=%05h cycle %0d in=%h", c, t, in));
      if (ce) q = lut;
      @(posedge clk); #1;
      if (c.reg_out) begin
        check(out == q, $sformatf("registered output follows after one edge, cfg=%05h", c));
      end
    end
  endtask

  initial begin
    ble_cfg_t c;
    @(posedge clk);
    // 4-input XOR, combinational
    c = '{reg_out: 1'b0, ce_from_d: 1'b0, feedback: 1'b0, lut: 16'h6996};
    load_cfg(c);
    run(c, 40);
    // registered B&C with enable on D
    c = '{reg_out: 1'b1, ce_from_d: 1'b1, feedback: 1'b0, lut: 16'hC0C0};
    load_cfg(c);
    check(out == 1'b0, "flip-flop cleared by programming");
    run(c, 40);
    // toggle flip-flop: LUT = !A, A fed back from the flip-flop
    c = '{reg_out: 1'b1, ce_from_d: 1'b0, feedback: 1'b1, lut: 16'h5555};
    load_cfg(c);
    run(c, 40);
    for (int k = 0; k < 60; k++) begin
      c = ble_cfg_t'(19'($urandom));
      load_cfg(c);
      check(!c.reg_out || out == 1'b0, "flip-flop cleared by programming");
      run(c, 40);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
