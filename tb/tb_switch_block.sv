// tb_switch_block: checks the disjoint switch block.
//
// 40 random 80-bit settings are programmed (the first four drive every pin
// of all sides with code 1, 2, 3 and 0 in turn). For each, 16 random words
// are put on the four bus inputs. Pin (side s, wire w) must be undriven for
// code 0 and otherwise carry wire w of side (s+code) mod 4, never any other
// wire: the disjoint rule.
module tb_switch_block;
  import fpga_pkg::*;
  localparam int unsigned L = SB_CFG;

  logic clk = 1'b0;
  logic prog_en = 1'b1;
  logic prog_in = 1'b0;
  logic prog_out;
  logic [FABRIC_W-1:0] bus_in [4];
  logic [FABRIC_W-1:0] bus_out [4];
  logic [FABRIC_W-1:0] bus_drv [4];
  int checks = 0, failures = 0;

  switch_block dut (.prog_clk(clk), .prog_en, .prog_in, .prog_out, .bus_in, .bus_out, .bus_drv);

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

  task automatic load_cfg(input logic [L-1:0] bits);
    for (int i = L - 1; i >= 0; i--) begin
      @(negedge clk);
      prog_en = 1'b1;
      prog_in = bits[i];
    end
    @(negedge clk);
    prog_en = 1'b0;
    @(posedge clk); #1;
  endtask

  initial begin
    logic [L-1:0] bits;
    for (int s = 0; s < 4; s++) bus_in[s] = '0;
    @(posedge clk);
    for (int k = 0; k < 40; k++) begin
      if (k < 4) for (int m = 0; m < 4 * FABRIC_W; m++) bits[2*m +: 2] = 2'((k + 1) % 4);
      else       bits = L'({$urandom, $urandom, $urandom});
      load_cfg(bits);
      for (int r = 0; r < 16; r++) begin
        for (int s = 0; s < 4; s++) bus_in[s] = FABRIC_W'($urandom);
        #1;
        for (int s = 0; s < 4; s++) begin
          for (int w = 0; w < FABRIC_W; w++) begin
            int unsigned code;
            code = int'(bits[2*(s*FABRIC_W + w) +: 2]);
            check(bus_drv[s][w] == (code != 0), $sformatf("drive side %0d wire %0d", s, w));
            check(bus_out[s][w] == ((code != 0) ? bus_in[(s + code) % 4][w] : 1'b0),
                  $sformatf("value side %0d wire %0d code %0d", s, w, code));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
