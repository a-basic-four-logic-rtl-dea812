// tb_logic_cluster: checks a logic cluster (interconnect matrix + 5 BLEs)
// against a cycle model.
//
// Each of 60 random 175-bit settings gives every BLE a random LUT and mode
// and every BLE input a random source: ground, one of the 10 fabric wires,
// or another BLE's output. A BLE may read the combinational output of a
// lower-numbered BLE or the registered output of any BLE, so the setting
// never closes a loop without a flip-flop. For 30 clk cycles per setting the
// fabric word is random and the five BLE outputs are compared with the model
// before each edge. Counters make sure local BLE-to-BLE nets through the
// matrix, flip-flop feedback and the clock enable were all exercised.
module tb_logic_cluster;
  import fpga_pkg::*;
  localparam int unsigned L = LC_CFG;

  logic clk = 1'b0;
  logic prog_en = 1'b1;
  logic prog_in = 1'b0;
  logic prog_out;
  logic [FABRIC_W-1:0]    fabric = '0;
  logic [BLES_PER_LC-1:0] ble_out;
  int checks = 0, failures = 0;
  int n_local = 0, n_feedback = 0, n_ce = 0;

  logic_cluster dut (.clk, .prog_clk(clk), .prog_en, .prog_in, .prog_out, .fabric, .ble_out);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
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
    ble_cfg_t    cfg [BLES_PER_LC];
    int unsigned sel [BLES_PER_LC][LUT_K];
    logic [L-1:0] bits;
    logic q [BLES_PER_LC];
    logic q_next [BLES_PER_LC];
    logic o [BLES_PER_LC];
    logic lut [BLES_PER_LC];
    @(posedge clk);
    for (int k = 0; k < 60; k++) begin
      for (int b = 0; b < BLES_PER_LC; b++) cfg[b] = ble_cfg_t'(19'($urandom));
      for (int b = 0; b < BLES_PER_LC; b++) begin
        for (int i = 0; i < LUT_K; i++) begin
          int unsigned s;
          s = $urandom_range(0, IM_IN - 1);
          if (s > FABRIC_W) begin
            int unsigned j;
            j = s - FABRIC_W - 1;
            if (j >= b && !cfg[j].reg_out) s = $urandom_range(0, FABRIC_W);
          end
          sel[b][i] = s;
          bits[(b*LUT_K + i)*IM_SEL +: IM_SEL] = IM_SEL'(s);
        end
        bits[IM_CFG + b*BLE_CFG +: BLE_CFG] = cfg[b];
      end
      load_cfg(bits);
      for (int b = 0; b < BLES_PER_LC; b++) q[b] = 1'b0;
      for (int t = 0; t < 30; t++) begin
        @(negedge clk);
        fabric = FABRIC_W'($urandom);
        #1;
        for (int b = 0; b < BLES_PER_LC; b++) begin
          logic [LUT_K-1:0] v;
          for (int i = 0; i < LUT_K; i++) begin
            int unsigned s;
            s = sel[b][i];
            if (s == 0)             v[i] = 1'b0;
            else if (s <= FABRIC_W) v[i] = fabric[s-1];
            else begin
              int unsigned j;
              j = s - FABRIC_W - 1;
              v[i] = cfg[j].reg_out ? q[j] : o[j];
              n_local++;
            end
          end
          if (cfg[b].feedback) begin
            v[0] = q[b];
            n_feedback++;
          end
          lut[b] = cfg[b].lut[v];
          o[b]   = cfg[b].reg_out ? q[b] : lut[b];
          if (cfg[b].ce_from_d && !v[3]) n_ce++;
        end
        for (int b = 0; b < BLES_PER_LC; b++)
          check(ble_out[b] == o[b], $sformatf("setting %0d cycle %0d BLE %0d", k, t, b));
        for (int b = 0; b < BLES_PER_LC; b++) begin
          logic [LUT_K-1:0] v;
          v[3] = (sel[b][3] == 0) ? 1'b0 : (sel[b][3] <= FABRIC_W) ? fabric[sel[b][3]-1]
               : (cfg[sel[b][3]-FABRIC_W-1].reg_out ? q[sel[b][3]-FABRIC_W-1] : o[sel[b][3]-FABRIC_W-1]);
          q_next[b] = (!cfg[b].ce_from_d || v[3]) ? lut[b] : q[b];
        end
        q = q_next;
        @(posedge clk); #1;
      end
    end
    checks++;
    if (n_local == 0 || n_feedback == 0 || n_ce == 0) failures++;
    $display("local nets %0d, feedback uses %0d, held by enable %0d", n_local, n_feedback, n_ce);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
