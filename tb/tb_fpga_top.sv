// tb_fpga_top: programs the whole FPGA four times through its 1480-bit
// configuration chain and runs a design each time, at the default sizes.
//
// The bitstreams are placed and routed by hand below, with helper functions
// that set one field of the chain (an IO block, a connection-box mux, a
// switch-block pin, an interconnect-matrix input or a BLE). Each design is
// compared with a model in this testbench.
//
//  A  4-bit adder. a[1:0], b[1:0] enter on north pins 0-3 and reach the NW
//     cluster through the north switch block; a[3:2], b[3:2] enter on south
//     pins 10-13 and reach the SW cluster through the south block. The carry
//     out of bit 1 crosses west -> centre -> south switch blocks. The sum
//     leaves on west pins 15-19. All 256 input pairs are checked.
//  B  Set/clear register (flip-flop with its output fed back to LUT input A)
//     and a register loaded only when BLE input D is high, in the NE cluster,
//     fed from east pins through east -> centre -> north switch blocks; plus
//     pull-up / pull-down / external drive on south pins 12-14, read back
//     through the SE cluster and out on west pins over the centre block.
//  C  The sequence detector for "101100100": ten states in a 4-bit binary
//     state register, synchronous reset, seven-segment (active-low) state
//     display on 7 pins. Each cluster holds one state bit (two LUTs for the
//     next value with the input at 0 and at 1, and a third LUT choosing
//     between them and applying reset, its flip-flop holding the bit) and
//     one or two display LUTs. Input, reset and the four state bits are
//     broadcast to all four clusters on tracks 0-5 through the centre block.
//
//  D  The same detector for "101100101": only LUT contents change.
//
// While loading B, C and D, the bits leaving prog_out are compared with the
// previous bitstream, which checks the chain length and order end to end.
// Every mechanism exercised is counted and must occur at least once.
module tb_fpga_top;
  import fpga_pkg::*;

  localparam int unsigned L = TOTAL_CFG;
  localparam int unsigned NORTH = 0, EAST = 1, SOUTH = 2, WEST = 3;   // banks, switch blocks 0..3
  localparam int unsigned CENTRE = 4;
  localparam int unsigned NW = 0, NE = 1, SW = 2, SE = 3;             // clusters

  localparam core_elem_e SB_CH  [5] = '{CH_N_SB, CH_E_SB, CH_S_SB, CH_W_SB, CH_C_SB};
  localparam core_elem_e ICB_CH [4] = '{CH_N_ICB, CH_E_ICB, CH_S_ICB, CH_W_ICB};
  localparam core_elem_e OCB_CH [4] = '{CH_N_OCB, CH_E_OCB, CH_S_OCB, CH_W_OCB};
  localparam core_elem_e LC_CH  [4] = '{CH_NW_LC, CH_NE_LC, CH_SW_LC, CH_SE_LC};
  localparam core_elem_e LCB_CH [4] = '{CH_NW_LCB, CH_NE_LCB, CH_SW_LCB, CH_SE_LCB};

  logic clk = 1'b0;
  logic prog_en = 1'b1;
  logic prog_in = 1'b0;
  logic prog_out;
  logic [N_IOS-1:0] pad_i = '0, pad_i_en = '0;
  logic [N_IOS-1:0] pad_o, pad_oe, pad_float;
  logic contention;

  fpga_top dut (.clk, .prog_clk(clk), .prog_en, .prog_in, .prog_out, .pad_i, .pad_i_en,
                .pad_o, .pad_oe, .pad_float, .contention);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_programmed = 0, n_readback = 0, n_add = 0, n_carry_global = 0;
  int n_set = 0, n_clr = 0, n_hold = 0, n_ce_hold = 0, n_ce_load = 0;
  int n_pullup = 0, n_pulldown = 0, n_override = 0, n_float = 0;
  int n_detect = 0, n_fallback = 0, n_reset = 0;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  // ------------------------------------------------ bitstream field setters
  logic [L-1:0] bs;

  function automatic void set_io(int unsigned io, bit oe, bit pu, bit pd);
    bs[io_offset(io) +: IOB_CFG] = {pd, pu, oe};
  endfunction
  // IO input box of a bank: fabric wire <- pin k of the bank
  function automatic void set_icb(int unsigned bank, int unsigned trk, int unsigned k);
    bs[core_offset(ICB_CH[bank]) + trk*ICB_SEL +: ICB_SEL] = ICB_SEL'(k + 1);
  endfunction
  // IO output box of a bank: pin k of the bank <- fabric wire
  function automatic void set_ocb(int unsigned bank, int unsigned k, int unsigned trk);
    bs[core_offset(OCB_CH[bank]) + k*OCB_SEL +: OCB_SEL] = OCB_SEL'(trk + 1);
  endfunction
  // cluster output box: fabric wire <- BLE b
  function automatic void set_lcb(int unsigned c, int unsigned trk, int unsigned b);
    bs[core_offset(LCB_CH[c]) + trk*LCB_SEL +: LCB_SEL] = LCB_SEL'(b + 1);
  endfunction
  // switch block: pin (side, wire) driven from the same wire on side `from`
  function automatic void set_sb(int unsigned sb, side_e side, int unsigned trk, side_e from);
    int unsigned code;
    code = (int'(from) - int'(side) + 4) % 4;
    bs[core_offset(SB_CH[sb]) + SB_SEL*(int'(side)*FABRIC_W + trk) +: SB_SEL] = SB_SEL'(code);
  endfunction
  // interconnect matrix: input i of BLE b <- fabric wire
  function automatic void set_im_wire(int unsigned c, int unsigned b, int unsigned i, int unsigned trk);
    bs[core_offset(LC_CH[c]) + (b*LUT_K + i)*IM_SEL +: IM_SEL] = IM_SEL'(trk + 1);
  endfunction
  // interconnect matrix: input i of BLE b <- output of BLE j in the same cluster
  function automatic void set_im_ble(int unsigned c, int unsigned b, int unsigned i, int unsigned j);
    bs[core_offset(LC_CH[c]) + (b*LUT_K + i)*IM_SEL +: IM_SEL] = IM_SEL'(1 + FABRIC_W + j);
  endfunction
  function automatic void set_ble(int unsigned c, int unsigned b, logic [15:0] lut,
                                  bit feedback, bit ce_from_d, bit reg_out);
    ble_cfg_t cfg;
    cfg = '{reg_out: reg_out, ce_from_d: ce_from_d, feedback: feedback, lut: lut};
    bs[core_offset(LC_CH[c]) + IM_CFG + b*BLE_CFG +: BLE_CFG] = cfg;
  endfunction

  // Truth tables, index {D,C,B,A}.
  localparam logic [15:0] LUT_A    = 16'hAAAA;
  localparam logic [15:0] LUT_B    = 16'hCCCC;
  localparam logic [15:0] LUT_XOR2 = 16'h6666;  // A^B
  localparam logic [15:0] LUT_AND2 = 16'h8888;  // A&B
  localparam logic [15:0] LUT_XOR3 = 16'h9696;  // A^B^C
  localparam logic [15:0] LUT_MAJ3 = 16'hE8E8;  // majority(A,B,C)
  localparam logic [15:0] LUT_SR   = 16'hCECE;  // B | (A & ~C): set B, clear C, hold A

  // Shift bs in (chain end first) and compare what leaves with `prev`.
  task automatic load_bitstream(input logic [L-1:0] prev, input bit cmp);
    int bad;
    bad = 0;
    for (int i = L - 1; i >= 0; i--) begin
      @(negedge clk);
      prog_en = 1'b1;
      if (cmp && prog_out !== prev[i]) bad++;
      prog_in = bs[i];
    end
    @(negedge clk);
    prog_en = 1'b0;
    @(posedge clk); #1;
    n_programmed++;
    if (cmp) begin
      check(bad == 0, $sformatf("chain readback: %0d of %0d bits differ", bad, L));
      if (bad == 0) n_readback++;
    end
  endtask

  // ------------------------------------------------------------ design A
  function automatic void build_adder();
    bs = '0;
    // inputs a0,a1,b0,b1 on north pins 0..3 -> tracks 0..3 -> NW cluster
    for (int w = 0; w < 4; w++) begin
      set_icb(NORTH, w, w);
      set_sb(NORTH, SIDE_W, w, SIDE_N);
    end
    // inputs a2,a3,b2,b3 on south pins 10..13 -> tracks 0..3 -> SW cluster
    for (int w = 0; w < 4; w++) begin
      set_icb(SOUTH, w, w);
      set_sb(SOUTH, SIDE_W, w, SIDE_S);
    end
    // NW: s0 = a0^b0, c1 = a0&b0, s1 = a1^b1^c1, c2 = maj(a1,b1,c1)
    set_im_wire(NW, 0, 0, 0); set_im_wire(NW, 0, 1, 2); set_ble(NW, 0, LUT_XOR2, 0, 0, 0);
    set_im_wire(NW, 1, 0, 0); set_im_wire(NW, 1, 1, 2); set_ble(NW, 1, LUT_AND2, 0, 0, 0);
    set_im_wire(NW, 2, 0, 1); set_im_wire(NW, 2, 1, 3); set_im_ble(NW, 2, 2, 1); set_ble(NW, 2, LUT_XOR3, 0, 0, 0);
    set_im_wire(NW, 3, 0, 1); set_im_wire(NW, 3, 1, 3); set_im_ble(NW, 3, 2, 1); set_ble(NW, 3, LUT_MAJ3, 0, 0, 0);
    // NW outputs: c2 on track 4, s0 on 5, s1 on 6 (west switch block north bus)
    set_lcb(NW, 4, 3); set_lcb(NW, 5, 0); set_lcb(NW, 6, 2);
    // c2: west N -> E, centre W -> S, south N -> W
    set_sb(WEST, SIDE_E, 4, SIDE_N);
    set_sb(CENTRE, SIDE_S, 4, SIDE_W);
    set_sb(SOUTH, SIDE_W, 4, SIDE_N);
    // s0, s1: west N -> S
    set_sb(WEST, SIDE_S, 5, SIDE_N);
    set_sb(WEST, SIDE_S, 6, SIDE_N);
    // SW: s2 = a2^b2^c2, c3 = maj, s3 = a3^b3^c3, c4 = maj
    set_im_wire(SW, 0, 0, 0); set_im_wire(SW, 0, 1, 2); set_im_wire(SW, 0, 2, 4); set_ble(SW, 0, LUT_XOR3, 0, 0, 0);
    set_im_wire(SW, 1, 0, 0); set_im_wire(SW, 1, 1, 2); set_im_wire(SW, 1, 2, 4); set_ble(SW, 1, LUT_MAJ3, 0, 0, 0);
    set_im_wire(SW, 2, 0, 1); set_im_wire(SW, 2, 1, 3); set_im_ble(SW, 2, 2, 1);  set_ble(SW, 2, LUT_XOR3, 0, 0, 0);
    set_im_wire(SW, 3, 0, 1); set_im_wire(SW, 3, 1, 3); set_im_ble(SW, 3, 2, 1);  set_ble(SW, 3, LUT_MAJ3, 0, 0, 0);
    // SW outputs s2, s3, c4 on tracks 7, 8, 9 (west switch block south bus)
    set_lcb(SW, 7, 0); set_lcb(SW, 8, 2); set_lcb(SW, 9, 3);
    // west pins 15..19 <- tracks 5..9
    for (int k = 0; k < 5; k++) begin
      set_ocb(WEST, k, 5 + k);
      set_io(15 + k, 1, 0, 0);
    end
  endfunction

  task automatic run_adder();
    for (int v = 0; v < 256; v++) begin
      logic [3:0] a, b;
      logic [4:0] sum;
      {a, b} = 8'(v);
      @(negedge clk);
      pad_i_en = '0;
      pad_i    = '0;
      pad_i_en[3:0]   = '1;
      pad_i_en[13:10] = '1;
      {pad_i[1], pad_i[0]}   = a[1:0];
      {pad_i[3], pad_i[2]}   = b[1:0];
      {pad_i[11], pad_i[10]} = a[3:2];
      {pad_i[13], pad_i[12]} = b[3:2];
      #1;
      sum = pad_o[19:15];
      check(sum == 5'(a) + 5'(b), $sformatf("adder %0d + %0d gave %0d", a, b, sum));
      check(pad_oe == 20'hF8000, "adder: only west pins drive");
      check(!contention, "adder: no fabric contention");
      n_add++;
      if (a[1] & b[1] | ((a[1] ^ b[1]) & a[0] & b[0])) n_carry_global++;
    end
    check(pad_float[4] && pad_float[9] && !pad_float[0], "unused, undriven pads float");
    if (pad_float[4]) n_float++;
  endtask

  // ------------------------------------------------------------ design B
  function automatic void build_register();
    bs = '0;
    // set (pin 5), clr (pin 6), enable (pin 8) -> tracks 0, 1, 2 on the east
    // switch block's south bus -> east W -> centre N -> north E -> NE cluster
    set_icb(EAST, 0, 0); set_icb(EAST, 1, 1); set_icb(EAST, 2, 3);
    for (int w = 0; w < 3; w++) begin
      set_sb(EAST, SIDE_W, w, SIDE_S);
      set_sb(CENTRE, SIDE_N, w, SIDE_E);
      set_sb(NORTH, SIDE_E, w, SIDE_S);
    end
    // data (pin 4) -> track 4 -> north N -> E
    set_icb(NORTH, 4, 4);
    set_sb(NORTH, SIDE_E, 4, SIDE_N);
    // NE BLE0: set/clear register, A = own flip-flop, B = set, C = clr
    set_im_wire(NE, 0, 1, 0); set_im_wire(NE, 0, 2, 1);
    set_ble(NE, 0, LUT_SR, 1, 0, 1);
    // NE BLE1: q <= data when enable (input D) is high
    set_im_wire(NE, 1, 0, 4); set_im_wire(NE, 1, 3, 2);
    set_ble(NE, 1, LUT_A, 0, 1, 1);
    // outputs: BLE0 -> track 3 -> pin 7, BLE1 -> track 5 -> pin 9
    set_lcb(NE, 3, 0); set_lcb(NE, 5, 1);
    set_ocb(EAST, 2, 3); set_ocb(EAST, 4, 5);
    set_io(7, 1, 0, 0); set_io(9, 1, 0, 0);
    // pulls: pin 14 pull-up, pin 13 pull-down, pin 12 pull-up (driven externally)
    set_io(14, 0, 1, 0); set_io(13, 0, 0, 1); set_io(12, 0, 1, 0);
    set_icb(SOUTH, 9, 4); set_icb(SOUTH, 8, 3); set_icb(SOUTH, 7, 2);
    for (int w = 7; w < 10; w++) set_sb(SOUTH, SIDE_E, w, SIDE_S);
    // SE: BLE0 = A (track 9), BLE1 = B (track 8), BLE2 = C (track 7)
    set_im_wire(SE, 0, 0, 9); set_ble(SE, 0, LUT_A, 0, 0, 0);
    set_im_wire(SE, 1, 1, 8); set_ble(SE, 1, LUT_B, 0, 0, 0);
    set_im_wire(SE, 2, 2, 7); set_ble(SE, 2, 16'hF0F0, 0, 0, 0);
    // SE outputs on tracks 6, 7, 8 -> east S -> W, centre E -> W, west E -> S -> pins 15..17
    set_lcb(SE, 6, 0); set_lcb(SE, 7, 1); set_lcb(SE, 8, 2);
    for (int w = 6; w < 9; w++) begin
      set_sb(EAST, SIDE_W, w, SIDE_S);
      set_sb(CENTRE, SIDE_W, w, SIDE_E);
      set_sb(WEST, SIDE_S, w, SIDE_E);
      set_ocb(WEST, w - 6, w);
      set_io(15 + w - 6, 1, 0, 0);
    end
  endfunction

  task automatic run_register();
    logic q_sr, q_en;
    q_sr = 1'b0;
    q_en = 1'b0;
    // pull checks: pin 12 driven low externally despite its pull-up
    @(negedge clk);
    pad_i_en = '0;
    pad_i    = '0;
    pad_i_en[12] = 1'b1;
    pad_i_en[5] = 1'b1; pad_i_en[6] = 1'b1; pad_i_en[8] = 1'b1; pad_i_en[4] = 1'b1;
    #1;
    check(pad_o[15] == 1'b1, "pull-up pin reads 1 through the fabric");
    check(pad_o[16] == 1'b0 && !pad_float[13], "pull-down pin reads 0 and is not floating");
    check(pad_o[17] == 1'b0, "external driver overrides the pull-up");
    if (pad_o[15]) n_pullup++;
    if (!pad_o[16] && !pad_float[13]) n_pulldown++;
    if (!pad_o[17]) n_override++;
    @(negedge clk);
    pad_i[12] = 1'b1;
    #1;
    check(pad_o[17] == 1'b1, "external 1 on pin 12 reaches pin 17");
    check(pad_o[9] == 1'b0 && pad_o[7] == 1'b0, "flip-flops start at 0 after programming");
    for (int t = 0; t < 200; t++) begin
      logic set, clr, d, en;
      @(negedge clk);
      set = ($urandom_range(0, 3) == 0);
      clr = ($urandom_range(0, 3) == 0);
      d   = 1'($urandom);
      en  = 1'($urandom);
      pad_i[5] = set; pad_i[6] = clr; pad_i[4] = d; pad_i[8] = en;
      #1;
      check(pad_o[7] == q_sr, $sformatf("set/clear register cycle %0d", t));
      check(pad_o[9] == q_en, $sformatf("enabled register cycle %0d", t));
      check(!contention, "register: no fabric contention");
      if (set) n_set++;
      else if (clr) n_clr++;
      else n_hold++;
      if (en) n_ce_load++; else n_ce_hold++;
      q_sr = set | (q_sr & ~clr);
      if (en) q_en = d;
      @(posedge clk); #1;
      check(pad_o[7] == q_sr && pad_o[9] == q_en, "registers update on the clock edge");
    end
  endtask

  // ------------------------------------------------------------ design C
  // Pattern being detected, first bit in the MSB.
  logic [8:0] PATTERN = 9'b101100100;

  // Next state of the detector: the longest prefix of PATTERN that ends the
  // bits seen so far (state k = first k pattern bits matched).
  function automatic int unsigned next_state(int unsigned k, bit c);
    bit seq [10];
    int unsigned n;
    if (k > 9) return 0;
    for (int i = 0; i < int'(k); i++) seq[i] = PATTERN[8 - i];
    n = k;
    for (int len = (k + 1 > 9) ? 9 : k + 1; len > 0; len--) begin
      bit ok;
      ok = 1'b1;
      for (int i = 0; i < len; i++) begin
        bit s;
        s = (i == len - 1) ? c : seq[n - (len - 1) + i];
        if (s != PATTERN[8 - i]) ok = 1'b0;
      end
      if (ok) return len;
    end
    return 0;
  endfunction

  // Active-low seven-segment code {a,b,c,d,e,f,g} of a digit.
  function automatic logic [6:0] seg7(int unsigned d);
    logic [6:0] on;
    case (d)
      0: on = 7'b1111110; 1: on = 7'b0110000; 2: on = 7'b1101101; 3: on = 7'b1111001;
      4: on = 7'b0110011; 5: on = 7'b1011011; 6: on = 7'b1011111; 7: on = 7'b1110000;
      8: on = 7'b1111111; 9: on = 7'b1111011; default: on = 7'b0000000;
    endcase
    return ~on;
  endfunction

  function automatic void build_detector();
    bs = '0;
    // seq_in on north pin 0 -> track 0, reset on north pin 1 -> track 1,
    // broadcast to all four clusters through north, centre and south blocks
    for (int w = 0; w < 2; w++) begin
      set_icb(NORTH, w, w);
      set_sb(NORTH, SIDE_W, w, SIDE_N);
      set_sb(NORTH, SIDE_E, w, SIDE_N);
      set_sb(NORTH, SIDE_S, w, SIDE_N);
      set_sb(CENTRE, SIDE_S, w, SIDE_N);
      set_sb(SOUTH, SIDE_W, w, SIDE_N);
      set_sb(SOUTH, SIDE_E, w, SIDE_N);
    end
    // state bit i lives in cluster i: NW s0, NE s1, SW s2, SE s3, on track 2+i
    for (int c = 0; c < 4; c++) begin
      logic [15:0] g0, g1;
      for (int s = 0; s < 16; s++) begin
        g0[s] = 1'(next_state(s, 1'b0) >> c);
        g1[s] = 1'(next_state(s, 1'b1) >> c);
      end
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < 4; i++) set_im_wire(c, b, i, 2 + i);
      set_ble(c, 0, g0, 0, 0, 0);
      set_ble(c, 1, g1, 0, 0, 0);
      // BLE2: A = seq_in, B = g0, C = g1, D = reset; registered
      set_im_wire(c, 2, 0, 0); set_im_ble(c, 2, 1, 0); set_im_ble(c, 2, 2, 1); set_im_wire(c, 2, 3, 1);
      begin
        logic [15:0] m;
        for (int x = 0; x < 16; x++) m[x] = x[3] ? 1'b0 : (x[0] ? x[2] : x[1]);
        set_ble(c, 2, m, 0, 0, 1);
      end
      set_lcb(c, 2 + c, 2);
    end
    // state bits onto the centre: s0, s2 from the west block, s1, s3 from the east block
    set_sb(WEST, SIDE_E, 2, SIDE_N);
    set_sb(WEST, SIDE_E, 4, SIDE_S);
    set_sb(EAST, SIDE_W, 3, SIDE_N);
    set_sb(EAST, SIDE_W, 5, SIDE_S);
    set_sb(CENTRE, SIDE_N, 2, SIDE_W); set_sb(CENTRE, SIDE_S, 2, SIDE_W); set_sb(CENTRE, SIDE_E, 2, SIDE_W);
    set_sb(CENTRE, SIDE_N, 4, SIDE_W); set_sb(CENTRE, SIDE_S, 4, SIDE_W); set_sb(CENTRE, SIDE_E, 4, SIDE_W);
    set_sb(CENTRE, SIDE_N, 3, SIDE_E); set_sb(CENTRE, SIDE_S, 3, SIDE_E); set_sb(CENTRE, SIDE_W, 3, SIDE_E);
    set_sb(CENTRE, SIDE_N, 5, SIDE_E); set_sb(CENTRE, SIDE_S, 5, SIDE_E); set_sb(CENTRE, SIDE_W, 5, SIDE_E);
    for (int w = 2; w < 6; w++) begin
      set_sb(NORTH, SIDE_W, w, SIDE_S); set_sb(NORTH, SIDE_E, w, SIDE_S);
      set_sb(SOUTH, SIDE_W, w, SIDE_N); set_sb(SOUTH, SIDE_E, w, SIDE_N);
    end
    // display segments (bit 6 = a ... bit 0 = g): NW a,b; NE c,d; SW e,f; SE g
    begin
      int unsigned seg_cl [7] = '{NW, NW, NE, NE, SW, SW, SE};
      int unsigned seg_bl [7] = '{3, 4, 3, 4, 3, 4, 3};
      int unsigned seg_tr [7] = '{6, 7, 6, 7, 8, 9, 8};
      for (int g = 0; g < 7; g++) begin
        logic [15:0] t;
        for (int s = 0; s < 16; s++) t[s] = seg7(s)[6 - g];
        for (int i = 0; i < 4; i++) set_im_wire(seg_cl[g], seg_bl[g], i, 2 + i);
        set_ble(seg_cl[g], seg_bl[g], t, 0, 0, 0);
        set_lcb(seg_cl[g], seg_tr[g], seg_bl[g]);
      end
    end
    // a,b: west N -> S -> pins 15,16; e,f: pins 17,18; c,d: east pins 5,6; g: east S -> N -> pin 7
    set_sb(WEST, SIDE_S, 6, SIDE_N); set_sb(WEST, SIDE_S, 7, SIDE_N);
    set_sb(EAST, SIDE_N, 8, SIDE_S);
    for (int k = 0; k < 4; k++) begin
      set_ocb(WEST, k, 6 + k);
      set_io(15 + k, 1, 0, 0);
    end
    for (int k = 0; k < 3; k++) begin
      set_ocb(EAST, k, 6 + k);
      set_io(5 + k, 1, 0, 0);
    end
  endfunction

  function automatic logic [6:0] display_pins();
    return {pad_o[15], pad_o[16], pad_o[5], pad_o[6], pad_o[17], pad_o[18], pad_o[7]};
  endfunction

  task automatic run_detector();
    int unsigned st;
    bit stream [$];
    bit rsts [$];
    // a clean match of the pattern, then "100", "1011011001000", then a
    // match cut short by reset, then random bits
    bit seqs [4][$] = '{'{1,0,1,1,0,0,1,0,0}, '{1,0,0},
                        '{1,0,1,1,0,1,1,0,0,1,0,0,0}, '{1,0,1,1,0,1}};
    int det;
    det = 0;
    for (int i = 0; i < 9; i++) seqs[0][i] = PATTERN[8 - i];
    st = 0;
    // two reset cycles first
    for (int i = 0; i < 2; i++) begin stream.push_back(0); rsts.push_back(1); end
    foreach (seqs[s]) foreach (seqs[s][i]) begin
      stream.push_back(seqs[s][i]);
      rsts.push_back(s == 3 && i == 5);
    end
    for (int i = 0; i < 300; i++) begin
      stream.push_back($urandom_range(0, 2) != 0);
      rsts.push_back($urandom_range(0, 60) == 0);
    end
    @(negedge clk);
    pad_i_en = '0;
    pad_i    = '0;
    pad_i_en[1:0] = '1;
    foreach (stream[t]) begin
      int unsigned nx;
      @(negedge clk);
      pad_i[0] = stream[t];
      pad_i[1] = rsts[t];
      #1;
      check(display_pins() == seg7(st), $sformatf("detector step %0d: state %0d shows %02h", t, st, display_pins()));
      check(!contention, "detector: no fabric contention");
      nx = rsts[t] ? 0 : next_state(st, stream[t]);
      if (rsts[t] && st != 0) n_reset++;
      if (!rsts[t] && nx == 9) begin
        n_detect++;
        det++;
      end
      if (!rsts[t] && nx != st + 1 && st != 9) n_fallback++;
      st = nx;
      @(posedge clk);
    end
    check(det > 0, $sformatf("pattern %b detected", PATTERN));
  endtask

  // ------------------------------------------------------------ sequence
  initial begin
    logic [L-1:0] prev;
    check(L == 1480, "configuration chain is 1480 bits");
    @(posedge clk);
    // Before programming every pad is quiet.
    check(pad_oe == '0 && !contention, "nothing drives before programming");

    build_adder();
    load_bitstream('0, 1'b0);
    run_adder();
    prev = bs;

    build_register();
    load_bitstream(prev, 1'b1);
    run_register();
    prev = bs;

    build_detector();
    load_bitstream(prev, 1'b1);
    run_detector();
    prev = bs;

    // The same detector for the pattern "101100101", placed the same way.
    PATTERN = 9'b101100101;
    build_detector();
    load_bitstream(prev, 1'b1);
    run_detector();

    $display("programmed %0d, readback %0d, add %0d (carry via centre %0d), set %0d clr %0d hold %0d,",
             n_programmed, n_readback, n_add, n_carry_global, n_set, n_clr, n_hold);
    $display("enable load %0d hold %0d, pull-up %0d pull-down %0d override %0d float %0d,",
             n_ce_load, n_ce_hold, n_pullup, n_pulldown, n_override, n_float);
    $display("detections %0d fallbacks %0d resets %0d", n_detect, n_fallback, n_reset);
    begin
      int counts [];
      counts = '{n_programmed, n_readback, n_add, n_carry_global, n_set, n_clr, n_hold,
                        n_ce_load, n_ce_hold, n_pullup, n_pulldown, n_override, n_float,
                        n_detect, n_fallback, n_reset};
      foreach (counts[i]) check(counts[i] > 0, $sformatf("mechanism %0d never happened", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
