// fpga_top: a small island-style FPGA with four logic clusters joined by a
// disjoint-switch fabric.
//
// Five disjoint switch blocks (north, east, south, west, centre) join
// sixteen 10-wire fabric buses. Each bus, the switch-block side it belongs
// to, and what else hangs on it:
//
//   bus  switch-block side(s)     other blocks on the bus
//   NN   north.N                  north IO input box (drives), north IO output box (reads)
//   NW   north.W                  NW cluster (reads)
//   NE   north.E                  NE cluster (reads)
//   CN   north.S, centre.N        -
//   SS   south.S                  south IO input box (drives), south IO output box (reads)
//   SW   south.W                  SW cluster (reads)
//   SE   south.E                  SE cluster (reads)
//   CS   south.N, centre.S        -
//   WN   west.N                   west IO input box and NW cluster-output box (drive)
//   WS   west.S                   SW cluster-output box (drives), west IO output box (reads)
//   CW   west.E, centre.W         -
//   WW   west.W                   - (leads nowhere)
//   EN   east.N                   NE cluster-output box (drives), east IO output box (reads)
//   ES   east.S                   east IO input box and SE cluster-output box (drive)
//   CE   east.W, centre.E         -
//   EE   east.E                   - (leads nowhere)
//
// IO banks: north IO 0..4, east 5..9, south 10..14, west 15..19. So a north
// or south pin reaches a cluster through one switch block, and a cluster
// reaches an east or west pin through at most one; all other paths cross the
// centre block. This topology, the block counts (20 IO blocks, 5 switch
// blocks, 12 connection boxes, 4 clusters), the 10-wire buses and the
// 1480-bit configuration follow the architecture; the two dead-end buses are
// this design's reading of it (the switch blocks keep all four sides).
//
// Tri-state buses are modelled in two states: every driver of a bus wire
// gives a value and a drive flag, the wire is the OR of the driven values and
// reads 0 when nothing drives it. `contention` flags a wire with two active
// drivers, which only an invalid bitstream can cause. A bitstream that routes
// a signal in a ring, or through LUTs back to itself without a flip-flop,
// makes a combinational loop; the netlist is necessarily full of such
// structural loops, as any FPGA fabric is.
//
// Programming: hold prog_en high, shift the 1480 bits in on prog_in, one per
// rising prog_clk edge (the last bit of the chain first), drop prog_en and
// give one more prog_clk edge; the design then runs on clk. While prog_en is
// high every block reads an all-zero configuration and every BLE flip-flop
// is held at 0. The chain runs IO 0..19, then the core blocks in the order of
// fpga_pkg::core_elem_e; that order is this design's choice.
module fpga_top
  import fpga_pkg::*;
(
  input  logic             clk,
  input  logic             prog_clk,
  input  logic             prog_en,
  input  logic             prog_in,
  output logic             prog_out,
  input  logic [N_IOS-1:0] pad_i,
  input  logic [N_IOS-1:0] pad_i_en,
  output logic [N_IOS-1:0] pad_o,
  output logic [N_IOS-1:0] pad_oe,
  output logic [N_IOS-1:0] pad_float,
  output logic             contention
);

  localparam int unsigned W = FABRIC_W;

  // ------------------------------------------------------- fabric buses
  typedef enum int unsigned {
    SEG_NN, SEG_NW, SEG_NE, SEG_CN,   // around the north switch block
    SEG_CS, SEG_SS, SEG_SW, SEG_SE,   // around the south switch block
    SEG_CW, SEG_WN, SEG_WS, SEG_WW,   // around the west switch block
    SEG_CE, SEG_EN, SEG_ES, SEG_EE,   // around the east switch block
    SEG_COUNT
  } seg_e;

  // Switch blocks: 0 north, 1 east, 2 south, 3 west, 4 centre.
  localparam int unsigned N_SB = 5;
  localparam seg_e SB_SEG [N_SB][4] = '{
    '{SEG_NN, SEG_NE, SEG_CN, SEG_NW},   // north:  N E S W
    '{SEG_EN, SEG_EE, SEG_ES, SEG_CE},   // east
    '{SEG_CS, SEG_SE, SEG_SS, SEG_SW},   // south
    '{SEG_WN, SEG_CW, SEG_WS, SEG_WW},   // west
    '{SEG_CN, SEG_CE, SEG_CS, SEG_CW}    // centre
  };
  localparam core_elem_e SB_CH [N_SB] = '{CH_N_SB, CH_E_SB, CH_S_SB, CH_W_SB, CH_C_SB};

  // IO banks: 0 north (IO 0..4), 1 east (5..9), 2 south (10..14), 3 west (15..19).
  localparam seg_e       ICB_SEG [N_BANKS] = '{SEG_NN, SEG_ES, SEG_SS, SEG_WN};
  localparam seg_e       OCB_SEG [N_BANKS] = '{SEG_NN, SEG_EN, SEG_SS, SEG_WS};
  localparam core_elem_e ICB_CH  [N_BANKS] = '{CH_N_ICB, CH_E_ICB, CH_S_ICB, CH_W_ICB};
  localparam core_elem_e OCB_CH  [N_BANKS] = '{CH_N_OCB, CH_E_OCB, CH_S_OCB, CH_W_OCB};

  // Logic clusters: 0 NW, 1 NE, 2 SW, 3 SE.
  localparam int unsigned N_LC = 4;
  localparam seg_e       LC_SEG  [N_LC] = '{SEG_NW, SEG_NE, SEG_SW, SEG_SE};
  localparam seg_e       LCB_SEG [N_LC] = '{SEG_WN, SEG_EN, SEG_WS, SEG_ES};
  localparam core_elem_e LC_CH   [N_LC] = '{CH_NW_LC, CH_NE_LC, CH_SW_LC, CH_SE_LC};
  localparam core_elem_e LCB_CH  [N_LC] = '{CH_NW_LCB, CH_NE_LCB, CH_SW_LCB, CH_SE_LCB};

  logic [W-1:0] seg [SEG_COUNT];

  // Driver outputs of every block that can drive a bus.
  logic [W-1:0] sb_in  [N_SB][4];
  logic [W-1:0] sb_out [N_SB][4];
  logic [W-1:0] sb_drv [N_SB][4];
  logic [W-1:0] icb_out [N_BANKS];
  logic [W-1:0] icb_drv [N_BANKS];
  logic [W-1:0] lcb_out [N_LC];
  logic [W-1:0] lcb_drv [N_LC];

  logic [IOS_PER_BANK-1:0] ocb_out   [N_BANKS];
  logic [IOS_PER_BANK-1:0] ocb_drv   [N_BANKS];
  logic [IOS_PER_BANK-1:0] io_to_fab [N_BANKS];
  logic [BLES_PER_LC-1:0]  lc_out    [N_LC];

  // ------------------------------------------------- configuration chain
  localparam int unsigned N_LINKS = N_IOS + int'(CH_COUNT);
  logic [N_LINKS:0] chain;
  assign chain[0] = prog_in;
  assign prog_out = chain[N_LINKS];

  function automatic int unsigned link(core_elem_e e);
    return N_IOS + int'(e);
  endfunction

  // ------------------------------------------------------------ IO banks
  for (genvar b = 0; b < N_BANKS; b++) begin : g_bank
    for (genvar k = 0; k < IOS_PER_BANK; k++) begin : g_io
      localparam int unsigned IO = b * IOS_PER_BANK + k;
      io_block u_io (
        .prog_clk        (prog_clk),
        .prog_en         (prog_en),
        .prog_in         (chain[IO]),
        .prog_out        (chain[IO+1]),
        .pad_i           (pad_i[IO]),
        .pad_i_en        (pad_i_en[IO]),
        .pad_o           (pad_o[IO]),
        .pad_oe          (pad_oe[IO]),
        .pad_float       (pad_float[IO]),
        .from_fabric     (ocb_out[b][k]),
        .from_fabric_drv (ocb_drv[b][k]),
        .to_fabric       (io_to_fab[b][k])
      );
    end

    conn_box #(.N_SRC(IOS_PER_BANK), .N_OUT(W)) u_icb (
      .prog_clk (prog_clk),
      .prog_en  (prog_en),
      .prog_in  (chain[link(ICB_CH[b])]),
      .prog_out (chain[link(ICB_CH[b]) + 1]),
      .src      (io_to_fab[b]),
      .out      (icb_out[b]),
      .drive    (icb_drv[b])
    );

    conn_box #(.N_SRC(W), .N_OUT(IOS_PER_BANK)) u_ocb (
      .prog_clk (prog_clk),
      .prog_en  (prog_en),
      .prog_in  (chain[link(OCB_CH[b])]),
      .prog_out (chain[link(OCB_CH[b]) + 1]),
      .src      (seg[OCB_SEG[b]]),
      .out      (ocb_out[b]),
      .drive    (ocb_drv[b])
    );
  end

  // ------------------------------------------------------ logic clusters
  for (genvar c = 0; c < N_LC; c++) begin : g_lc
    logic_cluster u_lc (
      .clk      (clk),
      .prog_clk (prog_clk),
      .prog_en  (prog_en),
      .prog_in  (chain[link(LC_CH[c])]),
      .prog_out (chain[link(LC_CH[c]) + 1]),
      .fabric   (seg[LC_SEG[c]]),
      .ble_out  (lc_out[c])
    );

    conn_box #(.N_SRC(BLES_PER_LC), .N_OUT(W)) u_lcb (
      .prog_clk (prog_clk),
      .prog_en  (prog_en),
      .prog_in  (chain[link(LCB_CH[c])]),
      .prog_out (chain[link(LCB_CH[c]) + 1]),
      .src      (lc_out[c]),
      .out      (lcb_out[c]),
      .drive    (lcb_drv[c])
    );
  end

  // ------------------------------------------------------- switch blocks
  for (genvar s = 0; s < N_SB; s++) begin : g_sb
    for (genvar d = 0; d < 4; d++) begin : g_side
      assign sb_in[s][d] = seg[SB_SEG[s][d]];
    end

    switch_block u_sb (
      .prog_clk (prog_clk),
      .prog_en  (prog_en),
      .prog_in  (chain[link(SB_CH[s])]),
      .prog_out (chain[link(SB_CH[s]) + 1]),
      .bus_in   (sb_in[s]),
      .bus_out  (sb_out[s]),
      .bus_drv  (sb_drv[s])
    );
  end

  // ------------------------------------------------ bus wire resolution
  always_comb begin
    logic [W-1:0] any [SEG_COUNT];
    logic [W-1:0] clash;
    for (int i = 0; i < int'(SEG_COUNT); i++) begin
      seg[i] = '0;
      any[i] = '0;
    end
    clash = '0;
    for (int s = 0; s < int'(N_SB); s++) begin
      for (int d = 0; d < 4; d++) begin
        clash                |= any[SB_SEG[s][d]] & sb_drv[s][d];
        any[SB_SEG[s][d]]    |= sb_drv[s][d];
        seg[SB_SEG[s][d]]    |= sb_drv[s][d] & sb_out[s][d];
      end
    end
    for (int b = 0; b < int'(N_BANKS); b++) begin
      clash                |= any[ICB_SEG[b]] & icb_drv[b];
      any[ICB_SEG[b]]      |= icb_drv[b];
      seg[ICB_SEG[b]]      |= icb_drv[b] & icb_out[b];
    end
    for (int c = 0; c < int'(N_LC); c++) begin
      clash                |= any[LCB_SEG[c]] & lcb_drv[c];
      any[LCB_SEG[c]]      |= lcb_drv[c];
      seg[LCB_SEG[c]]      |= lcb_drv[c] & lcb_out[c];
    end
    contention = |clash;
  end

  // A valid bitstream never lets two blocks drive the same wire.
  always_ff @(posedge clk) begin
    if (!prog_en) assert (!contention)
      else $error("fpga_top: two drivers on one fabric wire");
  end

endmodule
