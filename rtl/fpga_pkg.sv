// fpga_pkg: sizes, configuration-bit counts and chain layout shared by the
// blocks of a small island-style FPGA (4 logic clusters, 5 disjoint switch
// blocks, 12 connection boxes, 20 IO blocks, 10-wire fabric).
//
// Every block is programmed through one serial chain of shift registers. The
// per-block bit counts below follow the architecture (BLE 19, interconnect
// matrix 80, logic cluster 175, switch block 80, IO block 3, IO input box 30,
// IO output box 20, cluster output box 30; 1480 in all). The order of the
// blocks along the chain (core_offset, io_offset) and the order of the bits inside a
// block are this design's own choice and are documented where the
// block is defined.
package fpga_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned FABRIC_W     = 10;  // wires per fabric bus
  localparam int unsigned LUT_K        = 4;   // LUT inputs
  localparam int unsigned BLES_PER_LC  = 5;   // BLEs per logic cluster
  localparam int unsigned IOS_PER_BANK = 5;   // IO blocks per bank
  localparam int unsigned N_BANKS      = 4;
  localparam int unsigned N_IOS        = N_BANKS * IOS_PER_BANK;  // 20

  // Bus sides of a switch block, clockwise.
  typedef enum logic [1:0] {SIDE_N = 2'd0, SIDE_E = 2'd1, SIDE_S = 2'd2, SIDE_W = 2'd3} side_e;

  // ------------------------------------------------- BLE configuration word
  // bits [15:0] LUT truth table, index {D,C,B,A}
  // bit  16     input A taken from the flip-flop output (feedback)
  // bit  17     input D used as flip-flop clock enable
  // bit  18     BLE output taken from the flip-flop (else from the LUT)
  localparam int unsigned LUT_BITS   = 1 << LUT_K;           // 16
  localparam int unsigned BLE_CFG    = LUT_BITS + 3;          // 19

  typedef struct packed {
    logic                reg_out;   // bit 18
    logic                ce_from_d; // bit 17
    logic                feedback;  // bit 16
    logic [LUT_BITS-1:0] lut;       // bits 15:0
  } ble_cfg_t;

  // ------------------------------------------ connection box select widths
  // Input 0 of every connection-box mux is "no source": undriven (high-z) on
  // the fabric, constant 0 (ground) inside a logic cluster.
  localparam int unsigned IM_IN   = 1 + FABRIC_W + BLES_PER_LC;  // 16
  localparam int unsigned IM_SEL  = $clog2(IM_IN);               // 4
  localparam int unsigned IM_OUT  = BLES_PER_LC * LUT_K;         // 20
  localparam int unsigned IM_CFG  = IM_OUT * IM_SEL;             // 80

  localparam int unsigned ICB_IN  = 1 + IOS_PER_BANK;            // 6
  localparam int unsigned ICB_SEL = $clog2(ICB_IN);              // 3
  localparam int unsigned ICB_CFG = FABRIC_W * ICB_SEL;          // 30

  localparam int unsigned OCB_IN  = 1 + FABRIC_W;                // 11
  localparam int unsigned OCB_SEL = $clog2(OCB_IN);              // 4
  localparam int unsigned OCB_CFG = IOS_PER_BANK * OCB_SEL;      // 20

  localparam int unsigned LCB_IN  = 1 + BLES_PER_LC;             // 6
  localparam int unsigned LCB_SEL = $clog2(LCB_IN);              // 3
  localparam int unsigned LCB_CFG = FABRIC_W * LCB_SEL;          // 30

  localparam int unsigned LC_CFG  = IM_CFG + BLES_PER_LC * BLE_CFG;  // 175

  // Switch block: one 2-bit mux per side and wire. 0 = undriven, 1..3 = the
  // same wire on the side 1, 2 or 3 steps clockwise.
  localparam int unsigned SB_SEL  = 2;
  localparam int unsigned SB_CFG  = 4 * FABRIC_W * SB_SEL;       // 80

  // IO block: bit 0 output enable, bit 1 pull-up, bit 2 pull-down.
  localparam int unsigned IOB_CFG = 3;

  // ------------------------------------------------------ the chain order
  // Position 0 is next to the chip's prog_in pin. The chain visits the IO
  // blocks 0..19 first, then the core blocks in the order below.
  typedef enum int unsigned {
    CH_W_ICB, CH_NW_LCB, CH_NW_LC, CH_N_OCB, CH_N_ICB, CH_N_SB, CH_NE_LC,
    CH_NE_LCB, CH_E_OCB, CH_E_SB, CH_C_SB, CH_W_SB, CH_W_OCB, CH_SW_LCB,
    CH_SW_LC, CH_S_SB, CH_S_ICB, CH_S_OCB, CH_SE_LC, CH_SE_LCB, CH_E_ICB,
    CH_COUNT
  } core_elem_e;

  function automatic int unsigned core_cfg_bits(core_elem_e e);
    case (e)
      CH_W_ICB, CH_N_ICB, CH_S_ICB, CH_E_ICB:          return ICB_CFG;
      CH_N_OCB, CH_E_OCB, CH_W_OCB, CH_S_OCB:          return OCB_CFG;
      CH_NW_LCB, CH_NE_LCB, CH_SW_LCB, CH_SE_LCB:      return LCB_CFG;
      CH_NW_LC, CH_NE_LC, CH_SW_LC, CH_SE_LC:          return LC_CFG;
      default:                                         return SB_CFG;
    endcase
  endfunction

  // Offset of a core element along the chain.
  function automatic int unsigned core_offset(core_elem_e e);
    int unsigned off = N_IOS * IOB_CFG;
    for (int i = 0; i < int'(e); i++) off += core_cfg_bits(core_elem_e'(i));
    return off;
  endfunction

  function automatic int unsigned io_offset(int unsigned io);
    return io * IOB_CFG;
  endfunction

  localparam int unsigned TOTAL_CFG = core_offset(CH_COUNT);     // 1480

endpackage
