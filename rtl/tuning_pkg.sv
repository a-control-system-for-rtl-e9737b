// tuning_pkg -- register map and serial frame format of the FDDA tuning logic.
//
// Each FDDA on the chip is tuned through 14 registers. Eight of them are
// 1- or 2-bit enable/select controls; the last six are codes that switch the
// on-chip capacitor (C_TUNE_x) and resistor (R_TUNE_x) banks. The register
// names, their order and the 1-/2-bit widths of the first eight follow the
// published register panel. The width of the bank codes, the reset value of
// the bank codes and the whole serial frame layout below are this design's
// own choices: the source describes the bus only by its four pins.
//
// Serial frame (DATA_IN sampled on the rising CLK edge, MSB first):
//   START(1'b1) | OP(1) | MODE(1) | FDDA(FDDA_IDX_W) | REG(REG_IDX_W) | payload
// OP   1 = write, 0 = read.
// MODE 0 = address mode (one register), 1 = full mode (all 14 registers of
//      the FDDA, index 0 first; the REG field is sent but ignored).
// Write payload: one DATA_W-bit word per register, on DATA_IN.
// Read payload : one turnaround clock, then one DATA_W-bit word per register
//                on DATA_OUT, driven after the rising edge.
package tuning_pkg;

  // Three FDDAs with 14 tuning registers each, 42 in total.
  localparam int unsigned NUM_FDDA_DEFAULT = 3;
  localparam int unsigned NUM_REGS         = 14;
  localparam int unsigned REG_IDX_W        = 4;
  localparam int unsigned FDDA_IDX_W       = 2;
  localparam int unsigned HDR_W            = 2 + FDDA_IDX_W + REG_IDX_W;

  // Register addresses, in the order of the register panel.
  typedef enum logic [REG_IDX_W-1:0] {
    EN_ST_1         = 4'd0,
    EN_ST_2         = 4'd1,
    EN_HP           = 4'd2,
    EN_CALIB        = 4'd3,
    EN_RECONFIG     = 4'd4,
    EN_CMFB_REF_EXT = 4'd5,
    CMFB_1_SEL      = 4'd6,
    CMFB_2_SEL      = 4'd7,
    C_TUNE_1        = 4'd8,
    C_TUNE_2        = 4'd9,
    C_TUNE_3        = 4'd10,
    R_TUNE_1        = 4'd11,
    R_TUNE_2        = 4'd12,
    R_TUNE_3        = 4'd13
  } reg_idx_e;

  typedef enum logic {
    OP_READ  = 1'b0,
    OP_WRITE = 1'b1
  } op_e;

  typedef enum logic {
    MODE_ADDRESS = 1'b0,
    MODE_FULL    = 1'b1
  } mode_e;

  // Decoded frame header.
  typedef struct packed {
    op_e                   op;
    mode_e                 mode;
    logic [FDDA_IDX_W-1:0] fdda;
    logic [REG_IDX_W-1:0]  regi;
  } hdr_t;

  // Implemented width of register idx; bank codes are bank_w bits wide.
  function automatic int unsigned reg_width(int unsigned idx, int unsigned bank_w);
    if (idx <= 32'd4)              return 1;       // EN_ST_1 .. EN_RECONFIG
    else if (idx <= 32'd7)         return 2;       // EN_CMFB_REF_EXT, CMFB_x_SEL
    else if (idx < NUM_REGS)       return bank_w;  // C_TUNE_x, R_TUNE_x
    else                           return 0;
  endfunction

  // Value after the synchronous reset. EN_ST_1/EN_ST_2 = 1 and the other
  // controls = 0 as on the register panel; bank codes start at mid-scale.
  function automatic int unsigned reg_default(int unsigned idx, int unsigned bank_w);
    if (idx <= 32'd1)              return 1;
    else if (idx <= 32'd7)         return 0;
    else if (idx < NUM_REGS)       return 32'd1 << (bank_w - 1);
    else                           return 0;
  endfunction

endpackage
