// tuning_logic -- digital tuning logic of the FDDA test chip.
//
// The chip holds three ultra-low-voltage fully differential difference
// amplifiers (FDDAs). Their offset calibration, frequency compensation,
// common-mode feedback selection and resistor/capacitor banks are set by 14
// tuning registers per FDDA, 42 in all, so the analog circuit can be trimmed
// after fabrication without destructive fuse or laser trimming. An external
// controller reaches the registers over a four-pin half-duplex serial bus
// (CLK, RST_N, DATA_IN in; DATA_OUT out). It can write or read one register
// (address mode) or all 14 registers of one FDDA in a single frame (full
// mode).
//
// Structure: one serial_slave decodes the frames; one tune_regs bank per
// FDDA holds the registers. The slave's write strobe is steered to the bank
// the frame names, and the read port of that bank is selected back.
//
// Everything runs on the bus clock CLK (rising edge) and resets
// synchronously while RST_N is low, which returns every register to its
// default. The register map and the bus pins follow the source; the frame
// layout (see tuning_pkg and serial_slave), the bank-code width BANK_W and
// the bank-code reset value are this design's own.
//
// tune_o[f][r] is register r of FDDA f, right-aligned in a BANK_W-bit slot;
// these are the control lines of the analog circuit. The slot bits above a
// register's width (three upper bits of a 1-bit control, two of a 2-bit one)
// are constant zero.
module tuning_logic
  import tuning_pkg::*;
#(
  parameter int unsigned NUM_FDDA = NUM_FDDA_DEFAULT,
  parameter int unsigned BANK_W   = 4
) (
  input  logic                                          clk,
  input  logic                                          rst_n,
  input  logic                                          data_in,
  output logic                                          data_out,
  output logic [NUM_FDDA-1:0][NUM_REGS-1:0][BANK_W-1:0] tune_o
);

  localparam int unsigned DATA_W = BANK_W;

  logic                  wr_en;
  logic [FDDA_IDX_W-1:0] fdda_idx;
  logic [REG_IDX_W-1:0]  reg_idx;
  logic [DATA_W-1:0]     wr_data;
  logic [DATA_W-1:0]     rd_data;
  logic                  busy;

  serial_slave #(
    .DATA_W   (DATA_W),
    .NUM_FDDA (NUM_FDDA)
  ) u_slave (
    .clk      (clk),
    .rst_n    (rst_n),
    .data_in  (data_in),
    .data_out (data_out),
    .wr_en    (wr_en),
    .fdda_idx (fdda_idx),
    .reg_idx  (reg_idx),
    .wr_data  (wr_data),
    .rd_data  (rd_data),
    .busy     (busy)
  );

  logic [NUM_FDDA-1:0][DATA_W-1:0] bank_rd;

  for (genvar f = 0; f < NUM_FDDA; f++) begin : g_fdda
    tune_regs #(
      .BANK_W (BANK_W)
    ) u_regs (
      .clk     (clk),
      .rst_n   (rst_n),
      .wr_en   (wr_en && fdda_idx == FDDA_IDX_W'(f)),
      .wr_idx  (reg_idx),
      .wr_data (wr_data),
      .rd_idx  (reg_idx),
      .rd_data (bank_rd[f]),
      .regs_o  (tune_o[f])
    );
  end

  always_comb begin
    rd_data = '0;
    for (int f = 0; f < NUM_FDDA; f++)
      if (fdda_idx == FDDA_IDX_W'(f))
        rd_data = bank_rd[f];
  end

  // A write strobe always names an existing FDDA and register, and only
  // during a frame.
  a_wr_addr: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> busy && fdda_idx < FDDA_IDX_W'(NUM_FDDA) && reg_idx < REG_IDX_W'(NUM_REGS));

endmodule
