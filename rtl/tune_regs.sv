// tune_regs -- the 14 tuning registers of one FDDA.
//
// A register file with one write port and one combinational read port. Each
// register keeps only as many bits as the register map gives it (1 or 2 bits
// for the enable/select controls, BANK_W bits for the capacitor and resistor
// bank codes); unused upper bits of a written word are dropped and read back
// as zero. All registers hold their contents until written and return to
// their default values on the synchronous, active-low reset, as the source
// describes. The widths of the first eight registers and their defaults come
// from the register panel; BANK_W and the mid-scale bank default are this
// design's choice.
//
// Interface:
//   clk, rst_n        rising-edge clock, synchronous active-low reset
//   wr_en/wr_idx/wr_data  write wr_data to register wr_idx at the next edge
//   rd_idx -> rd_data     combinational read, zero for an index >= 14
//   regs_o            all register contents, one DATA_W-bit slot each,
//                     wired to the analog circuit
module tune_regs
  import tuning_pkg::*;
#(
  parameter int unsigned BANK_W = 4,
  localparam int unsigned DATA_W = BANK_W
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             wr_en,
  input  logic [REG_IDX_W-1:0]             wr_idx,
  input  logic [DATA_W-1:0]                wr_data,
  input  logic [REG_IDX_W-1:0]             rd_idx,
  output logic [DATA_W-1:0]                rd_data,
  output logic [NUM_REGS-1:0][DATA_W-1:0]  regs_o
);

  // Per-register width mask and reset value, fixed at elaboration.
  function automatic logic [DATA_W-1:0] width_mask(int unsigned idx);
    return DATA_W'((64'd1 << reg_width(idx, BANK_W)) - 64'd1);
  endfunction

  logic [NUM_REGS-1:0][DATA_W-1:0] regs_q;

  for (genvar i = 0; i < NUM_REGS; i++) begin : g_reg
    localparam logic [DATA_W-1:0] MASK = width_mask(i);
    localparam logic [DATA_W-1:0] RST  = DATA_W'(reg_default(i, BANK_W));

    always_ff @(posedge clk) begin
      if (!rst_n)
        regs_q[i] <= RST;
      else if (wr_en && wr_idx == REG_IDX_W'(i))
        regs_q[i] <= wr_data & MASK;
    end
  end

  always_comb begin
    rd_data = '0;
    if (rd_idx < REG_IDX_W'(NUM_REGS))
      rd_data = regs_q[rd_idx];
  end

  assign regs_o = regs_q;

  initial begin
    assert (BANK_W >= 2 && BANK_W <= 32)
      else $error("tune_regs: BANK_W must lie in 2..32");
  end

endmodule
