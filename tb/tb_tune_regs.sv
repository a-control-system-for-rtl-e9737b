// tb_tune_regs -- self-checking testbench of one FDDA's tuning register bank.
//
// Checks the reset values, per-register width masking, single writes that
// must not disturb other registers, reads of missing registers (zero) and a
// second synchronous reset, all against a model kept here from a literal
// table of widths and defaults (EN_ST_1/EN_ST_2 = 1, other controls 0, bank
// codes at mid-scale).
module tb_tune_regs;
  import tuning_pkg::*;

  localparam int unsigned BANK_W = 4;
  localparam int          WIDTHS   [14] = '{1,1,1,1,1,2,2,2,4,4,4,4,4,4};
  localparam int          DEFAULTS [14] = '{1,1,0,0,0,0,0,0,8,8,8,8,8,8};

  logic                             clk = 1'b0;
  logic                             rst_n;
  logic                             wr_en;
  logic [REG_IDX_W-1:0]             wr_idx;
  logic [BANK_W-1:0]                wr_data;
  logic [REG_IDX_W-1:0]             rd_idx;
  logic [BANK_W-1:0]                rd_data;
  logic [NUM_REGS-1:0][BANK_W-1:0]  regs_o;

  int checks = 0;
  int failures = 0;
  int model [14];

  tune_regs #(.BANK_W(BANK_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(string what);
    for (int i = 0; i < 16; i++) begin
      int exp;
      exp = (i < 14) ? model[i] : 0;
      rd_idx = 4'(i);
      #1;
      checks++;
      if (int'(rd_data) != exp) begin
        failures++;
        $display("FAIL %s: rd reg %0d = %0d, expected %0d", what, i, rd_data, exp);
      end
      if (i < 14) begin
        checks++;
        if (int'(regs_o[i]) != exp) begin
          failures++;
          $display("FAIL %s: regs_o[%0d] = %0d, expected %0d", what, i, regs_o[i], exp);
        end
      end
    end
  endtask

  task automatic do_reset();
    rst_n = 1'b0; wr_en = 1'b0;
    @(posedge clk); @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 14; i++) model[i] = DEFAULTS[i];
  endtask

  task automatic write_reg(int idx, int data);
    wr_en = 1'b1; wr_idx = 4'(idx); wr_data = BANK_W'(data);
    @(posedge clk);
    #1 wr_en = 1'b0;
    if (idx < 14) model[idx] = data & ((1 << WIDTHS[idx]) - 1);
  endtask

  initial begin
    wr_en = 1'b0; wr_idx = '0; wr_data = '0; rd_idx = '0;
    // registers start random; reset must set them
    do_reset();
    check_all("after reset");

    // every register, all-ones: shows each width
    for (int i = 0; i < 14; i++) write_reg(i, 15);
    check_all("all ones");

    // random single writes, including indexes 14 and 15 that do not exist
    for (int n = 0; n < 300; n++) begin
      write_reg($urandom_range(15), $urandom_range(15));
      check_all("random writes");
    end

    // wr_en low: nothing changes
    wr_idx = 4'd8; wr_data = 4'd3; @(posedge clk); #1;
    check_all("no enable");

    do_reset();
    check_all("second reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
