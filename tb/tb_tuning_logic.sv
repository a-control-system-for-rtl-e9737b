// tb_tuning_logic -- end-to-end testbench of the tuning logic at its default
// size (three FDDAs, 14 registers each, 4-bit bank codes).
//
// A bit-banging master model plays the role of the board's microcontroller
// and runs the operations of the control application: read all registers
// after reset, write and read single registers (address mode), write and
// read a whole FDDA (full mode), step a bank code up and down by one with a
// read-modify-write, set all three FDDAs, and reset again. A model kept here
// from a literal table of widths and defaults predicts every read and every
// tune_o bit. Each bus mechanism is counted and must occur at least once:
// address/full writes and reads, width masking, a frame to a missing FDDA or
// register, back-to-back frames, and a synchronous reset restoring defaults.
// The frame lengths are checked in clocks.
module tb_tuning_logic;
  import tuning_pkg::*;

  localparam int unsigned NF     = 3;
  localparam int unsigned DW     = 4;
  localparam int          WIDTHS   [14] = '{1,1,1,1,1,2,2,2,4,4,4,4,4,4};
  localparam int          DEFAULTS [14] = '{1,1,0,0,0,0,0,0,8,8,8,8,8,8};

  typedef logic [NUM_REGS-1:0][DW-1:0] words_t;

  logic clk, rst_n, data_in, data_out;
  logic [NF-1:0][NUM_REGS-1:0][DW-1:0] tune_o;

  serial_master #(.DATA_W(DW)) u_master (
    .clk(clk), .rst_n(rst_n), .sdo(data_in), .sdi(data_out));

  tuning_logic dut (
    .clk(clk), .rst_n(rst_n), .data_in(data_in), .data_out(data_out),
    .tune_o(tune_o));

  int model [NF][14];
  longint unsigned prev_end = 0;  // edge count when the last frame ended
  int checks = 0;
  int failures = 0;

  typedef enum int {
    M_ADDR_WRITE, M_ADDR_READ, M_FULL_WRITE, M_FULL_READ, M_MASK,
    M_MISSING, M_BACK_TO_BACK, M_RESET, M_COUNT
  } mech_e;
  int mech [M_COUNT];
  string mech_name [M_COUNT] = '{"address write", "address read", "full write",
    "full read", "width masking", "missing FDDA/register", "back-to-back frames",
    "reset to defaults"};

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int mask(int r, int d);
    return d & ((1 << WIDTHS[r]) - 1);
  endfunction

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic check_tune(string what);
    for (int f = 0; f < NF; f++)
      for (int r = 0; r < 14; r++)
        expect_eq($sformatf("%s tune_o[%0d][%0d]", what, f, r), int'(tune_o[f][r]), model[f][r]);
  endtask

  task automatic do_reset();
    u_master.reset(2);
    for (int f = 0; f < NF; f++)
      for (int r = 0; r < 14; r++) model[f][r] = DEFAULTS[r];
  endtask

  task automatic wr(int f, int r, int d);
    longint unsigned e0;
    e0 = u_master.edges;
    if (e0 == prev_end) mech[M_BACK_TO_BACK]++;
    u_master.write_addr(f, r, DW'(d));
    prev_end = u_master.edges;
    expect_eq("address write length", int'(u_master.edges - e0), 1 + HDR_W + DW);
    if (f < NF && r < 14) begin
      if (mask(r, d) != d) mech[M_MASK]++;
      model[f][r] = mask(r, d);
      mech[M_ADDR_WRITE]++;
    end else mech[M_MISSING]++;
  endtask

  task automatic rd(int f, int r, output int d);
    logic [DW-1:0] got;
    if (u_master.edges == prev_end) mech[M_BACK_TO_BACK]++;
    u_master.read_addr(f, r, got);
    prev_end = u_master.edges;
    d = int'(got);
    expect_eq($sformatf("read f%0d r%0d", f, r), d, (f < NF && r < 14) ? model[f][r] : 0);
    if (f < NF && r < 14) mech[M_ADDR_READ]++; else mech[M_MISSING]++;
  endtask

  task automatic wr_full(int f, words_t w);
    longint unsigned e0;
    e0 = u_master.edges;
    if (e0 == prev_end) mech[M_BACK_TO_BACK]++;
    u_master.write_full(f, w);
    prev_end = u_master.edges;
    expect_eq("full write length", int'(u_master.edges - e0), 1 + HDR_W + 14 * DW);
    if (f < NF) begin
      for (int r = 0; r < 14; r++) begin
        if (mask(r, int'(w[r])) != int'(w[r])) mech[M_MASK]++;
        model[f][r] = mask(r, int'(w[r]));
      end
      mech[M_FULL_WRITE]++;
    end else mech[M_MISSING]++;
  endtask

  task automatic rd_full(int f);
    words_t got;
    if (u_master.edges == prev_end) mech[M_BACK_TO_BACK]++;
    u_master.read_full(f, got);
    prev_end = u_master.edges;
    for (int r = 0; r < 14; r++)
      expect_eq($sformatf("full read f%0d r%0d", f, r), int'(got[r]),
                (f < NF) ? model[f][r] : 0);
    if (f < NF) mech[M_FULL_READ]++; else mech[M_MISSING]++;
  endtask

  initial begin
    int d;
    words_t w;

    // power-up: registers random until the first reset
    do_reset();
    mech[M_RESET]++;
    u_master.idle(1);
    check_tune("after reset");
    for (int f = 0; f < NF; f++) rd_full(f);

    // address mode: every register of every FDDA, all-ones then random
    for (int f = 0; f < NF; f++)
      for (int r = 0; r < 14; r++) wr(f, r, (1 << DW) - 1);
    check_tune("all ones");
    for (int f = 0; f < NF; f++)
      for (int r = 0; r < 14; r++) rd(f, r, d);
    for (int n = 0; n < 100; n++) begin
      wr($urandom_range(NF - 1), $urandom_range(13), $urandom_range((1 << DW) - 1));
      rd($urandom_range(NF - 1), $urandom_range(13), d);
    end
    check_tune("random");

    // "Plus" / "Minus" on a bank code: read, step by one, write back
    for (int f = 0; f < NF; f++) begin
      rd(f, int'(R_TUNE_2), d);
      wr(f, int'(R_TUNE_2), (d + 1) % (1 << DW));
      rd(f, int'(C_TUNE_1), d);
      wr(f, int'(C_TUNE_1), (d + (1 << DW) - 1) % (1 << DW));
    end
    check_tune("plus/minus");

    // full mode on each FDDA
    for (int f = 0; f < NF; f++) begin
      for (int r = 0; r < 14; r++) w[r] = DW'($urandom);
      wr_full(f, w);
    end
    check_tune("full write");
    for (int f = 0; f < NF; f++) rd_full(f);

    // "All FDDAs": the same setting sent to each FDDA in turn
    for (int r = 0; r < 14; r++) w[r] = DW'(r);
    for (int f = 0; f < NF; f++) wr_full(f, w);
    check_tune("all FDDAs");

    // missing FDDA (index 3) and registers 14, 15: nothing changes
    wr(3, 2, 1);
    wr(0, 14, 5);
    wr(2, 15, 7);
    rd(3, 0, d);
    rd(1, 15, d);
    wr_full(3, w);
    rd_full(3);
    check_tune("missing");

    // reset restores defaults
    u_master.idle(1);
    do_reset();
    mech[M_RESET]++;
    u_master.idle(1);
    check_tune("second reset");
    for (int f = 0; f < NF; f++) rd_full(f);

    for (int m = 0; m < M_COUNT; m++) begin
      $display("mechanism %-22s : %0d", mech_name[m], mech[m]);
      checks++;
      if (mech[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mech_name[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
