// tb_serial_slave -- self-checking testbench of the serial frame decoder.
//
// A bit-banging master model sends frames; a register array kept here
// answers the slave's read port and logs its write strobes. Checked:
// address-mode writes (index, data and the edge the strobe comes on),
// full-mode writes (14 strobes in order), address- and full-mode reads
// (bit-exact DATA_OUT), frames naming a missing FDDA or register (no strobe,
// zeros read), back-to-back frames, DATA_OUT low outside reads, and a reset
// that aborts a frame half way.
module tb_serial_slave;
  import tuning_pkg::*;

  localparam int unsigned DATA_W   = 4;
  localparam int unsigned NUM_FDDA = 3;

  typedef logic [NUM_REGS-1:0][DATA_W-1:0] words_t;

  logic                  clk, rst_n, data_in, data_out;
  logic                  wr_en, busy;
  logic [FDDA_IDX_W-1:0] fdda_idx;
  logic [REG_IDX_W-1:0]  reg_idx;
  logic [DATA_W-1:0]     wr_data, rd_data;

  serial_master #(.DATA_W(DATA_W)) u_master (
    .clk(clk), .rst_n(rst_n), .sdo(data_in), .sdi(data_out));

  serial_slave #(.DATA_W(DATA_W), .NUM_FDDA(NUM_FDDA)) dut (.*);

  // Register array seen through the slave's ports (4 x 16 so any index is
  // answerable; the slave must not use the missing ones).
  logic [DATA_W-1:0] mem [4][16];
  assign rd_data = mem[fdda_idx][reg_idx];

  typedef struct { int f; int r; int d; longint unsigned e; } wr_t;
  wr_t wr_log[$];

  int checks = 0;
  int failures = 0;

  always @(posedge clk) begin
    if (rst_n && wr_en) begin
      wr_log.push_back('{int'(fdda_idx), int'(reg_idx), int'(wr_data), u_master.edges});
      mem[fdda_idx][reg_idx] <= wr_data;
    end
  end

  // DATA_OUT must be low whenever no read payload is due.
  logic reading;
  // Checked 1 ns after each rising edge: the stimulus only changes
  // 'reading' at falling edges.
  always @(posedge clk) begin
    #1;
    if (!reading) begin
      checks++;
      if (data_out) begin
        failures++;
        $display("FAIL data_out high outside a read at edge %0d", u_master.edges);
      end
    end
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic t_write_addr(int f, int r, int d);
    longint unsigned start;
    bit valid;
    start = u_master.edges + 1;             // edge of the start bit
    valid = (f < NUM_FDDA) && (r < NUM_REGS);
    u_master.write_addr(f, r, DATA_W'(d));
    expect_eq("addr write strobe count", wr_log.size(), valid ? 1 : 0);
    if (valid && wr_log.size() == 1) begin
      expect_eq("addr write fdda", wr_log[0].f, f);
      expect_eq("addr write reg", wr_log[0].r, r);
      expect_eq("addr write data", wr_log[0].d, d);
      expect_eq("addr write edge", int'(wr_log[0].e), int'(start) + 8 + int'(DATA_W));
    end
    wr_log.delete();
  endtask

  task automatic t_write_full(int f, words_t d);
    longint unsigned start;
    start = u_master.edges + 1;
    u_master.write_full(f, d);
    expect_eq("full write strobe count", wr_log.size(), (f < NUM_FDDA) ? int'(NUM_REGS) : 0);
    if (f < NUM_FDDA && wr_log.size() == NUM_REGS)
      for (int i = 0; i < NUM_REGS; i++) begin
        expect_eq("full write fdda", wr_log[i].f, f);
        expect_eq("full write reg", wr_log[i].r, i);
        expect_eq("full write data", wr_log[i].d, int'(d[i]));
        expect_eq("full write edge", int'(wr_log[i].e),
                  int'(start) + 8 + (i + 1) * int'(DATA_W));
      end
    wr_log.delete();
  endtask

  task automatic t_read_addr(int f, int r);
    logic [DATA_W-1:0] got;
    int exp;
    exp = (f < NUM_FDDA && r < NUM_REGS) ? int'(mem[f][r]) : 0;
    u_master.read_addr(f, r, got);
    expect_eq($sformatf("addr read f%0d r%0d", f, r), int'(got), exp);
    expect_eq("no strobe during read", wr_log.size(), 0);
    wr_log.delete();
  endtask

  task automatic t_read_full(int f);
    words_t got;
    u_master.read_full(f, got);
    for (int i = 0; i < NUM_REGS; i++)
      expect_eq($sformatf("full read f%0d r%0d", f, i), int'(got[i]),
                (f < NUM_FDDA) ? int'(mem[f][i]) : 0);
    expect_eq("no strobe during full read", wr_log.size(), 0);
    wr_log.delete();
  endtask

  initial begin
    words_t w;
    reading = 1'b0;
    for (int f = 0; f < 4; f++)
      for (int r = 0; r < 16; r++) mem[f][r] = DATA_W'($urandom);
    u_master.reset(3);
    u_master.idle(2);
    expect_eq("idle after reset", int'(busy), 0);

    // address-mode writes, every FDDA and register plus missing ones
    for (int f = 0; f < 4; f++)
      for (int r = 0; r < 16; r++) begin
        t_write_addr(f, r, $urandom_range((1 << DATA_W) - 1));
        u_master.idle($urandom_range(2));   // 0..2 idle clocks between frames
      end

    // address-mode reads
    reading = 1'b1;
    for (int f = 0; f < 4; f++)
      for (int r = 0; r < 16; r++) begin
        t_read_addr(f, r);
        if ($urandom_range(1) != 0) begin
          reading = 1'b0; u_master.idle(1); reading = 1'b1;
        end
      end
    reading = 1'b0;
    u_master.idle(1);

    // full-mode writes and reads
    for (int f = 0; f < 4; f++) begin
      for (int i = 0; i < NUM_REGS; i++) w[i] = DATA_W'($urandom);
      t_write_full(f, w);
    end
    reading = 1'b1;
    for (int f = 0; f < 4; f++) t_read_full(f);
    // a write right after a read, no idle clock between
    reading = 1'b0;
    t_write_addr(1, 5, 9);
    reading = 1'b1;
    t_read_addr(1, 5);
    reading = 1'b0;
    u_master.idle(1);

    // reset in the middle of a write frame: nothing written, slave idle,
    // and the next frame decodes normally
    begin
      logic r;
      u_master.header(OP_WRITE, MODE_ADDRESS, 2, 3);
      u_master.slot(1'b1, r);
      u_master.reset(1);
      expect_eq("abort: no strobe", wr_log.size(), 0);
      expect_eq("abort: idle", int'(busy), 0);
      t_write_addr(2, 3, 6);
      expect_eq("after abort", int'(mem[2][3]), 6);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
