// serial_master -- behavioural model of the bus controller that drives the
// tuning logic (on the real test board a microcontroller bit-banging GPIO
// pins). Not synthesizable; testbench use only.
//
// It drives CLK, RST_N and the chip's DATA_IN and reads the chip's DATA_OUT.
// Each bit slot sets DATA_IN while CLK is low, raises CLK (the chip samples
// there) and lowers it again; DATA_OUT is read back at the falling edge, so
// slot n returns what the chip drove after its n-th rising edge. Frames
// follow the layout in tuning_pkg. edges counts rising edges since time 0.
module serial_master
  import tuning_pkg::*;
#(
  parameter int unsigned DATA_W = 4,
  parameter time         HALF   = 5ns
) (
  output logic clk,
  output logic rst_n,
  output logic sdo,   // to the chip's DATA_IN
  input  logic sdi    // from the chip's DATA_OUT
);

  typedef logic [NUM_REGS-1:0][DATA_W-1:0] words_t;

  longint unsigned edges = 0;

  initial begin
    clk   = 1'b0;
    rst_n = 1'b1;
    sdo   = 1'b0;
  end

  task automatic slot(input logic b, output logic r);
    sdo = b;
    #HALF clk = 1'b1;
    edges++;
    #HALF clk = 1'b0;
    r = sdi;
  endtask

  task automatic idle(input int n);
    logic r;
    repeat (n) slot(1'b0, r);
  endtask

  // Hold RST_N low for n clocks (synchronous reset).
  task automatic reset(input int n = 2);
    logic r;
    rst_n = 1'b0;
    repeat (n) slot(1'b0, r);
    rst_n = 1'b1;
  endtask

  task automatic header(input op_e op, input mode_e mode,
                        input int fdda, input int regi);
    logic r;
    hdr_t h;
    h.op   = op;
    h.mode = mode;
    h.fdda = FDDA_IDX_W'(fdda);
    h.regi = REG_IDX_W'(regi);
    slot(1'b1, r);                              // start bit
    for (int i = HDR_W - 1; i >= 0; i--) slot(h[i], r);
  endtask

  task automatic send_word(input logic [DATA_W-1:0] w);
    logic r;
    for (int i = DATA_W - 1; i >= 0; i--) slot(w[i], r);
  endtask

  task automatic recv_word(output logic [DATA_W-1:0] w);
    logic r;
    for (int i = DATA_W - 1; i >= 0; i--) begin
      slot(1'b0, r);
      w[i] = r;
    end
  endtask

  task automatic write_addr(input int fdda, input int regi, input logic [DATA_W-1:0] d);
    header(OP_WRITE, MODE_ADDRESS, fdda, regi);
    send_word(d);
  endtask

  task automatic write_full(input int fdda, input words_t d);
    header(OP_WRITE, MODE_FULL, fdda, 0);
    for (int i = 0; i < NUM_REGS; i++) send_word(d[i]);
  endtask

  // The turnaround slot returns the first bit, so the word is read from
  // the slot after the header onwards.
  task automatic read_addr(input int fdda, input int regi, output logic [DATA_W-1:0] d);
    header(OP_READ, MODE_ADDRESS, fdda, regi);
    recv_word(d);
  endtask

  task automatic read_full(input int fdda, output words_t d);
    header(OP_READ, MODE_FULL, fdda, 0);
    for (int i = 0; i < NUM_REGS; i++) recv_word(d[i]);
  endtask

endmodule
