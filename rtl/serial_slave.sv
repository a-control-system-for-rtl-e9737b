// serial_slave -- frame decoder of the half-duplex serial tuning bus.
//
// The external controller (a microcontroller bit-banging GPIO pins) drives
// CLK, RST_N and DATA_IN; the chip answers on DATA_OUT. The source fixes
// these four pins, that the logic works on the rising clock edge and that
// reset is synchronous; the frame layout is this design's own (see
// tuning_pkg):
//
//   START(1) | OP(1) | MODE(1) | FDDA(2) | REG(4) | payload
//
// The line idles low; a 1 sampled while idle is the start bit. After the
// eight header bits a write frame carries one DATA_W-bit word per register
// (one word in address mode, 14 in full mode, register 0 first). Each word is
// written to the register file at the same edge that samples its last bit.
// A read frame has one turnaround clock after the header, at whose edge the
// first word is loaded and its MSB is put on DATA_OUT; each following edge
// shifts out the next bit, and the next word follows without a gap. DATA_OUT
// is low outside the read payload. A frame may start on the edge right after
// the last bit of the previous one.
//
// Frames that name a missing FDDA or register still run to their full
// length, but write nothing and read back zeros. Only a reset aborts a frame.
//
// Timing, in rising CLK edges counted from the start bit at edge 0:
//   address write : data bits at edges 9..8+DATA_W, written at 8+DATA_W
//   address read  : edge 9 is the turnaround; DATA_OUT bit k is valid from
//                   edge 9+k to edge 10+k, k = 0..DATA_W-1
//   full mode     : 14 words back to back, word w shifted by w*DATA_W edges
// The next start bit may come at edge 9+DATA_W (address mode) or 9+14*DATA_W (full mode).
module serial_slave
  import tuning_pkg::*;
#(
  parameter int unsigned DATA_W   = 4,
  parameter int unsigned NUM_FDDA = NUM_FDDA_DEFAULT
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  data_in,
  output logic                  data_out,
  // register file access
  output logic                  wr_en,
  output logic [FDDA_IDX_W-1:0] fdda_idx,   // FDDA of the access
  output logic [REG_IDX_W-1:0]  reg_idx,    // register of the access
  output logic [DATA_W-1:0]     wr_data,
  input  logic [DATA_W-1:0]     rd_data,    // register fdda_idx/reg_idx
  output logic                  busy        // a frame is in progress
);

  typedef enum logic [2:0] {
    S_IDLE,
    S_HDR,
    S_WDATA,
    S_TURN,
    S_RDATA
  } state_e;

  localparam int unsigned BIT_W  = (DATA_W > HDR_W) ? $clog2(DATA_W + 1) : $clog2(HDR_W + 1);

  state_e                 state_q;
  logic [HDR_W-2:0]       hdr_sh_q;     // header bits received so far
  logic [FDDA_IDX_W-1:0]  fdda_q;       // FDDA named by the header
  logic [BIT_W-1:0]       bit_cnt_q;
  logic [REG_IDX_W-1:0]   ptr_q;        // register of the current word
  logic [REG_IDX_W-1:0]   words_left_q; // words still to move after this one
  logic [DATA_W-1:0]      sh_q;         // write: bits received, read: bits to send
  logic                   dout_q;

  // Address of the access this frame is making.
  logic addr_ok;
  assign addr_ok  = (fdda_q < FDDA_IDX_W'(NUM_FDDA)) && (ptr_q < REG_IDX_W'(NUM_REGS));
  assign fdda_idx = fdda_q;
  assign reg_idx  = ptr_q;

  // A write completes on the edge that samples the last bit of a word.
  logic last_wbit;
  assign last_wbit = (state_q == S_WDATA) && (bit_cnt_q == BIT_W'(DATA_W - 1));
  assign wr_en     = last_wbit && addr_ok;
  assign wr_data   = {sh_q[DATA_W-2:0], data_in};

  // Read data of the current word; a missing register reads as zero.
  logic [DATA_W-1:0] rd_word;
  assign rd_word = addr_ok ? rd_data : '0;

  assign data_out = dout_q;
  assign busy     = (state_q != S_IDLE);

  hdr_t hdr_next;
  assign hdr_next = hdr_t'({hdr_sh_q[HDR_W-2:0], data_in});

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      hdr_sh_q     <= '0;
      fdda_q       <= '0;
      bit_cnt_q    <= '0;
      ptr_q        <= '0;
      words_left_q <= '0;
      sh_q         <= '0;
      dout_q       <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE: begin
          dout_q <= 1'b0;
          if (data_in) begin
            state_q   <= S_HDR;
            bit_cnt_q <= '0;
          end
        end

        S_HDR: begin
          hdr_sh_q  <= hdr_next[HDR_W-2:0];
          bit_cnt_q <= bit_cnt_q + 1'b1;
          if (bit_cnt_q == BIT_W'(HDR_W - 1)) begin
            fdda_q       <= hdr_next.fdda;
            bit_cnt_q    <= '0;
            ptr_q        <= (hdr_next.mode == MODE_FULL) ? '0 : hdr_next.regi;
            words_left_q <= (hdr_next.mode == MODE_FULL) ? REG_IDX_W'(NUM_REGS - 1) : '0;
            state_q      <= (hdr_next.op == OP_WRITE) ? S_WDATA : S_TURN;
          end
        end

        S_WDATA: begin
          sh_q      <= wr_data;
          bit_cnt_q <= bit_cnt_q + 1'b1;
          if (last_wbit) begin
            bit_cnt_q <= '0;
            if (words_left_q == '0) begin
              state_q <= S_IDLE;
            end else begin
              ptr_q        <= ptr_q + 1'b1;
              words_left_q <= words_left_q - 1'b1;
            end
          end
        end

        S_TURN: begin
          // First word: drive its MSB now, keep the rest to shift out.
          dout_q    <= rd_word[DATA_W-1];
          sh_q      <= rd_word << 1;
          bit_cnt_q <= BIT_W'(1);
          ptr_q     <= ptr_q + 1'b1;
          state_q   <= S_RDATA;
        end

        S_RDATA: begin
          if (bit_cnt_q == BIT_W'(DATA_W)) begin
            if (words_left_q == '0) begin
              dout_q  <= 1'b0;
              state_q <= S_IDLE;
              // back-to-back frame: this edge may carry the next start bit
              if (data_in) begin
                state_q   <= S_HDR;
                bit_cnt_q <= '0;
              end
            end else begin
              dout_q       <= rd_word[DATA_W-1];
              sh_q         <= rd_word << 1;
              bit_cnt_q    <= BIT_W'(1);
              ptr_q        <= ptr_q + 1'b1;
              words_left_q <= words_left_q - 1'b1;
            end
          end else begin
            dout_q    <= sh_q[DATA_W-1];
            sh_q      <= sh_q << 1;
            bit_cnt_q <= bit_cnt_q + 1'b1;
          end
        end

        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Bus rules: nothing is written outside a write payload, and DATA_OUT
  // stays low unless a read payload is being sent.
  a_wr_in_payload: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> state_q == S_WDATA);
  a_dout_quiet: assert property (@(posedge clk) disable iff (!rst_n)
    data_out |-> state_q == S_RDATA);

  initial begin
    assert (DATA_W >= 2) else $error("serial_slave: DATA_W must be at least 2");
    assert (NUM_FDDA >= 1 && NUM_FDDA <= (1 << FDDA_IDX_W))
      else $error("serial_slave: NUM_FDDA must fit the FDDA field");
  end

endmodule
