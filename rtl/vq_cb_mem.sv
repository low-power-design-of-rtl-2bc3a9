// vq_cb_mem: codevector-difference memory of one tree level, with optional
// parallel (wide-row) access.
//
// Holds the words d_i = Cb_i - Ca_i (9-bit two's complement) of every node of
// the level, VEC_LEN words per node, at word address node*VEC_LEN + i.
// The array is PAR words wide. A read whose word address is a multiple of PAR
// fetches a whole row into an output latch; the following PAR-1 reads are
// served from that latch through a PAR:1 multiplexer, so the array is
// activated once per PAR words. With PAR = 1 this is a plain serial memory.
// Wide rows with a latch and multiplexer follow the source design's parallel
// access scheme (four 9-bit words per row there); requiring reads to walk a
// row in order, starting at its first word, is this design's choice, and the
// stage controller always reads in that order.
//
// Timing: synchronous read, rd_data is valid the cycle after rd_en and holds
// until the next read (it keeps the multiplier operand still while idle).
// Writes (one 9-bit word per cycle, word-enabled within the row) load the
// codebook before operation; reading and writing the same row in one cycle is
// not supported. row_rd pulses for each array activation.
module vq_cb_mem
  import vq_pkg::*;
#(
  parameter int unsigned DEPTH = 16,   // words (nodes * VEC_LEN)
  parameter int unsigned PAR   = 1,    // words per row: 1, 2 or 4
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output word_t         rd_data,
  output logic          row_rd,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  word_t         wr_data
);

  localparam int unsigned ROWS = DEPTH / PAR;
  localparam int unsigned SW   = (PAR > 1) ? $clog2(PAR) : 1;
  localparam int unsigned RW   = (ROWS > 1) ? $clog2(ROWS) : 1;

  typedef word_t [PAR-1:0] row_t;

  row_t          mem [ROWS];
  row_t          latch_q;
  logic [SW-1:0] sel_q;
  logic [RW-1:0] rd_row, wr_row;
  logic [SW-1:0] rd_sel, wr_sel;

  always_comb begin
    if (PAR > 1) begin
      rd_row = RW'(rd_addr >> $clog2(PAR));
      wr_row = RW'(wr_addr >> $clog2(PAR));
      rd_sel = SW'(rd_addr);
      wr_sel = SW'(wr_addr);
    end else begin
      rd_row = RW'(rd_addr);
      wr_row = RW'(wr_addr);
      rd_sel = '0;
      wr_sel = '0;
    end
  end

  assign row_rd = rd_en && (rd_sel == '0);

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_row][wr_sel] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (row_rd) latch_q <= mem[rd_row];
    if (rd_en)  sel_q   <= rd_sel;
  end

  assign rd_data = latch_q[sel_q];

endmodule
