// vq_const_mem: per-node constant memory of one tree level.
//
// Holds, for every node of the level, the precomputed first summation of
// Eq. (4), K = sum_i (Ca_i^2 - Cb_i^2), quantized to a 9-bit two's-complement
// word (K_stored = round(K / 2^K_SHIFT), saturated). Keeping these constants in
// a memory of their own, apart from the difference words, follows the source
// design's split into a constant memory and a codevector memory; the
// quantization scale is this design's choice (see vq_pkg).
//
// Timing: synchronous read, rd_data valid the cycle after rd_en and held
// until the next read. One write port loads the constants before operation.
module vq_const_mem
  import vq_pkg::*;
#(
  parameter int unsigned NODES = 1,
  localparam int unsigned AW   = (NODES > 1) ? $clog2(NODES) : 1
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output word_t         rd_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  word_t         wr_data
);

  word_t mem [NODES];
  word_t q;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) q <= mem[rd_addr];
  end

  assign rd_data = q;

endmodule
