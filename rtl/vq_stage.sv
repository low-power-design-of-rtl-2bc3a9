// vq_stage: one level of the distributed-memory TSVQ encoder.
//
// A stage owns everything needed to make the decision at its level of the
// tree: a data register holding the input vector, a controller, a processing
// element, a difference memory and a constant memory holding only this
// level's 2^(LEVEL-1) nodes, and an index register. The index bits decided
// by the levels above select the node (the memory address); this level adds
// one bit at the bottom of the index and passes vector and index on.
//
// Interface: in_valid/in_ready take a vector with its partial index; 18
// cycles later out_valid is high for one cycle with the same vector and the
// index extended by one bit (out_index[LEVEL-1:0] is meaningful). A new
// vector may be taken in that same cycle, so a stage sustains one vector per
// 18 cycles. The codebook write port (cb_wr_t) is shared by all stages; a
// stage accepts the writes whose level field equals LEVEL-1.
//
// The partitioning of the codebook by level, per-level controllers and the
// data/index registers follow the source design. The difference memory
// uses four-word rows (parallel access) when it holds at least MIN_PAR_BITS
// bits and single-word rows below that, where the wide rows cost too much
// area; the 1-kbit threshold is this design's reading of that trade-off.
module vq_stage
  import vq_pkg::*;
#(
  parameter int unsigned LEVEL        = 1,     // 1 = root
  parameter int unsigned MIN_PAR_BITS = 1024,
  parameter int unsigned NODES        = 2 ** (LEVEL - 1),
  parameter int unsigned PAR          = (NODES * VEC_LEN * WORD_W >= MIN_PAR_BITS) ? 4 : 1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  vec_t   in_vec,
  input  index_t in_index,
  output logic   out_valid,
  output vec_t   out_vec,
  output index_t out_index,
  input  cb_wr_t wr,
  output logic   busy,
  output logic   row_rd     // difference-memory array activation
);

  localparam int unsigned DEPTH = NODES * VEC_LEN;
  localparam int unsigned DAW   = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned NAW   = (NODES > 1) ? $clog2(NODES) : 1;

  logic              load, mem_rd_en, x_load, mac_en, mac_first, k_rd_en;
  logic [WSEL_W-1:0] word;
  vec_t              vec_q;
  logic [LEVELS-2:0] idx_q;      // index bits of the levels above
  logic [NAW-1:0]    node;
  word_t             d, k;
  logic              bit_o;
  logic              wr_here;

  vq_ctrl u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .load, .mem_rd_en, .word, .x_load,
    .mac_en, .mac_first, .k_rd_en, .out_valid, .busy
  );

  // Data and index registers.
  always_ff @(posedge clk) begin
    if (load) begin
      vec_q <= in_vec;
      idx_q <= in_index[LEVELS-2:0];
    end
  end

  assign node = (LEVEL > 1) ? NAW'(idx_q) : '0;

  assign wr_here = wr.en && (wr.level == ($bits(wr.level))'(LEVEL - 1));

  vq_cb_mem #(.DEPTH(DEPTH), .PAR(PAR)) u_mem (
    .clk,
    .rd_en   (mem_rd_en),
    .rd_addr (DAW'({node, word})),
    .rd_data (d),
    .row_rd,
    .wr_en   (wr_here && !wr.is_const),
    .wr_addr (DAW'(wr.addr)),
    .wr_data (wr.data)
  );

  vq_const_mem #(.NODES(NODES)) u_kmem (
    .clk,
    .rd_en   (k_rd_en),
    .rd_addr (node),
    .rd_data (k),
    .wr_en   (wr_here && wr.is_const),
    .wr_addr (NAW'(wr.addr)),
    .wr_data (wr.data)
  );

  vq_pe u_pe (
    .clk, .x_load, .x_in(vec_q[word]), .mac_en, .mac_first,
    .d_in(d), .k_in(k), .mse(), .bit_o
  );

  assign out_vec   = vec_q;
  assign out_index = {idx_q, bit_o};

endmodule
