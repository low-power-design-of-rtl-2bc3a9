// vq_tsvq_enc: low-power tree-search vector quantizer (TSVQ) encoder with
// distributed memory.
//
// Codes each 4x4 block of 8-bit pixels into the 8-bit index of a 256-entry
// tree-structured codebook. The codebook is split by tree level into eight
// memories, each with its own controller and processing element, and the
// eight level stages form a pipeline: a vector enters level 1, and each
// level adds one index bit (most significant first) and hands vector and
// partial index to the next level. Eight vectors are in flight at once, so
// the clock can run eight times slower than a single shared datapath needs
// for the same rate. This organisation follows the source design; the
// handshake, the codebook write port and the memory-width threshold are this
// design's choices (see vq_stage, vq_ctrl).
//
// Interface:
//   in_valid/in_ready/in_vec  take one vector (pixel i in in_vec[i]);
//                             in_ready is high at most one cycle in 18.
//   out_valid/out_index       one-cycle pulse with the finished index,
//                             LEVELS*18 = 144 cycles after the vector was
//                             taken; there is no back-pressure on the output.
//   wr                        codebook load port (see vq_pkg::cb_wr_t);
//                             load the codebook before sending vectors.
//   row_rd                    one bit per level, pulses for each array
//                             activation of that level's difference memory.
// Throughput: one vector per 18 cycles.
module vq_tsvq_enc
  import vq_pkg::*;
#(
  parameter int unsigned MIN_PAR_BITS = 1024
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  vec_t              in_vec,
  output logic              out_valid,
  output index_t            out_index,
  input  cb_wr_t            wr,
  output logic [LEVELS-1:0] busy,
  output logic [LEVELS-1:0] row_rd
);

  logic   v     [LEVELS+1];
  logic   rdy   [LEVELS+1];
  vec_t   vec   [LEVELS+1];
  index_t idx   [LEVELS+1];

  assign v[0]      = in_valid;
  assign in_ready  = rdy[0];
  assign vec[0]    = in_vec;
  assign idx[0]    = '0;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    vq_stage #(.LEVEL(l + 1), .MIN_PAR_BITS(MIN_PAR_BITS)) u_stage (
      .clk, .rst_n,
      .in_valid  (v[l]),
      .in_ready  (rdy[l]),
      .in_vec    (vec[l]),
      .in_index  (idx[l]),
      .out_valid (v[l+1]),
      .out_vec   (vec[l+1]),
      .out_index (idx[l+1]),
      .wr,
      .busy      (busy[l]),
      .row_rd    (row_rd[l])
    );
  end

  assign rdy[LEVELS] = 1'b1;
  assign out_valid   = v[LEVELS];
  assign out_index   = idx[LEVELS];

`ifndef SYNTHESIS
  // Identical stages in lock-step: a finished vector always finds the next
  // stage ready.
  for (genvar l = 1; l < LEVELS; l++) begin : g_chk
    a_no_drop: assert property (@(posedge clk) disable iff (!rst_n) v[l] |-> rdy[l])
      else $error("vq_tsvq_enc: level %0d result dropped", l + 1);
  end
`endif

endmodule
