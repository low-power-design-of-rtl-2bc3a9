// vq_pkg: constants and types shared by the tree-search vector quantizer
// (TSVQ) encoder.
//
// The encoder codes a 4x4 block of 8-bit luminance pixels (a 16-element
// vector) into an 8-bit index by walking a binary tree of depth 8. At every
// node the distortion difference of Eq. (4) decides left (bit 0) or right
// (bit 1):
//   MSE_ab = sum_i (Ca_i^2 - Cb_i^2) + sum_i 2*X_i*(Cb_i - Ca_i)
// The first sum (K) is precomputed off-line and stored quantized to a 9-bit
// word, the differences Cb_i - Ca_i are stored as 9-bit two's-complement words.
// Pixel, vector length, tree depth, 9-bit stored words and 18 cycles per node
// follow the source design. The scale of the stored constant (K_SHIFT), the
// accumulator width and the write-port struct are this design's choices.
package vq_pkg;

  localparam int unsigned PIX_W    = 8;   // luminance bits per pixel
  localparam int unsigned VEC_LEN  = 16;  // pixels per 4x4 vector
  localparam int unsigned LEVELS   = 8;   // tree depth = index bits (256 codewords)
  localparam int unsigned WORD_W   = 9;   // stored word width (Cb-Ca and K)
  localparam int unsigned K_SHIFT  = 12;  // stored K = round(K_exact / 2^K_SHIFT)
  localparam int unsigned NODE_CYC = 18;  // clock cycles per tree node
  localparam int unsigned WSEL_W   = $clog2(VEC_LEN);

  // Accumulator: |2*X*d| < 2^17, 16 terms < 2^21, plus |K<<12| <= 2^20.
  localparam int unsigned ACC_W    = 24;

  typedef logic [PIX_W-1:0]          pix_t;
  typedef pix_t [VEC_LEN-1:0]        vec_t;     // element i = pixel i
  typedef logic signed [WORD_W-1:0]  word_t;
  typedef logic signed [ACC_W-1:0]   acc_t;
  typedef logic [LEVELS-1:0]         index_t;

  // Codebook write port, shared by all levels. For a difference word
  // addr = node*VEC_LEN + i; for a constant addr = node.
  typedef struct packed {
    logic                      en;
    logic                      is_const;  // 1: constant memory, 0: difference memory
    logic [$clog2(LEVELS)-1:0] level;     // 0 = root level
    logic [11:0]               addr;
    word_t                     data;
  } cb_wr_t;

endpackage
