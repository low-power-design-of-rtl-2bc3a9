// vq_pe: processing element of one tree-level stage.
//
// Evaluates Eq. (4) for one node: MSE_ab = K*2^K_SHIFT + sum_i 2*X_i*d_i,
// with d_i = Cb_i - Ca_i from the difference memory and K from the constant
// memory. MSE_ab is the distortion to the left codevector Ca minus the
// distortion to the right codevector Cb, so its sign bit picks the branch:
// bit = 0 (left) when MSE_ab < 0, bit = 1 (right) otherwise, ties going
// right. The factor 2 is a wired shift.
//
// Both multiplier operands come from registers that change only when new
// work arrives: the pixel operand x_q loads only on x_load, and d_in is the
// memory's held output. An idle stage therefore presents unchanged inputs to
// its multiplier and adders (the source design's glitch-avoiding input
// registers); the accumulator likewise loads only on mac_en.
//
// Timing: x_load with x_in one cycle before the mac_en that uses it; d_in is
// valid during mac_en (the memory is read one cycle earlier); k_in is valid
// in the cycle after the last MAC, when bit and mse are read combinationally
// from the accumulator and K (the final add).
module vq_pe
  import vq_pkg::*;
(
  input  logic clk,
  input  logic x_load,
  input  pix_t x_in,
  input  logic mac_en,
  input  logic mac_first,
  input  word_t d_in,
  input  word_t k_in,
  output acc_t mse,
  output logic bit_o
);

  pix_t x_q;
  acc_t acc_q;
  acc_t prod2;

  always_ff @(posedge clk) begin
    if (x_load) x_q <= x_in;
  end

  // 2*X*d: X unsigned 8 bit, d signed 9 bit.
  assign prod2 = (ACC_W'(signed'({1'b0, x_q})) * ACC_W'(d_in)) <<< 1;

  always_ff @(posedge clk) begin
    if (mac_en) acc_q <= (mac_first ? '0 : acc_q) + prod2;
  end

  assign mse   = acc_q + (ACC_W'(k_in) <<< K_SHIFT);
  assign bit_o = ~mse[ACC_W-1];

endmodule
