// vq_ctrl: controller of one tree-level stage.
//
// Sequences the comparison at one tree node in NODE_CYC = 18 cycles, as the
// source design budgets them: one cycle to fetch the first difference word,
// sixteen multiply-accumulate cycles, and a last cycle for the final add that
// yields the index bit. The constant K is the seventeenth memory access, made
// in the last MAC cycle. Cycle by cycle (cnt):
//   0      : read d_0, load operand X_0
//   1..15  : MAC word cnt-1, read d_cnt, load operand X_cnt
//   16     : MAC word 15, read K
//   17     : final add, out_valid (the next stage captures here)
// Handshake (this design's choice): a vector is taken when in_valid and
// in_ready are both high at a clock edge; in_ready is high when the stage is
// idle or in its last cycle, so identical stages chained together accept one
// another's results without stalling. Every stage has its own controller, as
// in the source design. Synchronous active-low reset to idle.
module vq_ctrl
  import vq_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  output logic              load,       // capture vector and index this edge
  output logic              mem_rd_en,  // read difference word
  output logic [WSEL_W-1:0] word,       // word being read / operand being loaded
  output logic              x_load,     // load pixel operand X_word
  output logic              mac_en,
  output logic              mac_first,  // first MAC: accumulator starts from 0
  output logic              k_rd_en,    // read constant K
  output logic              out_valid,  // final cycle: index bit valid
  output logic              busy
);

  localparam int unsigned CW = $clog2(NODE_CYC);
  localparam logic [CW-1:0] LAST = CW'(NODE_CYC - 1);

  logic [CW-1:0] cnt;

  assign out_valid = busy && (cnt == LAST);
  assign in_ready  = !busy || (cnt == LAST);
  assign load      = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else if (load) begin
      busy <= 1'b1;
      cnt  <= '0;
    end else if (busy) begin
      if (cnt == LAST) begin
        busy <= 1'b0;
        cnt  <= '0;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  assign word      = WSEL_W'(cnt);
  assign mem_rd_en = busy && (cnt < CW'(VEC_LEN));
  assign x_load    = mem_rd_en;
  assign mac_en    = busy && (cnt >= CW'(1)) && (cnt <= CW'(VEC_LEN));
  assign mac_first = busy && (cnt == CW'(1));
  assign k_rd_en   = busy && (cnt == CW'(VEC_LEN));

`ifndef SYNTHESIS
  // The node budget must leave room for the fetch, the MACs and the final add.
  initial assert (NODE_CYC == VEC_LEN + 2)
    else $error("vq_ctrl: NODE_CYC must be VEC_LEN + 2");
`endif

endmodule
