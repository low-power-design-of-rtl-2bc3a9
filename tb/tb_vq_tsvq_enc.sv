// tb_vq_tsvq_enc: end-to-end test of the eight-level TSVQ encoder at its
// default size (256-entry codebook, 255 tree nodes).
//
// A random tree codebook is generated, converted to its stored form
// (Cb - Ca words and quantized constants) and written through the codebook
// port. Then two workloads run:
//   1. 300 random vectors sent with random gaps and with in_valid held high
//      while the encoder is busy (input stalls);
//   2. one full 240x128 frame (1920 vectors of 4x4 pixels) of a synthetic
//      image, sent back-to-back.
// Every index is compared with a software tree walk that decides each level
// from the codevectors directly. Also checked: latency 8*18 = 144 cycles,
// one vector per 18 cycles, the frame taking 1920*18 cycles, and memory
// array activations per vector at each level (16 on the single-word levels
// 1-3, 4 on the four-word levels 4-8). Mechanisms counted, each of which must
// occur: all eight stages busy at once, input stall, idle cycles, both branch
// outcomes at every level.
module tb_vq_tsvq_enc;
  import vq_pkg::*;
  import tb_vq_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NRAND = 300;
  localparam int FW = 240, FH = 128;
  localparam int NFRAME = (FW / 4) * (FH / 4);
  localparam int NV = NRAND + NFRAME;

  logic              rst_n, in_valid, in_ready, out_valid;
  vec_t              in_vec;
  index_t            out_index;
  cb_wr_t            wr;
  logic [LEVELS-1:0] busy, row_rd;

  vq_tsvq_enc dut (.*);

  pixv_t  ca [8][128], cb [8][128];
  pixv_t  xs [NV];
  index_t exp_idx [NV];
  int     t_in [NV];
  int     cyc = 0, nout = 0;
  int     act [8];
  int     ones [8], zeros [8];
  int     n_full = 0, n_stall = 0, n_idle = 0, n_b2b = 0;
  int     frame_t0, frame_t1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic vec_t pack(input pixv_t x);
    vec_t v;
    for (int i = 0; i < 16; i++) v[i] = pix_t'(x[i]);
    return v;
  endfunction

  // Software tree walk; also records the branch taken at each level.
  function automatic index_t encode(input pixv_t x);
    index_t idx = '0;
    for (int l = 0; l < 8; l++) begin
      bit b = decide(x, ca[l][7'(idx)], cb[l][7'(idx)]);
      if (b) ones[l]++; else zeros[l]++;
      idx = index_t'({idx, b});
    end
    return idx;
  endfunction

  task automatic write_word(input int level, input bit is_k, input int addr, input int data);
    @(negedge clk);
    wr.en = 1; wr.is_const = is_k; wr.level = 3'(level); wr.addr = 12'(addr);
    wr.data = word_t'(data);
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int l = 0; l < 8; l++) if (row_rd[l]) act[l]++;
    if (&busy) n_full++;
    if (in_valid && !in_ready) n_stall++;
    if (!in_valid && !busy[0]) n_idle++;
    if (out_valid) begin
      check(nout < NV, "no extra results");
      if (nout < NV) begin
        check(out_index == exp_idx[nout],
              $sformatf("vector %0d index %02h exp %02h", nout, out_index, exp_idx[nout]));
        check(cyc - t_in[nout] == LEVELS * NODE_CYC,
              $sformatf("vector %0d latency %0d", nout, cyc - t_in[nout]));
      end
      nout++;
    end
  end

  task automatic send(input int n, input int gap);
    in_vec = pack(xs[n]);
    in_valid = 1;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    t_in[n] = cyc;
    if (n > 0 && t_in[n] - t_in[n-1] == NODE_CYC) n_b2b++;
    @(posedge clk);
    @(negedge clk);
    if (gap > 0) in_valid = 0;   // otherwise valid stays high for the next vector
    repeat (gap) @(negedge clk);
  endtask

  initial begin
    rst_n = 0; in_valid = 0; in_vec = '0; wr = '0;
    for (int l = 0; l < 8; l++) begin act[l] = 0; ones[l] = 0; zeros[l] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // codebook
    for (int l = 0; l < 8; l++)
      for (int n = 0; n < 2 ** l; n++) begin
        for (int i = 0; i < 16; i++) begin
          ca[l][n][i] = $urandom_range(0, 255);
          cb[l][n][i] = $urandom_range(0, 255);
        end
        for (int i = 0; i < 16; i++)
          write_word(l, 0, n * 16 + i, int'(cb[l][n][i]) - int'(ca[l][n][i]));
        write_word(l, 1, n, k_quant(k_exact(ca[l][n], cb[l][n])));
      end
    @(negedge clk); wr = '0;
    // workload 1: random vectors, gaps and stalls
    for (int n = 0; n < NRAND; n++) begin
      for (int i = 0; i < 16; i++) xs[n][i] = $urandom_range(0, 255);
      exp_idx[n] = encode(xs[n]);
    end
    for (int n = 0; n < NRAND; n++) begin
      int g;
      g = ($urandom_range(0, 3) == 0) ? $urandom_range(1, 40) : 0;
      send(n, g);
    end
    in_valid = 0;
    repeat (200) @(negedge clk);
    // workload 2: one 240x128 frame, block by block, raster order
    for (int by = 0; by < FH / 4; by++)
      for (int bx = 0; bx < FW / 4; bx++) begin
        int n;
        n = NRAND + by * (FW / 4) + bx;
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++) begin
            int y, x;
            y = by * 4 + r; x = bx * 4 + c;
            xs[n][r*4+c] = (y + 2 * x + ((x / 16 + y / 16) % 2) * 96 + $urandom_range(0, 15)) % 256;
          end
        exp_idx[n] = encode(xs[n]);
      end
    frame_t0 = -1;
    for (int n = NRAND; n < NV; n++) begin
      send(n, 0);
      if (n == NRAND) frame_t0 = t_in[n];
    end
    frame_t1 = t_in[NV-1];
    in_valid = 0;
    repeat (LEVELS * NODE_CYC + 20) @(negedge clk);

    check(nout == NV, $sformatf("results %0d of %0d", nout, NV));
    check(frame_t1 - frame_t0 == (NFRAME - 1) * NODE_CYC,
          $sformatf("frame took %0d cycles between first and last vector", frame_t1 - frame_t0));
    for (int l = 0; l < 8; l++) begin
      int per;
      per = (l < 3) ? 16 : 4;
      check(act[l] == per * NV, $sformatf("level %0d array reads %0d exp %0d", l + 1, act[l], per * NV));
      check(ones[l] > 0 && zeros[l] > 0, $sformatf("level %0d both branches", l + 1));
    end
    check(n_full > 0, "pipeline full");
    check(n_stall > 0, "input stall");
    check(n_idle > 0, "idle cycles");
    check(n_b2b >= NFRAME - 1, $sformatf("back-to-back %0d", n_b2b));
    $display("mechanisms: all-stages-busy cycles %0d, stall cycles %0d, idle cycles %0d, back-to-back %0d",
             n_full, n_stall, n_idle, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
