// tb_vq_stage: two level stages side by side, level 2 (two nodes, serial
// single-word memory) and level 5 (sixteen nodes, four-word parallel rows).
// Random codevector pairs are generated for every node, their stored form
// (Cb - Ca words and the quantized constant) is written through the codebook
// port, and random vectors with random upper index bits are sent, both
// back-to-back and with gaps. Each result is checked against the reference
// decision computed from the codevectors themselves, along with the passed
// vector, the 18-cycle latency, the one-vector-per-18-cycles rate and the
// number of memory-array activations per vector (16 serial, 4 parallel).
module tb_vq_stage;
  import vq_pkg::*;
  import tb_vq_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NV = 80;

  logic   rst_n, in_valid;
  vec_t   in_vec;
  index_t in_index;
  cb_wr_t wr;
  logic   rdy2, rdy5, ov2, ov5, busy2, busy5, rr2, rr5;
  vec_t   ovec2, ovec5;
  index_t oidx2, oidx5;

  vq_stage #(.LEVEL(2)) u_l2 (.clk, .rst_n, .in_valid, .in_ready(rdy2), .in_vec, .in_index,
    .out_valid(ov2), .out_vec(ovec2), .out_index(oidx2), .wr, .busy(busy2), .row_rd(rr2));
  vq_stage #(.LEVEL(5)) u_l5 (.clk, .rst_n, .in_valid, .in_ready(rdy5), .in_vec, .in_index,
    .out_valid(ov5), .out_vec(ovec5), .out_index(oidx5), .wr, .busy(busy5), .row_rd(rr5));

  pixv_t ca [2][16], cb [2][16];      // [stage 0 = level 2, 1 = level 5][node]
  pixv_t xs [NV];
  index_t ix [NV];
  int    t_in [NV];
  int    cyc = 0, nout2 = 0, nout5 = 0, act2 = 0, act5 = 0, b2b = 0, gaps = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_word(input int level, input bit is_k, input int addr, input int data);
    @(negedge clk);
    wr.en = 1; wr.is_const = is_k; wr.level = 3'(level - 1); wr.addr = 12'(addr);
    wr.data = word_t'(data);
  endtask

  task automatic load_level(input int s, input int level);
    for (int n = 0; n < 2 ** (level - 1); n++) begin
      for (int i = 0; i < 16; i++) begin
        ca[s][n][i] = $urandom_range(0, 255);
        cb[s][n][i] = $urandom_range(0, 255);
      end
      for (int i = 0; i < 16; i++)
        write_word(level, 0, n * 16 + i, int'(cb[s][n][i]) - int'(ca[s][n][i]));
      write_word(level, 1, n, k_quant(k_exact(ca[s][n], cb[s][n])));
    end
  endtask

  function automatic vec_t pack(input pixv_t x);
    vec_t v;
    for (int i = 0; i < 16; i++) v[i] = pix_t'(x[i]);
    return v;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rr2) act2++;
    if (rr5) act5++;
    if (ov2) begin
      int n, node;
      bit b;
      n = nout2; node = int'(ix[n][0]);
      b = decide(xs[n], ca[0][node], cb[0][node]);
      check(oidx2 == {ix[n][6:0], b}, $sformatf("L2 vec %0d idx %h exp %h", n, oidx2, {ix[n][6:0], b}));
      check(ovec2 == pack(xs[n]), "L2 vector passed on");
      check(cyc - t_in[n] == 18, $sformatf("L2 latency %0d", cyc - t_in[n]));
      nout2++;
    end
    if (ov5) begin
      int n, node;
      bit b;
      n = nout5; node = int'(ix[n][3:0]);
      b = decide(xs[n], ca[1][node], cb[1][node]);
      check(oidx5 == {ix[n][6:0], b}, $sformatf("L5 vec %0d idx %h exp %h", n, oidx5, {ix[n][6:0], b}));
      check(ovec5 == pack(xs[n]), "L5 vector passed on");
      check(cyc - t_in[n] == 18, $sformatf("L5 latency %0d", cyc - t_in[n]));
      nout5++;
    end
  end

  initial begin
    rst_n = 0; in_valid = 0; in_vec = '0; in_index = '0; wr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    load_level(0, 2);
    load_level(1, 5);
    @(negedge clk); wr = '0;
    for (int n = 0; n < NV; n++) begin
      for (int i = 0; i < 16; i++) xs[n][i] = $urandom_range(0, 255);
      ix[n] = index_t'($urandom);
      in_valid = 1; in_vec = pack(xs[n]); in_index = ix[n];
      #1;
      while (!(rdy2 && rdy5)) begin @(negedge clk); #1; end
      t_in[n] = cyc;     // edges so far; the next edge takes the vector
      @(posedge clk);
      if (n > 0 && t_in[n] - t_in[n-1] == 18) b2b++;
      @(negedge clk);
      in_valid = 0;
      if (n % 4 == 3) begin gaps++; repeat ($urandom_range(1, 30)) @(negedge clk); end
    end
    repeat (40) @(negedge clk);
    check(nout2 == NV && nout5 == NV, $sformatf("results %0d %0d of %0d", nout2, nout5, NV));
    check(act2 == 16 * NV, $sformatf("level-2 array reads %0d exp %0d", act2, 16 * NV));
    check(act5 == 4 * NV, $sformatf("level-5 array reads %0d exp %0d", act5, 4 * NV));
    check(b2b > NV / 2, $sformatf("back-to-back vectors %0d", b2b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
