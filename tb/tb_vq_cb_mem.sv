// tb_vq_cb_mem: checks the difference memory in serial (PAR=1) and
// wide-row forms (PAR=2 and PAR=4). Random words are written, then every node's 16
// words are read in order; the data, the one-cycle read latency, the output
// hold while idle and the number of array activations (16 per node serial,
// 8 per node for PAR=2, 4 per node for PAR=4) are checked.
module tb_vq_cb_mem;
  import vq_pkg::*;

  localparam int unsigned DEPTH = 64;   // 4 nodes
  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        rd_en, wr_en;
  logic [5:0]  rd_addr, wr_addr;
  word_t       wr_data, q1, q2, q4;
  logic        rr1, rr2, rr4;
  word_t       ref_m [DEPTH];
  int          act1, act2, act4;

  vq_cb_mem #(.DEPTH(DEPTH), .PAR(1)) u_ser (.clk, .rd_en, .rd_addr, .rd_data(q1), .row_rd(rr1),
                                             .wr_en, .wr_addr, .wr_data);
  vq_cb_mem #(.DEPTH(DEPTH), .PAR(2)) u_par2 (.clk, .rd_en, .rd_addr, .rd_data(q2), .row_rd(rr2),
                                              .wr_en, .wr_addr, .wr_data);
  vq_cb_mem #(.DEPTH(DEPTH), .PAR(4)) u_par (.clk, .rd_en, .rd_addr, .rd_data(q4), .row_rd(rr4),
                                             .wr_en, .wr_addr, .wr_data);

  always @(posedge clk) begin
    if (rr1) act1++;
    if (rr2) act2++;
    if (rr4) act4++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_en = 0; wr_en = 0; rd_addr = 0; wr_addr = 0; wr_data = 0;
    act1 = 0; act2 = 0; act4 = 0;
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      ref_m[a] = word_t'($urandom_range(0, 511));
      wr_en = 1; wr_addr = 6'(a); wr_data = ref_m[a];
      @(negedge clk);
    end
    wr_en = 0;
    act1 = 0; act2 = 0; act4 = 0;
    // Reads are pipelined as in a stage: the next address is applied in the
    // same cycle the previous word is checked.
    for (int n = 3; n >= 0; n--) begin
      for (int w = 0; w <= 16; w++) begin
        if (w < 16) begin rd_en = 1; rd_addr = 6'(n * 16 + w); end
        else begin rd_en = 0; rd_addr = 6'($urandom); end
        #1;
        if (w > 0) begin
          check(q1 == ref_m[n*16+w-1], $sformatf("serial n%0d w%0d got %0d exp %0d", n, w-1, q1, ref_m[n*16+w-1]));
          check(q2 == ref_m[n*16+w-1], $sformatf("PAR2 n%0d w%0d got %0d", n, w-1, q2));
          check(q4 == ref_m[n*16+w-1], $sformatf("parallel n%0d w%0d got %0d exp %0d", n, w-1, q4, ref_m[n*16+w-1]));
        end
        @(negedge clk);
      end
      // idle cycles: outputs hold the last word
      repeat (3) @(negedge clk);
      check(q1 == ref_m[n*16+15] && q2 == ref_m[n*16+15] && q4 == ref_m[n*16+15], "output hold while idle");
    end
    check(act1 == 64, $sformatf("serial activations %0d exp 64", act1));
    check(act2 == 32, $sformatf("PAR2 activations %0d exp 32", act2));
    check(act4 == 16, $sformatf("parallel activations %0d exp 16", act4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
