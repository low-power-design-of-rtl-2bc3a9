// tb_vq_const_mem: writes random constants to an 8-node constant memory and
// reads them back in random order, checking data, one-cycle latency and
// that the output holds while no read is made.
module tb_vq_const_mem;
  import vq_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       rd_en, wr_en;
  logic [2:0] rd_addr, wr_addr;
  word_t      wr_data, q;
  word_t      ref_m [8];

  vq_const_mem #(.NODES(8)) dut (.clk, .rd_en, .rd_addr, .rd_data(q), .wr_en, .wr_addr, .wr_data);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_en = 0; wr_en = 0; rd_addr = 0; wr_addr = 0; wr_data = 0;
    @(negedge clk);
    for (int a = 0; a < 8; a++) begin
      ref_m[a] = word_t'($urandom_range(0, 511));
      wr_en = 1; wr_addr = 3'(a); wr_data = ref_m[a];
      @(negedge clk);
    end
    wr_en = 0;
    for (int t = 0; t < 40; t++) begin
      int a;
      a = $urandom_range(0, 7);
      rd_en = 1; rd_addr = 3'(a);
      @(negedge clk);
      rd_en = 0;
      check_eq(q, ref_m[a]);
      rd_addr = 3'(a + 1);
      @(negedge clk);
      check_eq(q, ref_m[a]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_eq(input word_t got, input word_t exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL got %0d exp %0d", got, exp); end
  endtask
endmodule
