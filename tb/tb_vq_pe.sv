// tb_vq_pe: feeds the processing element random pixels, difference words and
// constants with the controller's timing (operand one cycle ahead of its
// MAC, K after the last MAC) and checks the decision value
// K*2^12 + sum 2*X_i*d_i and its sign bit against integer arithmetic. Extreme
// operands (X = 255, d = -256 or 255, K = -256 or 255) are included, and a
// zero result checks that ties go right (bit 1). Idle cycles between nodes
// check that the result holds.
module tb_vq_pe;
  import vq_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  x_load, mac_en, mac_first, bit_o;
  pix_t  x_in;
  word_t d_in, k_in;
  acc_t  mse;
  int    ones = 0, zeros = 0;

  vq_pe dut (.*);

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

  task automatic run_node(input int mode);
    int x[16], d[16], k, expv;
    for (int i = 0; i < 16; i++) begin
      case (mode)
        0: begin x[i] = $urandom_range(0, 255); d[i] = $urandom_range(0, 511) - 256; end
        1: begin x[i] = 255; d[i] = -256; end
        2: begin x[i] = 255; d[i] = 255; end
        default: begin x[i] = (i == 0) ? 128 : 0; d[i] = (i == 0) ? 16 : 0; end
      endcase
    end
    case (mode)
      0: k = $urandom_range(0, 511) - 256;
      1: k = 255;
      2: k = -256;
      default: k = -1;   // 2*128*16 = 4096 = -K*4096 -> exact tie
    endcase
    expv = k * 4096;
    for (int i = 0; i < 16; i++) expv += 2 * x[i] * d[i];
    // cycle 0: operand X_0 loaded
    @(negedge clk);
    x_load = 1; x_in = pix_t'(x[0]); mac_en = 0; mac_first = 0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      d_in = word_t'(d[i]);
      mac_en = 1; mac_first = (i == 0);
      x_load = (i < 15); x_in = (i < 15) ? pix_t'(x[i+1]) : pix_t'($urandom);
    end
    @(negedge clk);
    mac_en = 0; x_load = 0; mac_first = 0; k_in = word_t'(k);
    d_in = word_t'($urandom);  // memory output not used now
    #1;
    check(mse == acc_t'(expv), $sformatf("mode %0d mse %0d exp %0d", mode, mse, expv));
    check(bit_o == (expv >= 0), $sformatf("mode %0d bit %0d", mode, bit_o));
    if (bit_o) ones++; else zeros++;
    repeat (2) @(negedge clk);
    #1 check(mse == acc_t'(expv), "result holds while idle");
  endtask

  initial begin
    x_load = 0; mac_en = 0; mac_first = 0; x_in = 0; d_in = 0; k_in = 0;
    for (int m = 1; m <= 3; m++) run_node(m);
    for (int n = 0; n < 60; n++) run_node(0);
    check(ones > 0 && zeros > 0, "both branch outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
