// tb_vq_ctrl: drives the stage controller with random in_valid and checks
// every output, every cycle, against the 18-cycle node schedule: read word t
// at t = 0..15, MAC at t = 1..16 (first at 1), read K at t = 16, result at
// t = 17, in_ready when idle or at t = 17. Also checks that back-to-back
// vectors are taken one per 18 cycles and that a synchronous reset idles it.
module tb_vq_ctrl;
  import vq_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, in_valid;
  logic in_ready, load, mem_rd_en, x_load, mac_en, mac_first, k_rd_en, out_valid, busy;
  logic [WSEL_W-1:0] word;

  vq_ctrl dut (.*);

  // expected state: t = cycles since the vector was taken, -1 when idle
  int t = -1;
  int taken = 0, finished = 0, b2b = 0, last_take = -100, cyc = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0d %s", t, what); end
  endtask

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; in_valid = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (cyc = 0; cyc < 600; cyc++) begin
      // drive at negedge, check outputs before the edge
      @(negedge clk);
      if (cyc > 500) in_valid = 1'b0;
      else if (cyc < 200) in_valid = 1'b1;          // continuous stream
      else in_valid = ($urandom_range(0, 3) == 0);  // sparse stream
      #1;
      begin
        bit rdy;
        rdy = (t < 0) || (t == 17);
        check(in_ready == rdy, "in_ready");
        check(load == (in_valid && rdy), "load");
        check(busy == (t >= 0), "busy");
        check(mem_rd_en == (t >= 0 && t <= 15), "mem_rd_en");
        check(x_load == (t >= 0 && t <= 15), "x_load");
        if (t >= 0 && t <= 15) check(word == WSEL_W'(t), "word");
        check(mac_en == (t >= 1 && t <= 16), "mac_en");
        check(mac_first == (t == 1), "mac_first");
        check(k_rd_en == (t == 16), "k_rd_en");
        check(out_valid == (t == 17), "out_valid");
        if (t == 17) finished++;
        if (in_valid && rdy) begin
          if (cyc - last_take == 18) b2b++;
          last_take = cyc;
          taken++;
          t = 0;
        end else if (t == 17) t = -1;
        else if (t >= 0) t++;
      end
    end
    check(taken > 20 && finished >= taken - 1, $sformatf("taken %0d finished %0d", taken, finished));
    check(b2b >= 10, $sformatf("back-to-back at 18-cycle spacing: %0d", b2b));
    // reset in mid-node
    @(negedge clk); in_valid = 1;
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    rst_n = 0;
    @(negedge clk); rst_n = 1; #1;
    check(!busy && in_ready && !out_valid, "reset to idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
