// tb_process_correlation: feeds random correlation streams (quiet periods,
// loud periods and values near the thresholds) through a FIFO-like source
// with random gaps and checks the moving average bit-exactly against a model
// of filtered' = filtered + (latest - filtered)/32, the hysteresis decision,
// the update pulse, the four calibration moves and the bar-chart pixels.
module tb_process_correlation;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NOTE = 3;
  logic        rst, empty, rd, sel, upper, inc, dec, active, updated;
  logic [15:0] data, filtered, th_on, th_off;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic [11:0] pixel;

  process_correlation #(.NOTE(NOTE)) dut (.clk(clk), .rst(rst), .fifo_empty(empty), .fifo_data(data),
    .fifo_rd(rd), .cal_sel(sel), .cal_upper(upper), .cal_inc(inc), .cal_dec(dec), .hcount(hcount),
    .vcount(vcount), .active(active), .updated(updated), .filtered(filtered), .th_on(th_on),
    .th_off(th_off), .pixel(pixel));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int macc = 0, mon = 192, moff = 128, n_on = 0, n_off = 0;
  bit mact = 0;

  task automatic push(input int v);
    @(negedge clk) begin empty = 0; data = 16'(v); end
    #1 check(rd, "pops when not empty");
    @(negedge clk) empty = 1;
    macc = macc - (macc >> 5) + v;
    if ((macc >> 5) > mon) begin if (!mact) n_on++; mact = 1; end
    else if ((macc >> 5) < moff) begin if (mact) n_off++; mact = 0; end
    check(updated, "updated pulse");
    check(filtered == 16'(macc >> 5), $sformatf("filtered %0d expected %0d", filtered, macc >> 5));
    check(active == mact, "hysteresis");
  endtask

  task automatic cal(input bit up, input bit incr);
    @(negedge clk) begin sel = 1; upper = up; inc = incr; dec = !incr; end
    @(negedge clk) begin sel = 0; inc = 0; dec = 0; end
    if (up) mon += incr ? 4 : -4; else moff += incr ? 4 : -4;
    check(th_on == 16'(mon) && th_off == 16'(moff), "calibration");
  endtask

  initial begin
    rst = 1; empty = 1; data = 0; sel = 0; upper = 0; inc = 0; dec = 0; hcount = 0; vcount = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    check(th_on == 192 && th_off == 128 && !active, "reset values");
    for (int seg = 0; seg < 12; seg++) begin
      int lvl;
      lvl = (seg % 2 == 1) ? $urandom_range(250, 600) : $urandom_range(0, 100);
      if (seg == 4) lvl = 160;                      // between the thresholds
      for (int i = 0; i < 150; i++) begin
        push(lvl + $urandom_range(0, 40) - 20 < 0 ? 0 : lvl + $urandom_range(0, 40) - 20);
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
    end
    check(n_on >= 4 && n_off >= 4, $sformatf("turned on %0d / off %0d times", n_on, n_off));
    cal(1, 1); cal(1, 0); cal(1, 0); cal(0, 1); cal(0, 0); cal(0, 1);
    @(negedge clk) begin sel = 0; upper = 1; inc = 1; end   // not selected: no change
    @(negedge clk) inc = 0;
    check(th_on == 16'(mon), "calibration needs cal_sel");
    // pixels of this note's row and elsewhere
    for (int n = 0; n < 3000; n++) begin
      int h, v;
      logic [11:0] e;
      h = $urandom_range(0, 1343);
      v = (n % 2) ? NOTE * 16 + $urandom_range(0, 15) : $urandom_range(0, 767);
      if (n % 7 == 0) h = mon; else if (n % 7 == 1) h = moff;
      @(negedge clk) begin hcount = 11'(h); vcount = 10'(v); end
      @(negedge clk);
      if (v / 16 != NOTE || v % 16 == 15 || h >= 1024) e = 12'h000;
      else if (h == mon) e = 12'hF00;
      else if (h == moff) e = 12'h00F;
      else if (h < filtered) e = active ? 12'h0F0 : 12'h080;
      else e = 12'h000;
      check(pixel == e, $sformatf("pixel at %0d,%0d = %h", h, v, pixel));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
