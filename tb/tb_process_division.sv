// tb_process_division: presents random sets of 48 dot products (sized so
// that correlations fall on both sides of 1.0 and some saturate) and checks
// every correlation against min((dot << 8) / ref_energy(k), 65535), that
// corr_valid pulses once per set, and that it comes 48 + 46 + 1 cycles after
// dot_valid.
module tb_process_division;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst, dv, cv;
  logic [41:0] dot [48];
  logic [15:0] corr [48];

  process_division dut (.clk(clk), .rst(rst), .dot_product(dot), .dot_valid(dv), .corr(corr), .corr_valid(cv));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e, x;
    int t0, ncv;
    rst = 1; dv = 0;
    foreach (dot[k]) dot[k] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int r = 0; r < 6; r++) begin
      logic [41:0] saved [48];
      @(negedge clk);
      foreach (dot[k]) begin
        e = longint'(gh_pkg::ref_energy(k));
        dot[k] = 42'((e * $urandom_range(0, 600)) / 256);
        if (k == r) dot[k] = 42'(e * 300);     // saturates
        saved[k] = dot[k];
      end
      dv = 1;
      t0 = 0; ncv = 0;
      @(negedge clk) dv = 0;
      foreach (dot[k]) dot[k] = 42'($urandom);  // must have been latched
      while (!cv && t0 < 200) begin @(negedge clk); t0++; end
      check(t0 + 1 == 48 + 46 + 1, $sformatf("corr_valid after %0d cycles", t0 + 1));
      foreach (corr[k]) begin
        x = (longint'(saved[k]) << 8) / longint'(gh_pkg::ref_energy(k));
        if (x > 65535) x = 65535;
        check(corr[k] == 16'(x), $sformatf("corr[%0d] = %0d expected %0d", k, corr[k], x));
      end
      repeat (5) begin @(negedge clk); if (cv) ncv++; end
      check(ncv == 0, "corr_valid is a single pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
