// tb_xvga: runs two full frames at the default 1024x768 timing and checks
// every cycle: hcount wraps at 1344 and vcount at 806, hsync is low exactly
// for hcount 1048..1183, vsync exactly for lines 771..776, blank outside the
// visible area, and a frame is 1344 * 806 cycles.
module tb_xvga;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst, hs, vs, bl;
  logic [10:0] h;
  logic [9:0]  v;

  xvga dut (.clk(clk), .rst(rst), .hcount(h), .vcount(v), .hsync(hs), .vsync(vs), .blank(bl));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int eh, ev, frames, errs;
    rst = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    while (!(h == 0 && v == 0)) @(negedge clk);
    eh = 0; ev = 0; frames = 0; errs = 0;
    for (int n = 0; n < 2 * 1344 * 806; n++) begin
      if (h != 11'(eh) || v != 10'(ev)) errs++;
      if (hs != !(eh >= 1048 && eh < 1184)) errs++;
      if (vs != !(ev >= 771 && ev < 777)) errs++;
      if (bl != !(eh < 1024 && ev < 768)) errs++;
      eh++;
      if (eh == 1344) begin eh = 0; ev++; if (ev == 806) begin ev = 0; frames++; end end
      @(negedge clk);
    end
    check(errs == 0, $sformatf("%0d timing errors", errs));
    check(frames == 2 && h == 0 && v == 0, "frame length 1344 x 806");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
