// tb_background_rle: loads a random palette and a random run table covering
// a whole 1024x768 screen (runs of 1..4 pixels, mostly 4 so that the image
// fits the 262,144-word table; short runs follow each other too), scans two full frames with VGA-like counters, and checks
// every pixel two cycles after its coordinates against the decoded image;
// blanked pixels must be black. The second frame checks the rewind.
module tb_background_rle;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [10:0] h;
  logic [9:0]  v;
  logic        rwe, pwe;
  logic [17:0] rwa;
  logic [7:0]  rwd;
  logic [5:0]  pwa;
  logic [11:0] pwd, pixel;

  background_rle dut (.clk(clk), .hcount(h), .vcount(v), .run_we(rwe), .run_waddr(rwa), .run_wdata(rwd),
    .pal_we(pwe), .pal_waddr(pwa), .pal_wdata(pwd), .pixel(pixel));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [11:0] pal [64];
  logic [7:0]  runs [$];
  logic [5:0]  img [1024*768];

  initial begin
    int n, len, errs, w, k, hq [$], vq [$], hh, vv;
    h = 1100; v = 0; rwe = 0; pwe = 0; rwa = 0; rwd = 0; pwa = 0; pwd = 0;
    foreach (pal[i]) pal[i] = 12'($urandom);
    n = 0;
    while (n < 1024 * 768) begin
      len = ($urandom_range(0, 3) == 0) ? $urandom_range(1, 3) : 4;
      if (n + len > 1024 * 768) len = 1024 * 768 - n;
      runs.push_back({2'(len - 1), 6'($urandom)});
      for (int i = 0; i < len; i++) img[n + i] = runs[$][5:0];
      n += len;
    end
    check(runs.size() <= 262144, $sformatf("%0d runs fit in the table", runs.size()));
    for (int i = 0; i < 64; i++) begin
      @(negedge clk) begin pwe = 1; pwa = 6'(i); pwd = pal[i]; end
    end
    foreach (runs[i]) begin
      @(negedge clk) begin pwe = 0; rwe = 1; rwa = 18'(i); rwd = runs[i]; end
    end
    @(negedge clk) rwe = 0;
    // start in vertical blanking, then two frames
    h = 0; v = 780;
    errs = 0; k = 0;
    for (int c = 0; c < 1344 * (806 - 780) + 2 * 1344 * 806; c++) begin
      @(negedge clk);
      if (hq.size() == 2) begin
        hh = hq.pop_front(); vv = vq.pop_front();
        w = (hh < 1024 && vv < 768) ? int'(pal[img[vv * 1024 + hh]]) : 0;
        if (pixel != 12'(w)) begin
          errs++;
          if (errs < 5) $display("FAIL: pixel %0d,%0d = %h expected %h", hh, vv, pixel, w);
        end
        k++;
      end
      if (h == 1343) begin h = 0; v = (v == 805) ? 0 : v + 1; end else h = h + 1;
      hq.push_back(h); vq.push_back(v);
    end
    check(errs == 0, $sformatf("%0d wrong pixels of %0d", errs, k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
