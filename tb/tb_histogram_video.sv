// tb_histogram_video: connects the histogram module to a small spectrum
// model and scans several screen positions: white exactly where
// vcount < magnitude >> 7 for the column's bin, black beyond column 1023,
// output two cycles after the coordinates.
module tb_histogram_video;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [10:0] hcount;
  logic [9:0]  vcount, raddr;
  logic [15:0] rdata;
  logic [11:0] pixel;
  logic [15:0] spec [1024];

  histogram_video dut (.clk(clk), .hcount(hcount), .vcount(vcount), .raddr(raddr), .rdata(rdata), .pixel(pixel));
  always_ff @(posedge clk) rdata <= spec[raddr];

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

  int hq [$], vq [$];
  initial begin
    for (int i = 0; i < 1024; i++) spec[i] = 16'($urandom_range(0, 65535));
    spec[5] = 16'd128;  // height 1
    hcount = 0; vcount = 0;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      hcount = 11'($urandom_range(0, 1343));
      if (n < 20) hcount = 5;
      vcount = 10'($urandom_range(0, 767));
      if (n % 3 == 0) vcount = 10'(spec[hcount[9:0]] >> 7) - 10'($urandom_range(0, 1));
      hq.push_back(hcount); vq.push_back(vcount);
      if (hq.size() > 2) begin
        int h, v;
        bit white;
        h = hq.pop_front(); v = vq.pop_front();
        white = (h < 1024) && (v < (spec[h] >> 7));
        check(pixel == (white ? 12'hFFF : 12'h000), $sformatf("h=%0d v=%0d pixel=%h", h, v, pixel));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
