// tb_layer_mixer: random backgrounds and sprite layers with random alpha
// bits; the output one cycle later must be the first opaque layer counting
// from string 1, else the background, inverted when paused and black when
// blanked.
module tb_layer_mixer;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [11:0] bg, pixel;
  logic [12:0] layers [6];
  logic        paused, blank;

  layer_mixer dut (.clk(clk), .bg(bg), .layers(layers), .paused(paused), .blank(blank), .pixel(pixel));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] e;
    bg = 0; paused = 0; blank = 0;
    foreach (layers[i]) layers[i] = '0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      bg = 12'($urandom);
      foreach (layers[i]) layers[i] = {($urandom_range(0, 5) == 0), 12'($urandom)};
      paused = ($urandom_range(0, 3) == 0);
      blank = ($urandom_range(0, 7) == 0);
      e = bg;
      for (int i = 5; i >= 0; i--) if (layers[i][12]) e = layers[i][11:0];
      if (paused) e = ~e;
      if (blank) e = 0;
      @(posedge clk); #1;
      check(pixel == e, $sformatf("pixel %h expected %h", pixel, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
