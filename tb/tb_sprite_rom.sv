// tb_sprite_rom: reads every address and checks all 18 sprite slices one
// cycle later against gh_pkg::sprite_pixel, plus a few hand facts: corners
// transparent, centre opaque, digit pixels white.
module tb_sprite_rom;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [9:0]   addr;
  logic [233:0] data;

  sprite_rom dut (.clk(clk), .addr(addr), .data(data));

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
    int white;
    addr = 0;
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk) addr = 10'(a);
      @(negedge clk);
      for (int f = 0; f < 18; f++)
        check(data[f*13 +: 13] == gh_pkg::sprite_pixel(f, a % 32, a / 32), $sformatf("sprite %0d addr %0d", f, a));
      if (a == 0 || a == 31 || a == 1023) check(data == '0, "corners transparent");
      if (a == 16 * 32 + 2) for (int f = 0; f < 18; f++) check(data[f*13 + 12], "disc opaque");
    end
    for (int f = 0; f < 18; f++) begin
      white = 0;
      for (int a = 0; a < 1024; a++) if (gh_pkg::sprite_pixel(f, a % 32, a / 32) == 13'h1FFF) white++;
      check(white > 20, $sformatf("sprite %0d has a digit (%0d white pixels)", f, white));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
