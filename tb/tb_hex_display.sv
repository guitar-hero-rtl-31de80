// tb_hex_display: with 4-cycle digit time, checks that the eight anodes are
// enabled one at a time in order, each for DIGIT_CYCLES cycles, and that the
// segments show the right hex digit of a randomly changing value.
module tb_hex_display;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int DC = 4;
  logic        rst;
  logic [31:0] value;
  logic [6:0]  seg;
  logic [7:0]  an;

  hex_display #(.DIGIT_CYCLES(DC)) dut (.clk(clk), .rst(rst), .value(value), .seg(seg), .an(an));

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

  // gfedcba, active high
  localparam logic [6:0] SEGS [16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                                      7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};

  initial begin
    int d, run, prev;
    rst = 1; value = 32'h0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    prev = -1; run = 0;
    for (int n = 0; n < 4000; n++) begin
      if (n % 100 == 0) value = $urandom;
      @(negedge clk);
      @(negedge clk);   // value held for the registered output
      d = -1;
      for (int i = 0; i < 8; i++) if (an == ~(8'b1 << i)) d = i;
      check(d >= 0, $sformatf("one anode enabled: %b", an));
      if (d >= 0) check(seg == ~SEGS[value[d*4 +: 4]], $sformatf("digit %0d seg %b", d, seg));
    end
    // rotation: count cycles per digit
    run = 0; prev = -1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      d = -1;
      for (int i = 0; i < 8; i++) if (an == ~(8'b1 << i)) d = i;
      if (d != prev) begin
        if (prev >= 0 && n > DC) begin
          check(run == DC, $sformatf("digit time %0d", run));
          check(d == (prev + 1) % 8, "digit order");
        end
        prev = d; run = 1;
      end else run++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
