// tb_ai_player: while enabled exactly one note bit is high per cycle and the
// bits walk through pitches 0..36 in order; when disabled the output is zero
// and the walk restarts from pitch 0.
module tb_ai_player;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst, en;
  logic [36:0] notes;

  ai_player dut (.clk(clk), .rst(rst), .enable(en), .notes(notes));

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
    int exp_p, len;
    rst = 1; en = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int r = 0; r < 6; r++) begin
      en = 1; exp_p = 0;
      len = $urandom_range(40, 400);
      for (int c = 0; c < len; c++) begin
        @(negedge clk);
        check(notes == (37'(1) << exp_p), $sformatf("notes %h expected pitch %0d", notes, exp_p));
        exp_p = (exp_p + 1) % 37;
      end
      en = 0;
      repeat (2) @(negedge clk);
      check(notes == 0, "silent when disabled");
      repeat ($urandom_range(0, 20)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
