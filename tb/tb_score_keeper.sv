// tb_score_keeper: random timing errors, with the boundary values 10/11,
// 25/26, 50/51 and 100/101 forced in, and random gaps between valids; the
// score must follow 100/50/25/10/0 points per match one cycle later.
module tb_score_keeper;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst, valid;
  logic [15:0] diff, score;

  score_keeper dut (.clk(clk), .rst(rst), .valid(valid), .diff(diff), .score(score));

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

  function automatic int pts(input int d);
    return d <= 10 ? 100 : d <= 25 ? 50 : d <= 50 ? 25 : d <= 100 ? 10 : 0;
  endfunction

  initial begin
    int model;
    int edges [8] = '{10, 11, 25, 26, 50, 51, 100, 101};
    rst = 1; valid = 0; diff = 0; model = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(score == 16'(model), $sformatf("score %0d expected %0d", score, model));
      valid = ($urandom_range(0, 2) != 0);
      diff = (i < 8) ? 16'(edges[i]) : 16'($urandom_range(0, 130));
      if (i % 97 == 0) diff = 16'($urandom);
      if (valid) model += pts(diff);
    end
    @(negedge clk) valid = 0;
    @(negedge clk) check(score == 16'(model), "final score");
    @(negedge clk) rst = 1;
    @(negedge clk) check(score == 0, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
