// tb_oversampler: feeds random 12-bit conversions with random gaps between
// end-of-conversion strobes and checks every oversampled output against a
// sum computed here: sample = (sum of 256 conversions) >> 4, `done` exactly
// one cycle after the 256th eoc, and one output per 256 conversions.
module tb_oversampler;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst, eoc, done;
  logic [11:0] adc;
  logic [15:0] sample;

  oversampler dut (.clk(clk), .rst(rst), .eoc(eoc), .adc_data(adc), .sample(sample), .done(done));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum, n, outputs;
    rst = 1; eoc = 0; adc = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    sum = 0; n = 0; outputs = 0;
    for (int k = 0; k < 256 * 6; k++) begin
      // random gap of 0..3 idle cycles
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk); eoc = 0;
        @(posedge clk); #1;
        check(done == 1'b0, "no done without eoc");
      end
      @(negedge clk);
      eoc = 1;
      adc = (k < 256) ? 12'hFFF : 12'($urandom);
      sum += adc; n++;
      @(posedge clk); #1;
      check(done == (n == 256), "done right after the 256th eoc only");
      if (n == 256) begin
        @(negedge clk); eoc = 0;
        check(done == 1'b1, "done after 256th eoc");
        check(sample == 16'(sum >> 4), $sformatf("sample %h expected %h", sample, 16'(sum >> 4)));
        outputs++;
        sum = 0; n = 0;
        @(posedge clk); #1;
        check(done == 1'b0, "done lasts one cycle");
      end
    end
    check(outputs == 6, "six outputs for 6 x 256 conversions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
