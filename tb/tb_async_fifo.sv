// tb_async_fifo: writes on a 10 ns clock and reads on a 7 ns clock (and then
// the reverse ratio) with random enables, checking every word comes out in
// order with nothing lost or duplicated, that full is reached when the
// reader stops and holds exactly 16 words, and that empty ends the drain.
module tb_async_fifo;
  logic wclk = 0, rclk = 0;
  int   wper = 5, rper = 3;
  always #(wper) wclk = ~wclk;
  always #(rper) rclk = ~rclk;
  int checks = 0, failures = 0;

  logic        rst, wr, rd, full, empty;
  logic [15:0] wd, rdat;

  async_fifo #(.W(16), .DEPTH(16)) dut (.wclk(wclk), .wrst(rst), .wr_en(wr), .wdata(wd), .full(full),
    .rclk(rclk), .rrst(rst), .rd_en(rd), .rdata(rdat), .empty(empty));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] q [$];
  bit rd_on = 1, wr_on = 1;
  int nwritten = 0, nread = 0;

  always @(negedge wclk) begin
    wr = 0;
    if (!rst && wr_on && !full && $urandom_range(0, 2) != 0) begin
      wr = 1; wd = 16'($urandom); q.push_back(wd); nwritten++;
    end
  end
  always @(negedge rclk) begin
    rd = 0;
    if (!rst && rd_on && !empty && $urandom_range(0, 2) != 0) begin
      rd = 1;
      if (q.size() == 0) check(0, "read with nothing written");
      else check(rdat == q.pop_front(), "word order");
      nread++;
    end
  end

  initial begin
    rst = 1; wr = 0; rd = 0; wd = 0;
    #100 rst = 0;
    for (int pass = 0; pass < 2; pass++) begin
      #20000;
      rd_on = 0;
      #2000;
      check(full, "full when the reader stops");
      check(q.size() == 16, $sformatf("holds %0d words", q.size()));
      wr_on = 0; rd_on = 1;
      #3000;
      check(empty && q.size() == 0, "drained");
      wr_on = 1;
      wper = 3; rper = 5;
    end
    check(nread > 1000, $sformatf("%0d words moved", nread));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
