// tb_note_deserializer: a transmitter model sends packets of 64 segments of
// 32 cycles (data bit i in segment i, sync in segment 63) with every wire
// transition delayed by up to 6 random cycles, as a slow cable would. The
// received vector must equal the sent one and notes_valid must pulse once
// per packet. Before the first sync fall nothing may be reported.
module tb_note_deserializer;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int SEG = 32;
  logic        rst, sd, ss, nv;
  logic [47:0] rx, sent [$];

  note_deserializer #(.SEG_CYCLES(SEG)) dut (.clk(clk), .rst(rst), .ser_data(sd), .ser_sync(ss),
    .notes(rx), .notes_valid(nv));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nvalid = 0;
  bit armed = 0;
  always @(posedge clk) begin
    #1;
    if (nv) begin
      nvalid++;
      if (!armed || sent.size() == 0) check(0, "notes_valid before any packet");
      else check(rx == sent.pop_front(), $sformatf("received %h", rx));
    end
  end

  // drive a wire level for one segment, the change landing late
  task automatic segment(input bit d, input bit s);
    int dl;
    dl = $urandom_range(0, 6);
    for (int c = 0; c < SEG; c++) begin
      @(negedge clk);
      if (c == dl) begin sd = d; ss = s; end
    end
  endtask

  initial begin
    logic [47:0] v;
    rst = 1; sd = 0; ss = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // partial packet: data only, then a sync segment
    for (int s = 40; s < 63; s++) segment(1'b1, 1'b0);
    check(nvalid == 0, "nothing before the first sync");
    segment(1'b0, 1'b1);
    armed = 1;
    for (int p = 0; p < 20; p++) begin
      v = {$urandom, $urandom};
      if (p == 0) v = '1;
      if (p == 1) v = '0;
      sent.push_back(v);
      for (int s = 0; s < 64; s++) segment((s < 48) ? v[s] : 1'b0, s == 63);
    end
    repeat (10) @(posedge clk);
    check(nvalid == 20 && sent.size() == 0, $sformatf("%0d packets received", nvalid));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
