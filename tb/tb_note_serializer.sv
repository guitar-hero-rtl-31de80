// tb_note_serializer: with short 16-cycle segments, changes the note vector
// at random times and checks each packet bit by bit: 64 segments of exactly
// SEG_CYCLES cycles, data bit i in segment i from the vector latched at the
// packet start, zeros in the unused segments, sync high only in the last
// segment, and packet_start once every 64 * 16 cycles.
module tb_note_serializer;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int SEG = 16;
  logic        rst, sd, ss, ps;
  logic [47:0] notes, latched;

  note_serializer #(.SEG_CYCLES(SEG)) dut (.clk(clk), .rst(rst), .notes(notes), .ser_data(sd),
    .ser_sync(ss), .packet_start(ps));

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

  always @(negedge clk) if ($urandom_range(0, 99) == 0) notes = {$urandom, $urandom};

  initial begin
    rst = 1; notes = 48'h0123_4567_89AB;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // ps and segment 0 data come out on the same edge; the vector latched is
    // the one present at that edge
    @(posedge clk); #1;
    while (!ps) begin @(posedge clk); #1; end
    for (int p = 0; p < 8; p++) begin
      latched = notes;
      for (int s = 0; s < 64; s++)
        for (int c = 0; c < SEG; c++) begin
          check(sd == ((s < 48) ? latched[s] : 1'b0), $sformatf("packet %0d seg %0d data", p, s));
          check(ss == (s == 63), $sformatf("packet %0d seg %0d sync", p, s));
          check(ps == (s == 0 && c == 0), "packet_start once per packet");
          @(posedge clk); #1;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
