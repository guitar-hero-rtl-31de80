// tb_buffer_serializer: random match vectors with zero, one or several
// pitches set and random note times; one cycle later the outputs must carry
// the highest matching pitch's |song_time - note time|, its note time, and
// a valid flag and fret for exactly the strings that can play it
// (fret 0..17 in standard tuning).
module tb_buffer_serializer;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int OPEN [6] = '{24, 19, 15, 10, 5, 0};
  logic        rst, sv;
  logic [36:0] match;
  logic [15:0] mt [37];
  logic [15:0] now, diff, st;
  logic [5:0]  strv;
  logic [4:0]  fret [6];

  buffer_serializer dut (.clk(clk), .rst(rst), .match(match), .match_time(mt), .song_time(now),
    .score_valid(sv), .score_diff(diff), .str_valid(strv), .str_fret(fret), .str_time(st));

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
    int hi, nstr;
    rst = 1; match = '0; now = 0;
    foreach (mt[p]) mt[p] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      match = '0;
      case ($urandom_range(0, 3))
        0: ;
        1, 2: match[$urandom_range(0, 36)] = 1'b1;
        default: repeat (3) match[$urandom_range(0, 36)] = 1'b1;
      endcase
      if (i < 37) match = 37'(1) << i;
      now = 16'($urandom_range(0, 2000));
      foreach (mt[p]) mt[p] = 16'($urandom_range(0, 2000));
      hi = -1;
      for (int p = 0; p < 37; p++) if (match[p]) hi = p;
      @(posedge clk); #1;
      check(sv == (hi >= 0), "score_valid");
      if (hi >= 0) begin
        check(diff == ((now >= mt[hi]) ? now - mt[hi] : mt[hi] - now), "diff");
        check(st == mt[hi], "note time");
        nstr = 0;
        for (int s = 0; s < 6; s++) begin
          bit can;
          can = (hi >= OPEN[s]) && (hi - OPEN[s] <= 17);
          check(strv[s] == can, $sformatf("pitch %0d string %0d valid", hi, s));
          if (can) begin check(fret[s] == 5'(hi - OPEN[s]), "fret"); nstr++; end
        end
        check(nstr >= 1, "every pitch is playable");
      end else check(strv == 0, "no string without a match");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
