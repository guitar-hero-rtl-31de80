// tb_scoring_unit: plays the whole song into the scoring unit with each note
// struck up to 8 ticks early or late (held for a random number of cycles),
// plus stray notes of pitches that never occur. Every real note must score
// 100 points (final score 2600), produce one score event and a string event
// on its own string with its fret and time, and stray notes must score
// nothing. Song time advances one tick every 8 cycles.
module tb_scoring_unit;
  import gh_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst, sev;
  logic [36:0] notes;
  logic [15:0] now, score, stime;
  logic [5:0]  strv;
  logic [4:0]  fret [6];

  scoring_unit dut (.clk(clk), .rst(rst), .notes(notes), .song_time(now), .score(score), .score_event(sev),
    .str_valid(strv), .str_fret(fret), .str_time(stime));

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

  int strike [SONG_LEN], hold [SONG_LEN];
  int nev = 0, nstr_ok = 0;
  meta_t m;

  always @(posedge clk) begin
    #1;
    if (sev) nev++;
    for (int i = 0; i < SONG_LEN; i++) begin
      m = song_note(i);
      if (strv[m.str] && stime == m.t && fret[m.str] == m.fret) nstr_ok++;
    end
  end

  initial begin
    rst = 1; notes = '0; now = 0;
    for (int i = 0; i < SONG_LEN; i++) begin
      m = song_note(i);
      strike[i] = int'(m.t) + $urandom_range(0, 16) - 8;
      hold[i] = $urandom_range(1, 30);
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < 1700; t++) begin
      for (int c = 0; c < 8; c++) begin
        @(negedge clk);
        now = 16'(t);
        notes = '0;
        for (int i = 0; i < SONG_LEN; i++)
          if (t == strike[i] && c < hold[i]) notes[song_note(i).pitch] = 1'b1;
        if (t % 97 == 0 && c < 3) notes[3] = 1'b1;    // pitch 3 is not in the song
      end
    end
    @(negedge clk);
    check(score == 16'(100 * SONG_LEN), $sformatf("score %0d", score));
    check(nev == SONG_LEN, $sformatf("%0d score events", nev));
    check(nstr_ok == SONG_LEN, $sformatf("%0d string events", nstr_ok));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
