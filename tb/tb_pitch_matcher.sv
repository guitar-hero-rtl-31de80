// tb_pitch_matcher: the testbench plays the metadata controller (answering
// requests after a random delay from a list of note times, then time_ok = 0)
// and the player (random triggers, some near note times, some far). A
// reference model of the slot rules predicts every match; the test also
// checks that each note is matched at most once, never further than WINDOW
// ticks away, and that no request is raised after the list ends.
module tb_pitch_matcher;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int WINDOW = 100;
  logic        rst, trig, req, avail, tok, match;
  logic [15:0] now, tbus, mtime;

  pitch_matcher #(.WINDOW(WINDOW)) dut (.clk(clk), .rst(rst), .song_time(now), .trigger(trig), .req(req),
    .avail(avail), .time_bus(tbus), .time_ok(tok), .match(match), .match_time(mtime));

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

  int notes [$];
  int matched [int];
  int nmatch = 0, nidx = 0;
  // model state
  int  m_past, m_fut;
  bit  m_pv, m_fv, m_done, m_match;
  int  m_mtime;

  function automatic int absd(input int a, input int b);
    return a > b ? a - b : b - a;
  endfunction

  initial begin
    int t, delay, dp, df;
    rst = 1; trig = 0; avail = 0; tok = 0; tbus = 0; now = 0;
    t = 30;
    for (int i = 0; i < 40; i++) begin t += $urandom_range(5, 300); notes.push_back(t); end
    m_pv = 0; m_fv = 0; m_done = 0; m_match = 0; delay = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int c = 0; c < 60000; c++) begin
      // inputs for this cycle
      @(negedge clk);
      check(match == m_match, $sformatf("cycle %0d match %b expected %b", c, match, m_match));
      if (match && m_match) begin
        check(mtime == 16'(m_mtime), "match time");
        check(!matched.exists(m_mtime), "note matched twice");
        check(absd(m_mtime, int'(now)) <= WINDOW + 1, "within the window");
        matched[m_mtime] = 1; nmatch++;
      end
      check(req == (!m_fv && !m_done), "request line");
      if (c % 8 == 0) now = now + 1;
      avail = 0; trig = 0;
      if (req && delay == 0) delay = $urandom_range(1, 20);
      else if (req && delay > 1) delay--;
      else if (req && delay == 1) begin
        delay = 0; avail = 1;
        tok = (nidx < notes.size());
        tbus = tok ? 16'(notes[nidx]) : 16'($urandom);
        if (tok) nidx++;
      end
      if (!avail) begin
        if ($urandom_range(0, 60) == 0) trig = 1;
        if (m_fv && absd(m_fut, now) == $urandom_range(0, 120)) trig = 1;
      end
      // model of the next edge
      dp = m_pv ? int'(16'(now - 16'(m_past))) : 'h1FFFF;
      df = m_fv ? absd(m_fut, now) : 'h1FFFF;
      m_match = 0;
      if (avail) begin
        if (tok) begin m_fut = tbus; m_fv = 1; end else m_done = 1;
      end else if (trig && df <= dp && df <= WINDOW) begin
        m_match = 1; m_mtime = m_fut; m_fv = 0;
      end else if (trig && dp < df && dp <= WINDOW) begin
        m_match = 1; m_mtime = m_past; m_pv = 0;
      end else if (m_fv && now > m_fut) begin
        m_past = m_fut; m_pv = 1; m_fv = 0;
      end
    end
    check(m_done && !req, "requests stop after the last note");
    check(nmatch >= 10, $sformatf("%0d matches", nmatch));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
