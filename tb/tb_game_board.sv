// tb_game_board: the game board alone at shortened times (16-cycle link
// segments, 1000-cycle song ticks, 16-cycle display digits, 4096-word
// background table). A transmitter model in the testbench sends the
// active-note vector over ser_data / ser_sync. Sequence: check the link with
// random vectors while the game is held in reset; play the first two notes
// of the song through the link exactly on time (100 points each); switch to
// the AI player; pause and resume once; play to the end of the song.
// Counted mechanisms: link vectors received, on-time score, AI scoring of
// every remaining note, pause freezing time and score, the state OVER at
// 1700, sprites matched on strings 1 and 2, background, sprite and inverted
// pixels, and the seven-segment scan.
module tb_game_board;
  import gh_pkg::*;
  logic clk_65 = 0, clk_100 = 0;
  always #7.7 clk_65  = ~clk_65;
  always #5.0 clk_100 = ~clk_100;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int SEG = 16, TICK = 1000;
  logic        rst, ser_d, ser_s, btn_reset, btn_pause, sw_ai;
  logic        run_we, pal_we;
  logic [11:0] run_wa;
  logic [7:0]  run_wd;
  logic [5:0]  pal_wa;
  logic [11:0] pal_wd, g_rgb;
  logic        g_hs, g_vs;
  logic [6:0]  seg;
  logic [7:0]  an;
  logic [47:0] rx, tx;
  logic [15:0] score, stime;
  game_state_t gstate;
  logic [5:0]  smatched;

  game_board #(.SEG_CYCLES(SEG), .TICK_CYCLES(TICK), .DIGIT_CYCLES(16), .RUN_DEPTH(4096)) dut (
    .clk_100(clk_100), .clk_65(clk_65), .rst(rst), .ser_data(ser_d), .ser_sync(ser_s),
    .btn_reset(btn_reset), .btn_pause(btn_pause), .sw_ai(sw_ai),
    .run_we(run_we), .run_waddr(run_wa), .run_wdata(run_wd), .pal_we(pal_we), .pal_waddr(pal_wa), .pal_wdata(pal_wd),
    .vga_rgb(g_rgb), .vga_hsync(g_hs), .vga_vsync(g_vs), .seg(seg), .an(an),
    .rx_notes(rx), .score(score), .song_time(stime), .state(gstate), .sprites_matched(smatched));

  initial begin
    #100ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transmitter model: 64 segments, bit i in segment i, sync in segment 63
  int tx_seg = 0, tx_cyc = 0, n_sent = 0;
  logic [47:0] tx_lat;
  always @(negedge clk_100) begin
    if (tx_seg == 0 && tx_cyc == 0) tx_lat = tx;
    ser_d = (tx_seg < 48) ? tx_lat[tx_seg] : 1'b0;
    ser_s = (tx_seg == 63);
    if (tx_cyc == SEG - 1) begin
      tx_cyc = 0;
      if (tx_seg == 63) begin tx_seg = 0; n_sent++; end else tx_seg++;
    end else tx_cyc++;
  end

  int n_sprite_px = 0, n_inv_px = 0, n_bg_px = 0, n_an_change = 0, n_seg_bad = 0, n_ghs = 0;
  bit scan_on = 0;
  logic [7:0] an_d;
  logic g_hs_d;
  always @(posedge clk_65) begin
    g_hs_d <= g_hs;
    if (g_hs && !g_hs_d) n_ghs++;
    if (gstate != ST_PAUSED) begin
      if (g_rgb == 12'hF80 || g_rgb == 12'h07F) n_sprite_px++;
      else if (g_rgb != 0 && g_rgb[11] == 1'b0) n_bg_px++;
    end else if (g_rgb[11] && g_rgb != 12'hF80 && g_rgb != 12'hFFF) n_inv_px++;
  end
  always @(posedge clk_100) begin
    an_d <= an;
    if (an != an_d) n_an_change++;
    if ($countones(~an) != 1 && scan_on) n_seg_bad++;
  end

  initial begin
    run_we = 0; pal_we = 0; run_wa = 0; run_wd = 0; pal_wa = 0; pal_wd = 0;
    @(negedge rst);
    for (int i = 0; i < 64; i++) @(negedge clk_65) begin pal_we = 1; pal_wa = 6'(i); pal_wd = 12'($urandom_range(1, 2047)); end
    for (int i = 0; i < 4096; i++) @(negedge clk_65) begin pal_we = 0; run_we = 1; run_wa = 12'(i); run_wd = 8'($urandom); end
    @(negedge clk_65) run_we = 0;
  end

  task automatic send(input logic [47:0] v);
    int n0;
    tx = v;
    n0 = n_sent;
    while (n_sent < n0 + 2) @(negedge clk_100);   // one full packet with v
    repeat (SEG) @(negedge clk_100);
  endtask

  initial begin
    int t_pause, s_pause, n_ok;
    meta_t m0, m1;
    rst = 1; btn_reset = 1; btn_pause = 0; sw_ai = 0; tx = 0;
    repeat (20) @(negedge clk_100);
    rst = 0;
    repeat (200) @(negedge clk_100);
    scan_on = 1;
    n_ok = 0;
    for (int i = 0; i < 6; i++) begin
      logic [47:0] v;
      v = {$urandom, $urandom};
      send(v);
      if (rx == v) n_ok++;
    end
    check(n_ok == 6, $sformatf("%0d of 6 link vectors received", n_ok));
    send('0);
    check(score == 0, "nothing scores while the game is held");
    // first two notes through the link, on time
    m0 = song_note(0); m1 = song_note(1);
    @(negedge clk_100) btn_reset = 0;
    while (stime < m0.t - 2) @(negedge clk_100);
    tx = 48'(1) << m0.pitch;
    while (stime < m1.t - 2) @(negedge clk_100);
    tx = 48'(1) << m1.pitch;
    while (stime < m1.t + 20) @(negedge clk_100);
    tx = '0;
    check(score == 200, $sformatf("two notes on time: score %0d", score));
    sw_ai = 1;
    while (stime < 1000) @(negedge clk_100);
    @(negedge clk_100) btn_pause = 1;
    repeat (5) @(negedge clk_100);
    btn_pause = 0;
    check(gstate == ST_PAUSED, "paused");
    t_pause = stime; s_pause = score;
    repeat (50000) @(negedge clk_100);
    check(stime == t_pause && score == s_pause && gstate == ST_PAUSED, "time and score frozen while paused");
    @(negedge clk_100) btn_pause = 1;
    repeat (5) @(negedge clk_100);
    btn_pause = 0;
    check(gstate == ST_PLAYING, "resumed");
    while (gstate != ST_OVER) @(negedge clk_100);
    check(stime == 1700, $sformatf("song over at %0d", stime));
    check(score >= 200 + 10 * (SONG_LEN - 2), $sformatf("final score %0d", score));
    check(smatched[1:0] == 2'b11 && smatched[5:2] == 0, $sformatf("sprites matched on strings %b", smatched));
    check(n_ghs > 100, "video timing runs");
    check(n_bg_px > 1000, $sformatf("%0d background pixels", n_bg_px));
    check(n_sprite_px > 100, $sformatf("%0d sprite pixels", n_sprite_px));
    check(n_inv_px > 1000, $sformatf("%0d inverted pixels while paused", n_inv_px));
    check(n_an_change > 100 && n_seg_bad == 0, "seven-segment scan");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
