// tb_guitar_hero_top: end-to-end test of both boards, with behavioural
// models of the FFT core (xfft_model) and the SD card controller
// (sd_controller_model), at shortened times: 4x oversampling instead of
// 256x, 16-cycle link segments, 500-cycle song ticks, 16-cycle display digit
// time and a 4096-word background table. The FFT frame stays 4096 points,
// so the spectra and correlations are the real ones.
//
// The ADC model plays an E4 (pitch 24): harmonics 1..4 centred on the
// reference bins with amplitudes 16000/8000/5000/3000 (16-bit scale).
// Sequence:
//   A. game held in reset; tone on; wait until pitch 24 arrives on the game
//      board over the serial link (latency L); only pitch 24 may be active.
//      Save the spectrum to slot 5; move the upper threshold of note 24 up
//      and down; tone off until the note is released; one forced
//      last_missing to make the feeder and the FFT realign.
//   B. release the game reset; turn the tone on L before the first note
//      (tick 200) so that the audio note is detected within the matching
//      window of that note and scores (the detection time varies with the
//      state of the moving average, so any grade is accepted).
//   C. switch on the AI player, pause and resume once, play to the end.
// Every mechanism below is counted; one that never happens is a failure.
module tb_guitar_hero_top;
  import gh_pkg::*;
  logic clk_104 = 0, clk_65 = 0, clk_25 = 0, clk_100 = 0;
  always #4.8  clk_104 = ~clk_104;
  always #7.7  clk_65  = ~clk_65;
  always #20.0 clk_25  = ~clk_25;
  always #5.0  clk_100 = ~clk_100;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int TICK = 500;
  logic        rst, eoc;
  logic [11:0] adc;
  logic [15:0] fs_d;
  logic        fs_v, fs_l, fs_r, lm_model, lm_tb;
  logic [31:0] fm_d;
  logic [11:0] fm_u;
  logic        fm_v, fm_l;
  logic        btn_save, sd_reset, sd_wr, rfnb, sd_ready;
  logic [5:0]  slot, cal_note;
  logic [31:0] sd_addr;
  logic [7:0]  sd_din;
  logic        cal_upper, cal_inc, cal_dec, sw_view;
  logic [11:0] a_rgb, g_rgb;
  logic        a_hs, a_vs, g_hs, g_vs, corr_upd, ser_d, ser_s;
  logic [47:0] a_notes, g_notes;
  logic [15:0] th_on, th_off, score, stime;
  logic        btn_reset, btn_pause, sw_ai;
  logic        run_we, pal_we;
  logic [11:0] run_wa;
  logic [7:0]  run_wd;
  logic [5:0]  pal_wa;
  logic [11:0] pal_wd;
  logic [6:0]  seg;
  logic [7:0]  an;
  game_state_t gstate;
  logic [5:0]  smatched;
  int          fr_in, fr_out, realigns, sectors, bad_starts;

  guitar_hero_top #(.OVERSAMPLE(4), .SEG_CYCLES(16), .TICK_CYCLES(TICK), .DIGIT_CYCLES(16), .RUN_DEPTH(4096)) dut (
    .clk_104(clk_104), .clk_65(clk_65), .clk_25(clk_25), .clk_100(clk_100), .rst(rst),
    .xadc_eoc(eoc), .xadc_data(adc),
    .fft_s_tdata(fs_d), .fft_s_tvalid(fs_v), .fft_s_tlast(fs_l), .fft_s_tready(fs_r),
    .fft_last_missing(lm_model | lm_tb),
    .fft_m_tdata(fm_d), .fft_m_tuser(fm_u), .fft_m_tvalid(fm_v), .fft_m_tlast(fm_l),
    .btn_save(btn_save), .sw_slot(slot), .sd_reset(sd_reset), .sd_addr(sd_addr), .sd_wr(sd_wr),
    .sd_din(sd_din), .sd_ready_for_next_byte(rfnb), .sd_ready(sd_ready),
    .cal_note(cal_note), .cal_upper(cal_upper), .cal_inc(cal_inc), .cal_dec(cal_dec), .sw_view(sw_view),
    .audio_vga_rgb(a_rgb), .audio_vga_hsync(a_hs), .audio_vga_vsync(a_vs),
    .audio_active_notes(a_notes), .audio_th_on(th_on), .audio_th_off(th_off), .audio_corr_update(corr_upd),
    .ser_data(ser_d), .ser_sync(ser_s),
    .btn_reset(btn_reset), .btn_pause(btn_pause), .sw_ai(sw_ai),
    .run_we(run_we), .run_waddr(run_wa), .run_wdata(run_wd), .pal_we(pal_we), .pal_waddr(pal_wa), .pal_wdata(pal_wd),
    .game_vga_rgb(g_rgb), .game_vga_hsync(g_hs), .game_vga_vsync(g_vs), .seg(seg), .an(an),
    .game_rx_notes(g_notes), .score(score), .song_time(stime), .game_state(gstate), .sprites_matched(smatched));

  xfft_model u_fft (.clk(clk_104), .rst(rst), .s_tdata(fs_d), .s_tvalid(fs_v), .s_tlast(fs_l), .s_tready(fs_r),
    .last_missing(lm_model), .m_tdata(fm_d), .m_tuser(fm_u), .m_tvalid(fm_v), .m_tlast(fm_l),
    .frames_in(fr_in), .frames_out(fr_out), .realigns(realigns));

  sd_controller_model u_sd (.clk(clk_25), .rst(sd_reset), .addr(sd_addr), .wr(sd_wr), .din(sd_din),
    .ready_for_next_byte(rfnb), .ready(sd_ready), .sectors(sectors), .bad_starts(bad_starts));

  initial begin
    #60ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ ADC model
  bit   tone_on = 0;
  int   n_conv = 0;
  real  amp [4] = '{16000.0, 8000.0, 5000.0, 3000.0};
  int   hbin [4];
  initial for (int h = 1; h <= 4; h++) hbin[h-1] = (note_bin_x16(24) * h + 8) / 16;

  always @(negedge clk_104) begin
    real x;
    int  s, i;
    eoc = !rst;
    i = n_conv / 4;                     // oversampled sample index
    x = 0.0;
    if (tone_on)
      for (int h = 0; h < 4; h++) x += amp[h] * $cos(2.0 * 3.14159265358979 * hbin[h] * i / 4096.0 + h);
    s = $rtoi(x) / 16 + 2048;
    if (s > 4095) s = 4095;
    if (s < 0) s = 0;
    adc = 12'(s);
    if (!rst) n_conv++;
  end

  // ----------------------------------------------------- mechanism counters
  int n_corr_upd = 0, n_sprite_px = 0, n_inv_px = 0, n_bg_px = 0, n_hist_px = 0, n_bar_px = 0;
  int n_mark_px = 0, n_an_change = 0, n_seg_bad = 0, n_ghs = 0, n_ahs = 0;
  logic [7:0] an_d;
  logic g_hs_d, a_hs_d;
  bit   scan_on = 0;

  always @(posedge clk_104) if (corr_upd) n_corr_upd++;
  always @(posedge clk_65) begin
    g_hs_d <= g_hs; a_hs_d <= a_hs;
    if (g_hs && !g_hs_d) n_ghs++;
    if (a_hs && !a_hs_d) n_ahs++;
    if (gstate != ST_PAUSED) begin
      if (g_rgb == 12'hF80 || g_rgb == 12'h07F) n_sprite_px++;
      else if (g_rgb != 0 && g_rgb[11] == 1'b0) n_bg_px++;
    end else if (g_rgb[11] && g_rgb != 12'hF80 && g_rgb != 12'hFFF) n_inv_px++;
    if (sw_view && a_rgb == 12'hFFF) n_hist_px++;
    if (!sw_view && (a_rgb == 12'h0F0 || a_rgb == 12'h080)) n_bar_px++;
    if (!sw_view && a_rgb == 12'hF00) n_mark_px++;
  end
  always @(posedge clk_100) begin
    an_d <= an;
    if (an != an_d) n_an_change++;
    if ($countones(~an) != 1 && scan_on) n_seg_bad++;
  end

  // ------------------------------------------------------- clk_65 loading
  initial begin
    run_we = 0; pal_we = 0; run_wa = 0; run_wd = 0; pal_wa = 0; pal_wd = 0;
    cal_note = 24; cal_upper = 1; cal_inc = 0; cal_dec = 0; sw_view = 1;
    @(negedge rst);
    for (int i = 0; i < 64; i++) @(negedge clk_65) begin pal_we = 1; pal_wa = 6'(i); pal_wd = 12'($urandom_range(1, 2047)); end
    for (int i = 0; i < 4096; i++) @(negedge clk_65) begin pal_we = 0; run_we = 1; run_wa = 12'(i); run_wd = 8'($urandom); end
    @(negedge clk_65) run_we = 0;
  end

  task automatic cal_pulse(input bit incr);
    @(negedge clk_65) begin cal_inc = incr; cal_dec = !incr; end
    @(negedge clk_65) begin cal_inc = 0; cal_dec = 0; end
    repeat (4) @(negedge clk_65);
  endtask

  // -------------------------------------------------------------- sequence
  initial begin
    int t0, lat_cycles, lat_ticks, fr0, score_audio, hi, t_pause, s_pause;
    rst = 1; btn_save = 0; slot = 5; btn_reset = 1; btn_pause = 0; sw_ai = 0; lm_tb = 0;
    repeat (20) @(negedge clk_100);
    rst = 0;
    // A: detection
    repeat (2000) @(negedge clk_100);
    scan_on = 1;
    check(g_notes == 0 && a_notes == 0, "silence: no notes");
    tone_on = 1; t0 = 0;
    while (!g_notes[24] && t0 < 3000000) begin @(negedge clk_100); t0++; end
    lat_cycles = t0;
    check(g_notes[24], $sformatf("E4 detected and received after %0d cycles", t0));
    repeat (200000) @(negedge clk_100);
    check(a_notes == 48'(1) << 24, $sformatf("only E4 active: %h", a_notes));
    check(g_notes == a_notes, "link carries the vector");
    check(fr_in > 20 && fr_out > 20, $sformatf("FFT frames %0d in, %0d out", fr_in, fr_out));
    check(n_corr_upd > 20, $sformatf("%0d correlation updates", n_corr_upd));
    // save the spectrum to slot 5
    @(negedge clk_25) btn_save = 1;
    @(negedge clk_25) btn_save = 0;
    t0 = 0;
    while (sectors < 4 && t0 < 200000) begin @(negedge clk_25); t0++; end
    check(sectors == 4 && bad_starts == 0, $sformatf("%0d sectors saved", sectors));
    hi = u_sd.get((5 * 4 + hbin[0] / 256) * 512 + (hbin[0] % 256) * 2);
    check(hi >= 50, $sformatf("saved fundamental bin high byte %0d", hi));
    check(u_sd.get((5 * 4) * 512 + 200) == 0, "saved empty bin is zero");
    // threshold calibration of note 24
    cal_pulse(1);
    check(th_on == 196, $sformatf("th_on after inc %0d", th_on));
    cal_pulse(0);
    cal_pulse(0);
    check(th_on == 188 && th_off == 128, $sformatf("th_on after decs %0d", th_on));
    cal_pulse(1);
    // release
    tone_on = 0; t0 = 0;
    while (g_notes[24] && t0 < 3000000) begin @(negedge clk_100); t0++; end
    check(!g_notes[24] && a_notes == 0, "E4 released after the tone stops");
    sw_view = 0;
    repeat (400000) @(negedge clk_100);   // let the average settle
    // forced realignment of the FFT input
    fr0 = fr_in;
    @(negedge clk_104) lm_tb = 1;
    @(negedge clk_104) lm_tb = 0;
    repeat (40000) @(negedge clk_100);
    check(realigns >= 1, $sformatf("%0d realignments", realigns));
    check(fr_in > fr0 + 3, "frames continue after realignment");
    // B: the audio note scores
    lat_ticks = (lat_cycles + TICK - 1) / TICK;
    @(negedge clk_100) btn_reset = 0;
    while (int'(stime) < 200 - lat_ticks) @(negedge clk_100);
    tone_on = 1;
    while (score == 0 && stime < 320) @(negedge clk_100);
    score_audio = score;
    check(score_audio >= 10 && stime <= 300, $sformatf("audio note scored %0d at time %0d", score_audio, stime));
    tone_on = 0;
    // C: AI player, a pause, the end of the song
    while (stime < 230) @(negedge clk_100);
    sw_ai = 1;
    while (stime < 1000) @(negedge clk_100);
    @(negedge clk_100) btn_pause = 1;
    repeat (5) @(negedge clk_100);
    btn_pause = 0;
    check(gstate == ST_PAUSED, "paused");
    t_pause = stime; s_pause = score;
    repeat (300000) @(negedge clk_100);
    check(stime == t_pause && score == s_pause && gstate == ST_PAUSED, "time and score frozen while paused");
    @(negedge clk_100) btn_pause = 1;
    repeat (5) @(negedge clk_100);
    btn_pause = 0;
    check(gstate == ST_PLAYING, "resumed");
    while (gstate != ST_OVER) @(negedge clk_100);
    check(stime == 1700, $sformatf("song over at %0d", stime));
    check(score >= score_audio + 10 * (SONG_LEN - 1), $sformatf("final score %0d", score));
    check(smatched[1:0] == 2'b11 && smatched[5:2] == 0, $sformatf("sprites matched on strings %b", smatched));
    // video and display mechanisms
    check(n_ghs > 100 && n_ahs > 100, "both video timings run");
    check(n_bg_px > 1000, $sformatf("%0d background pixels", n_bg_px));
    check(n_sprite_px > 100, $sformatf("%0d sprite pixels", n_sprite_px));
    check(n_inv_px > 1000, $sformatf("%0d inverted pixels while paused", n_inv_px));
    check(n_hist_px > 10, $sformatf("%0d histogram pixels", n_hist_px));
    check(n_bar_px > 10, $sformatf("%0d correlation bar pixels", n_bar_px));
    check(n_mark_px > 10, $sformatf("%0d threshold marker pixels", n_mark_px));
    check(n_an_change > 100 && n_seg_bad == 0, "seven-segment scan");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
