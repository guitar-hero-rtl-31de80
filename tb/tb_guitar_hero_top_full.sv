// tb_guitar_hero_top_full: the whole system at its real parameters (256x
// oversampling, 4096-point frames, 8192-cycle link segments, 10 ms song
// ticks, 65,536-cycle display digits, 262,144-word background table), with
// the behavioural FFT core and SD controller. One complete recognition: the
// ADC model plays an E4 (harmonics 1..4 on the reference bins of pitch 24),
// each new 16-bit sample starts a frame transfer, spectra are correlated, the note turns active and
// travels over the serial link to the game board. Only the ADC conversion
// rate is the testbench's: a conversion every 104 MHz cycle instead of every
// 104 cycles, so a new sample arrives every 256 cycles instead of 26,624.
// Checks: E4, and nothing else, is active on the audio board and then on
// the game board; frames pass the FFT without realignment; the game
// board's song clock ticks (two 10 ms ticks); the seven-segment display
// scans.
module tb_guitar_hero_top_full;
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

  logic        rst, eoc;
  logic [11:0] adc;
  logic [15:0] fs_d;
  logic        fs_v, fs_l, fs_r, lm;
  logic [31:0] fm_d;
  logic [11:0] fm_u;
  logic        fm_v, fm_l;
  logic        sd_reset, sd_wr, rfnb, sd_ready;
  logic [31:0] sd_addr;
  logic [7:0]  sd_din;
  logic [11:0] a_rgb, g_rgb;
  logic        a_hs, a_vs, g_hs, g_vs, corr_upd, ser_d, ser_s;
  logic [47:0] a_notes, g_notes;
  logic [15:0] th_on, th_off, score, stime;
  logic [6:0]  seg;
  logic [7:0]  an;
  game_state_t gstate;
  logic [5:0]  smatched;
  int          fr_in, fr_out, realigns, sectors, bad_starts;

  guitar_hero_top dut (
    .clk_104(clk_104), .clk_65(clk_65), .clk_25(clk_25), .clk_100(clk_100), .rst(rst),
    .xadc_eoc(eoc), .xadc_data(adc),
    .fft_s_tdata(fs_d), .fft_s_tvalid(fs_v), .fft_s_tlast(fs_l), .fft_s_tready(fs_r),
    .fft_last_missing(lm),
    .fft_m_tdata(fm_d), .fft_m_tuser(fm_u), .fft_m_tvalid(fm_v), .fft_m_tlast(fm_l),
    .btn_save(1'b0), .sw_slot(6'd0), .sd_reset(sd_reset), .sd_addr(sd_addr), .sd_wr(sd_wr),
    .sd_din(sd_din), .sd_ready_for_next_byte(rfnb), .sd_ready(sd_ready),
    .cal_note(6'd0), .cal_upper(1'b0), .cal_inc(1'b0), .cal_dec(1'b0), .sw_view(1'b0),
    .audio_vga_rgb(a_rgb), .audio_vga_hsync(a_hs), .audio_vga_vsync(a_vs),
    .audio_active_notes(a_notes), .audio_th_on(th_on), .audio_th_off(th_off), .audio_corr_update(corr_upd),
    .ser_data(ser_d), .ser_sync(ser_s),
    .btn_reset(1'b0), .btn_pause(1'b0), .sw_ai(1'b0),
    .run_we(1'b0), .run_waddr(18'd0), .run_wdata(8'd0), .pal_we(1'b0), .pal_waddr(6'd0), .pal_wdata(12'd0),
    .game_vga_rgb(g_rgb), .game_vga_hsync(g_hs), .game_vga_vsync(g_vs), .seg(seg), .an(an),
    .game_rx_notes(g_notes), .score(score), .song_time(stime), .game_state(gstate), .sprites_matched(smatched));

  xfft_model u_fft (.clk(clk_104), .rst(rst), .s_tdata(fs_d), .s_tvalid(fs_v), .s_tlast(fs_l), .s_tready(fs_r),
    .last_missing(lm), .m_tdata(fm_d), .m_tuser(fm_u), .m_tvalid(fm_v), .m_tlast(fm_l),
    .frames_in(fr_in), .frames_out(fr_out), .realigns(realigns));

  sd_controller_model u_sd (.clk(clk_25), .rst(sd_reset), .addr(sd_addr), .wr(sd_wr), .din(sd_din),
    .ready_for_next_byte(rfnb), .ready(sd_ready), .sectors(sectors), .bad_starts(bad_starts));

  initial begin
    #100ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ADC model: the same value for all 256 conversions of a sample
  int   n_conv = 0, n_samples = 0;
  real  amp [4] = '{16000.0, 8000.0, 5000.0, 3000.0};
  int   hbin [4];
  initial for (int h = 1; h <= 4; h++) hbin[h-1] = (note_bin_x16(24) * h + 8) / 16;

  always @(negedge clk_104) begin
    real x;
    int  s, i;
    eoc = !rst;
    i = n_conv / 256;
    x = 0.0;
    for (int h = 0; h < 4; h++) x += amp[h] * $cos(2.0 * 3.14159265358979 * hbin[h] * i / 4096.0 + h);
    s = $rtoi(x) / 16 + 2048;
    if (s > 4095) s = 4095;
    if (s < 0) s = 0;
    adc = 12'(s);
    if (!rst) n_conv++;
  end

  int n_an_change = 0;
  logic [7:0] an_d;
  always @(posedge clk_100) begin
    an_d <= an;
    if (an != an_d) n_an_change++;
  end

  initial begin
    int t0;
    rst = 1;
    repeat (20) @(negedge clk_100);
    rst = 0;
    t0 = 0;
    while (!g_notes[24] && t0 < 8000000) begin @(negedge clk_100); t0++; end
    check(a_notes[24], "E4 active on the audio board");
    check(g_notes[24], $sformatf("E4 received by the game board after %0d cycles", t0));
    check(a_notes == 48'(1) << 24 && g_notes == a_notes, $sformatf("only E4: %h / %h", a_notes, g_notes));
    check(fr_out > 10 && realigns == 0, $sformatf("%0d frames through the FFT", fr_out));
    while (stime < 2) @(negedge clk_100);
    check(g_notes == a_notes, "note still held");
    check(stime >= 2 && gstate == ST_PLAYING, $sformatf("song time %0d ticks", stime));
    check(n_an_change > 20, $sformatf("seven-segment scan: %0d digit changes", n_an_change));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
