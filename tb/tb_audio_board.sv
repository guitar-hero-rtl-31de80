// tb_audio_board: the audio board alone with the behavioural FFT core and SD
// controller, at 4x oversampling and 16-cycle link segments (the FFT frame
// stays 4096 points). The ADC model plays an E4 (harmonics 1..4 on the
// reference bins of pitch 24, amplitudes 16000/8000/5000/3000) and then
// silence. A receiver in the testbench decodes ser_data / ser_sync (sample in
// the middle of each segment, packet ends with the sync segment) and checks
// every received vector against active_notes. Counted mechanisms: frames
// through the FFT, correlation updates, E4 turning on (and nothing else),
// link packets, the spectrum save (4 sectors, loud fundamental bin),
// calibration of both thresholds, E4 turning off, a forced realignment,
// histogram and bar-chart pixels.
module tb_audio_board;
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

  localparam int SEG = 16;
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
  logic [11:0] a_rgb;
  logic        a_hs, a_vs, corr_upd, ser_d, ser_s;
  logic [47:0] a_notes;
  logic [15:0] th_on, th_off;
  int          fr_in, fr_out, realigns, sectors, bad_starts;

  audio_board #(.OVERSAMPLE(4), .SEG_CYCLES(SEG)) dut (
    .clk_104(clk_104), .clk_65(clk_65), .clk_25(clk_25), .clk_100(clk_100), .rst(rst),
    .xadc_eoc(eoc), .xadc_data(adc),
    .fft_s_tdata(fs_d), .fft_s_tvalid(fs_v), .fft_s_tlast(fs_l), .fft_s_tready(fs_r),
    .fft_last_missing(lm_model | lm_tb),
    .fft_m_tdata(fm_d), .fft_m_tuser(fm_u), .fft_m_tvalid(fm_v), .fft_m_tlast(fm_l),
    .btn_save(btn_save), .sw_slot(slot), .sd_reset(sd_reset), .sd_addr(sd_addr), .sd_wr(sd_wr),
    .sd_din(sd_din), .sd_ready_for_next_byte(rfnb), .sd_ready(sd_ready),
    .cal_note(cal_note), .cal_upper(cal_upper), .cal_inc(cal_inc), .cal_dec(cal_dec), .sw_view(sw_view),
    .vga_rgb(a_rgb), .vga_hsync(a_hs), .vga_vsync(a_vs),
    .active_notes(a_notes), .th_on_sel(th_on), .th_off_sel(th_off), .corr_update(corr_upd),
    .ser_data(ser_d), .ser_sync(ser_s));

  xfft_model u_fft (.clk(clk_104), .rst(rst), .s_tdata(fs_d), .s_tvalid(fs_v), .s_tlast(fs_l), .s_tready(fs_r),
    .last_missing(lm_model), .m_tdata(fm_d), .m_tuser(fm_u), .m_tvalid(fm_v), .m_tlast(fm_l),
    .frames_in(fr_in), .frames_out(fr_out), .realigns(realigns));

  sd_controller_model u_sd (.clk(clk_25), .rst(sd_reset), .addr(sd_addr), .wr(sd_wr), .din(sd_din),
    .ready_for_next_byte(rfnb), .ready(sd_ready), .sectors(sectors), .bad_starts(bad_starts));

  initial begin
    #30ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ADC model
  bit   tone_on = 0;
  int   n_conv = 0;
  real  amp [4] = '{16000.0, 8000.0, 5000.0, 3000.0};
  int   hbin [4];
  initial for (int h = 1; h <= 4; h++) hbin[h-1] = (note_bin_x16(24) * h + 8) / 16;

  always @(negedge clk_104) begin
    real x;
    int  s, i;
    eoc = !rst;
    i = n_conv / 4;
    x = 0.0;
    if (tone_on)
      for (int h = 0; h < 4; h++) x += amp[h] * $cos(2.0 * 3.14159265358979 * hbin[h] * i / 4096.0 + h);
    s = $rtoi(x) / 16 + 2048;
    if (s > 4095) s = 4095;
    if (s < 0) s = 0;
    adc = 12'(s);
    if (!rst) n_conv++;
  end

  // link receiver: sync falls -> packet starts; sample each segment mid-way
  int   n_packets = 0, n_pkt_bad = 0, rx_cnt = -1;
  logic ss_d;
  logic [47:0] rx, last_rx;
  logic [47:0] notes_d;
  always @(posedge clk_100) begin
    ss_d <= ser_s;
    if (ss_d && !ser_s) rx_cnt <= 0;
    else if (rx_cnt >= 0) begin
      if (rx_cnt % SEG == SEG / 2 && rx_cnt / SEG < 48) rx[rx_cnt / SEG] <= ser_d;
      if (rx_cnt == 48 * SEG) begin
        n_packets++;
        last_rx = rx;
        // the vector may change around a packet start: accept the value now
        // or a few microseconds ago
        if (rx != a_notes && rx != notes_d) n_pkt_bad++;
      end
      rx_cnt <= (rx_cnt == 63 * SEG) ? -1 : rx_cnt + 1;
    end
  end
  always @(posedge clk_100) if (rx_cnt == 0) notes_d <= a_notes;

  // mechanism counters
  int n_corr_upd = 0, n_hist_px = 0, n_bar_px = 0, n_mark_px = 0, n_ahs = 0;
  logic a_hs_d;
  always @(posedge clk_104) if (corr_upd) n_corr_upd++;
  always @(posedge clk_65) begin
    a_hs_d <= a_hs;
    if (a_hs && !a_hs_d) n_ahs++;
    if (sw_view && a_rgb == 12'hFFF) n_hist_px++;
    if (!sw_view && (a_rgb == 12'h0F0 || a_rgb == 12'h080)) n_bar_px++;
    if (!sw_view && a_rgb == 12'hF00) n_mark_px++;
  end

  task automatic cal_pulse(input bit up, input bit incr);
    @(negedge clk_65) begin cal_upper = up; cal_inc = incr; cal_dec = !incr; end
    @(negedge clk_65) begin cal_inc = 0; cal_dec = 0; end
    repeat (4) @(negedge clk_65);
  endtask

  initial begin
    int t0, fr0, hi;
    rst = 1; btn_save = 0; slot = 9; lm_tb = 0;
    cal_note = 24; cal_upper = 1; cal_inc = 0; cal_dec = 0; sw_view = 1;
    repeat (20) @(negedge clk_100);
    rst = 0;
    repeat (2000) @(negedge clk_100);
    check(a_notes == 0, "silence: no notes");
    tone_on = 1; t0 = 0;
    while (!a_notes[24] && t0 < 3000000) begin @(negedge clk_100); t0++; end
    check(a_notes[24], $sformatf("E4 detected after %0d cycles", t0));
    repeat (200000) @(negedge clk_100);
    check(a_notes == 48'(1) << 24, $sformatf("only E4 active: %h", a_notes));
    check(last_rx == a_notes, "link carries the vector");
    check(fr_in > 20 && fr_out > 20, $sformatf("FFT frames %0d in, %0d out", fr_in, fr_out));
    check(n_corr_upd > 20, $sformatf("%0d correlation updates", n_corr_upd));
    @(negedge clk_25) btn_save = 1;
    @(negedge clk_25) btn_save = 0;
    t0 = 0;
    while (sectors < 4 && t0 < 200000) begin @(negedge clk_25); t0++; end
    check(sectors == 4 && bad_starts == 0, $sformatf("%0d sectors saved", sectors));
    hi = u_sd.get((9 * 4 + hbin[0] / 256) * 512 + (hbin[0] % 256) * 2);
    check(hi >= 50, $sformatf("saved fundamental bin high byte %0d", hi));
    cal_pulse(1, 1);
    check(th_on == 196, $sformatf("th_on after inc %0d", th_on));
    cal_pulse(1, 0);
    cal_pulse(0, 0);
    check(th_on == 192 && th_off == 124, $sformatf("thresholds %0d / %0d", th_on, th_off));
    cal_pulse(0, 1);
    sw_view = 0;
    tone_on = 0; t0 = 0;
    while (a_notes[24] && t0 < 3000000) begin @(negedge clk_100); t0++; end
    check(a_notes == 0, "E4 released after the tone stops");
    fr0 = fr_in;
    @(negedge clk_104) lm_tb = 1;
    @(negedge clk_104) lm_tb = 0;
    repeat (60000) @(negedge clk_100);
    check(realigns >= 1 && fr_in > fr0 + 3, $sformatf("%0d realignments, frames continue", realigns));
    check(last_rx == 0, "link carries the release");
    check(n_packets > 100 && n_pkt_bad == 0, $sformatf("%0d link packets, %0d wrong", n_packets, n_pkt_bad));
    check(n_ahs > 100, "video timing runs");
    check(n_hist_px > 10, $sformatf("%0d histogram pixels", n_hist_px));
    check(n_bar_px > 10 && n_mark_px > 10, $sformatf("%0d bar / %0d marker pixels", n_bar_px, n_mark_px));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
