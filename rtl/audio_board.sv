// audio_board: guitar note recognition, from ADC samples to the serial
// active-note link.
//
// 104 MHz (clk_104): XADC samples -> oversampler (256x, 16 bits, offset
//   binary turned into two's complement by inverting the MSB) -> frame
//   buffer and AXI-Stream feeder -> external FFT core -> fft_magnitude ->
//   48 correlators (dot product with each reference spectrum) and the two
//   spectrum memories -> process_division (48 correlations, Q8.8) ->
//   48 dual-clock FIFOs.
// 65 MHz (clk_65): 48 process_correlation units (moving average, hysteresis,
//   threshold calibration, bar chart) -> 48-bit active-note vector, pushed
//   into a dual-clock FIFO whenever the correlations update. Video: XVGA
//   timing; sw_view = 0 shows the correlation bar chart, 1 the spectrum
//   histogram.
// 25 MHz (clk_25): sd_saver copies the spectrum to the SD controller; its
//   `active` flag reaches the 104 MHz write port through two flip-flops.
// 100 MHz (clk_100): the active-note vector leaves the FIFO into a register
//   and note_serializer sends it on ser_data / ser_sync.
// rst is synchronised into each domain with two flip-flops.
// The FFT core and the SD controller are outside: their ports are this
// module's ports. Domain crossings by flip-flops for reset and the SD flag,
// and the FIFO push condition, are this design's choices.
module audio_board
  import gh_pkg::*;
#(
  parameter int OVERSAMPLE = 256,
  parameter int FRAME      = 4096,
  parameter int SEG_CYCLES = 8192
) (
  input  logic        clk_104,
  input  logic        clk_65,
  input  logic        clk_25,
  input  logic        clk_100,
  input  logic        rst,
  // XADC
  input  logic        xadc_eoc,
  input  logic [11:0] xadc_data,
  // FFT core input stream
  output logic [15:0] fft_s_tdata,
  output logic        fft_s_tvalid,
  output logic        fft_s_tlast,
  input  logic        fft_s_tready,
  input  logic        fft_last_missing,
  // FFT core output stream
  input  logic [31:0] fft_m_tdata,
  input  logic [11:0] fft_m_tuser,
  input  logic        fft_m_tvalid,
  input  logic        fft_m_tlast,
  // SD controller
  input  logic        btn_save,
  input  logic [5:0]  sw_slot,
  output logic        sd_reset,
  output logic [31:0] sd_addr,
  output logic        sd_wr,
  output logic [7:0]  sd_din,
  input  logic        sd_ready_for_next_byte,
  input  logic        sd_ready,
  // threshold calibration (65 MHz domain)
  input  logic [5:0]  cal_note,
  input  logic        cal_upper,
  input  logic        cal_inc,
  input  logic        cal_dec,
  // video
  input  logic        sw_view,
  output logic [11:0] vga_rgb,
  output logic        vga_hsync,
  output logic        vga_vsync,
  // status
  output logic [N_CORR-1:0] active_notes,
  output logic [15:0]       th_on_sel,
  output logic [15:0]       th_off_sel,
  output logic              corr_update,
  // serial link
  output logic        ser_data,
  output logic        ser_sync
);
  // ------------------------------------------------------------ resets
  logic [1:0] r104, r65, r25, r100;
  logic       rst104, rst65, rst25, rst100;
  always_ff @(posedge clk_104) r104 <= {r104[0], rst};
  always_ff @(posedge clk_65)  r65  <= {r65[0], rst};
  always_ff @(posedge clk_25)  r25  <= {r25[0], rst};
  always_ff @(posedge clk_100) r100 <= {r100[0], rst};
  assign rst104 = r104[1];
  assign rst65  = r65[1];
  assign rst25  = r25[1];
  assign rst100 = r100[1];

  // --------------------------------------------------- 104 MHz: sampling
  logic [15:0] os_sample;
  logic        os_done;

  oversampler #(.OVERSAMPLE(OVERSAMPLE), .IN_W(12), .OUT_W(16)) u_os (
    .clk(clk_104), .rst(rst104), .eoc(xadc_eoc), .adc_data(xadc_data),
    .sample(os_sample), .done(os_done));

  bram_to_fft #(.FRAME(FRAME), .W(16)) u_feed (
    .clk(clk_104), .rst(rst104),
    .sample({~os_sample[15], os_sample[14:0]}), .sample_valid(os_done),
    .m_tdata(fft_s_tdata), .m_tvalid(fft_s_tvalid), .m_tlast(fft_s_tlast),
    .m_tready(fft_s_tready), .last_missing(fft_last_missing));

  // ---------------------------------------------------- 104 MHz: spectrum
  logic [15:0] mag;
  logic [11:0] mag_idx;
  logic        mag_valid, mag_last;

  fft_magnitude #(.IN_W(16), .IDX_W(12)) u_mag (
    .clk(clk_104), .rst(rst104),
    .s_tdata(fft_m_tdata), .s_tuser(fft_m_tuser), .s_tvalid(fft_m_tvalid), .s_tlast(fft_m_tlast),
    .m_tdata(mag), .m_tuser(mag_idx), .m_tvalid(mag_valid), .m_tlast(mag_last));

  logic [1:0] save_sync;
  logic       saving;
  always_ff @(posedge clk_104) save_sync <= {save_sync[0], saving};

  logic [9:0]  hist_addr, sd_raddr;
  logic [15:0] hist_data, sd_rdata;

  spectrum_bram #(.DEPTH(BINS), .W(16), .IDX_W(12)) u_spec_video (
    .wclk(clk_104), .mag_tdata(mag), .mag_tuser(mag_idx), .mag_tvalid(mag_valid),
    .block_write(1'b0), .rclk(clk_65), .raddr(hist_addr), .rdata(hist_data));

  spectrum_bram #(.DEPTH(BINS), .W(16), .IDX_W(12)) u_spec_sd (
    .wclk(clk_104), .mag_tdata(mag), .mag_tuser(mag_idx), .mag_tvalid(mag_valid),
    .block_write(save_sync[1]), .rclk(clk_25), .raddr(sd_raddr), .rdata(sd_rdata));

  // ------------------------------------------------- 104 MHz: correlation
  logic [DOT_W-1:0]  dot [N_CORR];
  logic [N_CORR-1:0] dot_valid;
  logic [CORR_W-1:0] corr [N_CORR];
  logic              corr_valid;

  for (genvar k = 0; k < N_CORR; k++) begin : g_corr
    correlator #(.NOTE(k), .BINS(BINS), .IDX_W(12), .ACC_W(DOT_W)) u_c (
      .clk(clk_104), .rst(rst104),
      .mag_tdata(mag), .mag_tuser(mag_idx), .mag_tvalid(mag_valid), .mag_tlast(mag_last),
      .dot_product(dot[k]), .dot_product_valid(dot_valid[k]));
  end

  process_division #(.N(N_CORR), .LATENCY(46)) u_div (
    .clk(clk_104), .rst(rst104), .dot_product(dot), .dot_valid(dot_valid[0]),
    .corr(corr), .corr_valid(corr_valid));

  // ----------------------------------------- 65 MHz: per-note processing
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hsync, vsync, blank;

  xvga u_vga (.clk(clk_65), .rst(rst65), .hcount(hcount), .vcount(vcount),
              .hsync(hsync), .vsync(vsync), .blank(blank));

  logic [N_CORR-1:0] fifo_empty, fifo_rd, updated;
  logic [15:0]       fifo_q   [N_CORR];
  logic [15:0]       filt     [N_CORR];
  logic [15:0]       th_on    [N_CORR];
  logic [15:0]       th_off   [N_CORR];
  logic [11:0]       bar_px   [N_CORR];

  for (genvar k = 0; k < N_CORR; k++) begin : g_note
    logic unused_full;
    async_fifo #(.W(16), .DEPTH(16)) u_fifo (
      .wclk(clk_104), .wrst(rst104), .wr_en(corr_valid), .wdata(corr[k]), .full(unused_full),
      .rclk(clk_65), .rrst(rst65), .rd_en(fifo_rd[k]), .rdata(fifo_q[k]), .empty(fifo_empty[k]));

    process_correlation #(.NOTE(k)) u_pc (
      .clk(clk_65), .rst(rst65),
      .fifo_empty(fifo_empty[k]), .fifo_data(fifo_q[k]), .fifo_rd(fifo_rd[k]),
      .cal_sel(cal_note == 6'(k)), .cal_upper(cal_upper), .cal_inc(cal_inc), .cal_dec(cal_dec),
      .hcount(hcount), .vcount(vcount),
      .active(active_notes[k]), .updated(updated[k]), .filtered(filt[k]),
      .th_on(th_on[k]), .th_off(th_off[k]), .pixel(bar_px[k]));
  end

  assign th_on_sel   = th_on[(cal_note < 6'(N_CORR)) ? cal_note : 6'd0];
  assign th_off_sel  = th_off[(cal_note < 6'(N_CORR)) ? cal_note : 6'd0];
  assign corr_update = updated[0];

  // video: bar chart (1-cycle latency) or histogram (2 cycles)
  logic [11:0] bars_or, bars_d, hist_px;
  always_comb begin
    bars_or = '0;
    for (int k = 0; k < N_CORR; k++) bars_or |= bar_px[k];
  end

  histogram_video #(.SHIFT(7)) u_hist (
    .clk(clk_65), .hcount(hcount), .vcount(vcount),
    .raddr(hist_addr), .rdata(hist_data), .pixel(hist_px));

  logic [2:0] hs_d, vs_d, bl_d;
  always_ff @(posedge clk_65) begin
    bars_d  <= bars_or;
    hs_d    <= {hs_d[1:0], hsync};
    vs_d    <= {vs_d[1:0], vsync};
    bl_d    <= {bl_d[1:0], blank};
    vga_rgb <= bl_d[1] ? 12'h000 : (sw_view ? hist_px : bars_d);
  end
  assign vga_hsync = hs_d[2];
  assign vga_vsync = vs_d[2];

  // ------------------------------------- 65 -> 100 MHz: active-note link
  logic [N_CORR-1:0] an_q;
  logic              an_full, an_empty;
  logic [N_CORR-1:0] notes_100;

  // the vector pushed is the one after this update (active lags updated by 0)
  logic upd_d;
  always_ff @(posedge clk_65) upd_d <= rst65 ? 1'b0 : updated[0];

  async_fifo #(.W(N_CORR), .DEPTH(16)) u_an_fifo (
    .wclk(clk_65), .wrst(rst65), .wr_en(upd_d && !an_full), .wdata(active_notes), .full(an_full),
    .rclk(clk_100), .rrst(rst100), .rd_en(!an_empty), .rdata(an_q), .empty(an_empty));

  always_ff @(posedge clk_100)
    if (rst100)         notes_100 <= '0;
    else if (!an_empty) notes_100 <= an_q;

  logic unused_pkt;
  note_serializer #(.NOTES(N_CORR), .SEGMENTS(64), .SEG_CYCLES(SEG_CYCLES)) u_ser (
    .clk(clk_100), .rst(rst100), .notes(notes_100),
    .ser_data(ser_data), .ser_sync(ser_sync), .packet_start(unused_pkt));

  // ----------------------------------------------------- 25 MHz: SD saver
  assign sd_reset = rst25;
  sd_saver #(.WORDS(BINS), .SECTOR_BYTES(512)) u_saver (
    .clk(clk_25), .rst(rst25), .start(btn_save), .slot(sw_slot),
    .raddr(sd_raddr), .rdata(sd_rdata),
    .sd_addr(sd_addr), .sd_wr(sd_wr), .sd_din(sd_din),
    .sd_ready_for_next_byte(sd_ready_for_next_byte), .sd_ready(sd_ready),
    .active(saving));
endmodule
