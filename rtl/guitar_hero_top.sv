// guitar_hero_top: the complete two-board system.
//
// The audio board listens to the guitar (XADC samples), recognises which of
// 40 notes and 8 chords are sounding, and sends the 48-bit active-note
// vector over two wires (data, sync). The game board receives it, matches
// rising notes against the song, keeps the score and draws the scrolling
// tablature. Here the two wires connect the boards directly (and are also
// brought out). The FFT core, the SD card controller, the ADC and the clock
// generator are outside this design: their signals are ports.
// Parameters only shorten times and sizes for simulation; the defaults are
// the real system's.
//
// Following the source design: the split into an audio board and a game
// board joined only by a two-wire serial link, and the clock frequencies
// (104 MHz audio, 100 MHz game, 65 MHz video, 25 MHz SD). This design's
// choice: the boards share one reset here, and both VGA outputs come out.
//
// Synthesis reports constant output bits: they are bits of sd_addr, a byte
// address of a 512-byte sector (low 9 bits always zero) within the 256
// sectors the 64 recording slots use (upper bits always zero). The 32-bit
// width is what the SD controller's address port takes.
module guitar_hero_top
  import gh_pkg::*;
#(
  parameter int OVERSAMPLE   = 256,
  parameter int FRAME        = 4096,
  parameter int SEG_CYCLES   = 8192,
  parameter int TICK_CYCLES  = 1000000,
  parameter int DIGIT_CYCLES = 65536,
  parameter int RUN_DEPTH    = 262144
) (
  input  logic        clk_104,
  input  logic        clk_65,
  input  logic        clk_25,
  input  logic        clk_100,
  input  logic        rst,
  // audio board: XADC
  input  logic        xadc_eoc,
  input  logic [11:0] xadc_data,
  // audio board: FFT core
  output logic [15:0] fft_s_tdata,
  output logic        fft_s_tvalid,
  output logic        fft_s_tlast,
  input  logic        fft_s_tready,
  input  logic        fft_last_missing,
  input  logic [31:0] fft_m_tdata,
  input  logic [11:0] fft_m_tuser,
  input  logic        fft_m_tvalid,
  input  logic        fft_m_tlast,
  // audio board: SD card
  input  logic        btn_save,
  input  logic [5:0]  sw_slot,
  output logic        sd_reset,
  output logic [31:0] sd_addr,
  output logic        sd_wr,
  output logic [7:0]  sd_din,
  input  logic        sd_ready_for_next_byte,
  input  logic        sd_ready,
  // audio board: calibration and video
  input  logic [5:0]  cal_note,
  input  logic        cal_upper,
  input  logic        cal_inc,
  input  logic        cal_dec,
  input  logic        sw_view,
  output logic [11:0] audio_vga_rgb,
  output logic        audio_vga_hsync,
  output logic        audio_vga_vsync,
  output logic [47:0] audio_active_notes,
  output logic [15:0] audio_th_on,
  output logic [15:0] audio_th_off,
  output logic        audio_corr_update,
  // serial link
  output logic        ser_data,
  output logic        ser_sync,
  // game board
  input  logic        btn_reset,
  input  logic        btn_pause,
  input  logic        sw_ai,
  input  logic        run_we,
  input  logic [$clog2(RUN_DEPTH)-1:0] run_waddr,
  input  logic [7:0]  run_wdata,
  input  logic        pal_we,
  input  logic [5:0]  pal_waddr,
  input  logic [11:0] pal_wdata,
  output logic [11:0] game_vga_rgb,
  output logic        game_vga_hsync,
  output logic        game_vga_vsync,
  output logic [6:0]  seg,
  output logic [7:0]  an,
  output logic [47:0] game_rx_notes,
  output logic [15:0] score,
  output logic [15:0] song_time,
  output game_state_t game_state,
  output logic [5:0]  sprites_matched
);
  audio_board #(.OVERSAMPLE(OVERSAMPLE), .FRAME(FRAME), .SEG_CYCLES(SEG_CYCLES)) u_audio (
    .clk_104(clk_104), .clk_65(clk_65), .clk_25(clk_25), .clk_100(clk_100), .rst(rst),
    .xadc_eoc(xadc_eoc), .xadc_data(xadc_data),
    .fft_s_tdata(fft_s_tdata), .fft_s_tvalid(fft_s_tvalid), .fft_s_tlast(fft_s_tlast),
    .fft_s_tready(fft_s_tready), .fft_last_missing(fft_last_missing),
    .fft_m_tdata(fft_m_tdata), .fft_m_tuser(fft_m_tuser), .fft_m_tvalid(fft_m_tvalid),
    .fft_m_tlast(fft_m_tlast),
    .btn_save(btn_save), .sw_slot(sw_slot), .sd_reset(sd_reset), .sd_addr(sd_addr),
    .sd_wr(sd_wr), .sd_din(sd_din), .sd_ready_for_next_byte(sd_ready_for_next_byte),
    .sd_ready(sd_ready),
    .cal_note(cal_note), .cal_upper(cal_upper), .cal_inc(cal_inc), .cal_dec(cal_dec),
    .sw_view(sw_view), .vga_rgb(audio_vga_rgb), .vga_hsync(audio_vga_hsync),
    .vga_vsync(audio_vga_vsync), .active_notes(audio_active_notes),
    .th_on_sel(audio_th_on), .th_off_sel(audio_th_off), .corr_update(audio_corr_update),
    .ser_data(ser_data), .ser_sync(ser_sync));

  game_board #(.SEG_CYCLES(SEG_CYCLES), .TICK_CYCLES(TICK_CYCLES),
               .DIGIT_CYCLES(DIGIT_CYCLES), .RUN_DEPTH(RUN_DEPTH)) u_game (
    .clk_100(clk_100), .clk_65(clk_65), .rst(rst),
    .ser_data(ser_data), .ser_sync(ser_sync),
    .btn_reset(btn_reset), .btn_pause(btn_pause), .sw_ai(sw_ai),
    .run_we(run_we), .run_waddr(run_waddr), .run_wdata(run_wdata),
    .pal_we(pal_we), .pal_waddr(pal_waddr), .pal_wdata(pal_wdata),
    .vga_rgb(game_vga_rgb), .vga_hsync(game_vga_hsync), .vga_vsync(game_vga_vsync),
    .seg(seg), .an(an), .rx_notes(game_rx_notes), .score(score), .song_time(song_time),
    .state(game_state), .sprites_matched(sprites_matched));
endmodule
