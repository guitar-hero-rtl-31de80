// game_board: scoring and graphics for the played song.
//
// 100 MHz (clk_100): note_deserializer recovers the 48-bit active-note
//   vector from the serial link; its first 37 bits (pitches E2..E5), or the
//   AI test player when sw_ai is set, feed the scoring unit, but only while
//   the song is playing (nothing scores while paused or over). game_control
//   keeps song_time (10 ms ticks) and the playing / paused / over state; the
//   hex display shows {score, song_time}.
// 65 MHz (clk_65): XVGA timing, run-length background, shared sprite table,
//   six string renderers and the layer mixer (pause = inverted picture).
//   Song time crosses from 100 MHz through a small dual-clock FIFO on every
//   tick (and on reset); each string match event crosses through another;
//   the paused flag through two flip-flops.
// btn_reset restarts the song: it clears song_time and resets the scoring
// and the string renderers. rst is the power-on reset.
// Pixel pipeline: renderers and background 2 cycles, mixer 1 cycle; syncs
// are delayed 3 cycles to match. The crossing scheme is this design's own.
module game_board
  import gh_pkg::*;
#(
  parameter int SEG_CYCLES   = 8192,
  parameter int TICK_CYCLES  = 1000000,
  parameter int DIGIT_CYCLES = 65536,
  parameter int RUN_DEPTH    = 262144
) (
  input  logic        clk_100,
  input  logic        clk_65,
  input  logic        rst,
  input  logic        ser_data,
  input  logic        ser_sync,
  input  logic        btn_reset,
  input  logic        btn_pause,
  input  logic        sw_ai,
  // background image loading (65 MHz domain)
  input  logic        run_we,
  input  logic [$clog2(RUN_DEPTH)-1:0] run_waddr,
  input  logic [7:0]  run_wdata,
  input  logic        pal_we,
  input  logic [5:0]  pal_waddr,
  input  logic [11:0] pal_wdata,
  // outputs
  output logic [11:0] vga_rgb,
  output logic        vga_hsync,
  output logic        vga_vsync,
  output logic [6:0]  seg,
  output logic [7:0]  an,
  output logic [47:0] rx_notes,
  output logic [15:0] score,
  output logic [15:0] song_time,
  output game_state_t state,
  output logic [STRINGS-1:0] sprites_matched
);
  // ------------------------------------------------------- 100 MHz side
  logic [1:0] r100, r65;
  logic       rst100, rst65;
  always_ff @(posedge clk_100) r100 <= {r100[0], rst};
  always_ff @(posedge clk_65)  r65  <= {r65[0], rst};
  assign rst100 = r100[1];
  assign rst65  = r65[1];

  logic        rx_valid;
  note_deserializer #(.NOTES(48), .SEG_CYCLES(SEG_CYCLES)) u_rx (
    .clk(clk_100), .rst(rst100), .ser_data(ser_data), .ser_sync(ser_sync),
    .notes(rx_notes), .notes_valid(rx_valid));

  logic [PITCHES-1:0] ai_notes, play_notes;
  ai_player #(.PITCHES(PITCHES)) u_ai (
    .clk(clk_100), .rst(rst100), .enable(sw_ai), .notes(ai_notes));
  // notes only count while the song is playing
  assign play_notes = (state != ST_PLAYING) ? '0 :
                      sw_ai ? ai_notes : rx_notes[PITCHES-1:0];

  logic tick;
  game_control #(.TICK_CYCLES(TICK_CYCLES), .SONG_END(1700)) u_ctl (
    .clk(clk_100), .btn_reset(btn_reset || rst100), .btn_pause(btn_pause),
    .song_time(song_time), .state(state), .tick(tick));

  logic               game_rst;
  logic               score_event;
  logic [STRINGS-1:0] str_valid;
  logic [4:0]         str_fret [STRINGS];
  logic [15:0]        str_time;
  assign game_rst = rst100 || btn_reset;

  scoring_unit #(.PITCHES(PITCHES), .WINDOW(100)) u_score (
    .clk(clk_100), .rst(game_rst), .notes(play_notes), .song_time(song_time),
    .score(score), .score_event(score_event),
    .str_valid(str_valid), .str_fret(str_fret), .str_time(str_time));

  hex_display #(.DIGIT_CYCLES(DIGIT_CYCLES)) u_hex (
    .clk(clk_100), .rst(rst100), .value({score, song_time}), .seg(seg), .an(an));

  // ------------------------------------------------- 100 -> 65 MHz links
  logic        rst_d;
  logic        t_full, t_empty;
  logic [16:0] t_q;          // {restart, song_time}
  always_ff @(posedge clk_100) rst_d <= game_rst;

  async_fifo #(.W(17), .DEPTH(16)) u_time_fifo (
    .wclk(clk_100), .wrst(rst100), .wr_en((tick || (rst_d && !game_rst)) && !t_full),
    .wdata({rst_d && !game_rst, song_time}), .full(t_full),
    .rclk(clk_65), .rrst(rst65), .rd_en(!t_empty), .rdata(t_q), .empty(t_empty));

  localparam int EV_W = 16 + STRINGS * 6;
  logic [EV_W-1:0] ev_w, ev_q;
  logic            ev_full, ev_empty;
  always_comb begin
    ev_w[15:0] = str_time;
    for (int s = 0; s < STRINGS; s++) ev_w[16 + s*6 +: 6] = {str_valid[s], str_fret[s]};
  end

  async_fifo #(.W(EV_W), .DEPTH(16)) u_ev_fifo (
    .wclk(clk_100), .wrst(rst100), .wr_en((|str_valid) && !ev_full), .wdata(ev_w), .full(ev_full),
    .rclk(clk_65), .rrst(rst65), .rd_en(!ev_empty), .rdata(ev_q), .empty(ev_empty));

  logic [1:0] pause_s;
  always_ff @(posedge clk_65) pause_s <= {pause_s[0], state == ST_PAUSED};

  // --------------------------------------------------------- 65 MHz side
  logic [15:0] time_65;
  logic        restart_65;
  always_ff @(posedge clk_65) begin
    restart_65 <= 1'b0;
    if (rst65) time_65 <= '0;
    else if (!t_empty) begin
      time_65    <= t_q[15:0];
      restart_65 <= t_q[16];
    end
  end

  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hsync, vsync, blank;
  xvga u_vga (.clk(clk_65), .rst(rst65), .hcount(hcount), .vcount(vcount),
              .hsync(hsync), .vsync(vsync), .blank(blank));

  logic [11:0] bg_px;
  background_rle #(.RUN_DEPTH(RUN_DEPTH), .PALETTE(64)) u_bg (
    .clk(clk_65), .hcount(hcount), .vcount(vcount),
    .run_we(run_we), .run_waddr(run_waddr), .run_wdata(run_wdata),
    .pal_we(pal_we), .pal_waddr(pal_waddr), .pal_wdata(pal_wdata), .pixel(bg_px));

  logic [9:0]       sp_addr [STRINGS];
  logic [9:0]       sp_addr_or;
  logic [18*13-1:0] sp_data;
  logic [12:0]      str_px [STRINGS];
  logic [STRINGS-1:0] loaded_any;

  always_comb begin
    sp_addr_or = '0;
    for (int s = 0; s < STRINGS; s++) sp_addr_or |= sp_addr[s];
  end

  sprite_rom #(.SPRITES(18), .SIZE(32)) u_sprites (
    .clk(clk_65), .addr(sp_addr_or), .data(sp_data));

  for (genvar s = 0; s < STRINGS; s++) begin : g_str
    string_renderer #(.STRING(s), .SLOTS(5)) u_str (
      .clk(clk_65), .rst(rst65 || restart_65), .song_time(time_65),
      .hcount(hcount), .vcount(vcount),
      .match_valid(!ev_empty && ev_q[16 + s*6 + 5]), .match_time(ev_q[15:0]),
      .match_fret(ev_q[16 + s*6 +: 5]),
      .sprite_addr(sp_addr[s]), .sprite_data(sp_data), .pixel(str_px[s]),
      .loaded_any(loaded_any[s]), .matched_any(sprites_matched[s]));
  end

  logic [2:0] hs_d, vs_d, bl_d;
  always_ff @(posedge clk_65) begin
    hs_d <= {hs_d[1:0], hsync};
    vs_d <= {vs_d[1:0], vsync};
    bl_d <= {bl_d[1:0], blank};
  end

  layer_mixer #(.N_LAYERS(STRINGS)) u_mix (
    .clk(clk_65), .bg(bg_px), .layers(str_px), .paused(pause_s[1]), .blank(bl_d[1]),
    .pixel(vga_rgb));
  assign vga_hsync = hs_d[2];
  assign vga_vsync = vs_d[2];
endmodule
