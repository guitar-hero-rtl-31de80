// string_renderer: draws the scrolling fret sprites of one guitar string.
//
// The notes of string STRING (time, fret) are taken from the song table in
// time order into up to SLOTS sprite slots. A note is loaded once it is less
// than LOOKAHEAD ticks ahead of song_time and a slot is free; its slot is
// freed TIMEOUT ticks after its time. A slot's sprite is centred at
//   x = PLAY_X + PX_PER_TICK * (note time - song_time),  y = Y0 + STRING*DY
// so it crosses the play line x = PLAY_X exactly at its time. A match event
// (time, fret) marks the slot holding that note as matched; matched sprites
// are drawn with inverted colours.
// Shared sprite table: for the pixel (hcount, vcount) a slot whose 32x32
// box contains it puts the offset {row, column} on sprite_addr, all others
// put zero, and the slots' addresses are OR-ed (sprites never overlap). The
// sprite table answers one cycle later with the pixel of all 18 sprites;
// the slot that hit picks the slice of its fret. Pixel latency: two cycles
// after hcount/vcount, the same as the background. The table is read at
// the pixel clock with this pipeline rather than at twice the clock.
// Screen layout, look-ahead and time-out values are this design's choices.
module string_renderer
  import gh_pkg::*;
#(
  parameter int STRING      = 0,
  parameter int SLOTS       = 5,
  parameter int PLAY_X      = 128,
  parameter int PX_PER_TICK = 2,
  parameter int Y0          = 300,
  parameter int DY          = 80,
  parameter int LOOKAHEAD   = 448,
  parameter int TIMEOUT     = 64
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] song_time,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic        match_valid,
  input  logic [15:0] match_time,
  input  logic [4:0]  match_fret,
  output logic [9:0]  sprite_addr,
  input  logic [18*13-1:0] sprite_data,
  output logic [12:0] pixel,
  output logic        loaded_any,
  output logic        matched_any
);
  typedef struct packed {
    logic [15:0] t;
    logic [4:0]  fret;
  } note_t;

  typedef struct packed {
    logic        valid;
    logic        matched;
    logic [15:0] t;
    logic [4:0]  fret;
  } slot_t;

  function automatic int count_notes();
    int n = 0;
    for (int i = 0; i < SONG_LEN; i++)
      if (int'(gh_pkg::song_note(i).str) == STRING) n++;
    return n;
  endfunction

  localparam int N_NOTES_STR = count_notes();
  localparam int LIST_N      = (N_NOTES_STR > 0) ? N_NOTES_STR : 1;
  localparam int NW          = $clog2(LIST_N + 1);
  localparam int YC          = Y0 + STRING * DY;

  note_t list [LIST_N];
  initial begin
    automatic int n = 0;
    for (int i = 0; i < LIST_N; i++) list[i] = '0;
    for (int i = 0; i < SONG_LEN; i++)
      if (int'(gh_pkg::song_note(i).str) == STRING) begin
        list[n] = '{t: gh_pkg::song_note(i).t, fret: gh_pkg::song_note(i).fret};
        n++;
      end
  end

  slot_t         slot [SLOTS];
  logic [NW-1:0] next_idx;
  note_t         next_note;
  logic          free_found;
  int            free_slot;

  assign next_note = list[(next_idx < NW'(LIST_N)) ? next_idx : '0];

  always_comb begin
    free_found = 1'b0;
    free_slot  = 0;
    for (int i = SLOTS - 1; i >= 0; i--)
      if (!slot[i].valid) begin
        free_found = 1'b1;
        free_slot  = i;
      end
  end

  // ---------------------------------------------------------------- slots
  always_ff @(posedge clk) begin
    if (rst) begin
      next_idx    <= '0;
      loaded_any  <= 1'b0;
      matched_any <= 1'b0;
      for (int i = 0; i < SLOTS; i++) slot[i] <= '0;
    end else begin
      for (int i = 0; i < SLOTS; i++) begin
        if (slot[i].valid && 32'(song_time) > 32'(slot[i].t) + TIMEOUT)
          slot[i].valid <= 1'b0;
        if (match_valid && slot[i].valid && slot[i].t == match_time &&
            slot[i].fret == match_fret) begin
          slot[i].matched <= 1'b1;
          matched_any     <= 1'b1;
        end
      end
      if (N_NOTES_STR > 0 && next_idx < NW'(N_NOTES_STR) && free_found &&
          32'(next_note.t) < 32'(song_time) + LOOKAHEAD) begin
        slot[free_slot] <= '{valid: 1'b1, matched: 1'b0, t: next_note.t, fret: next_note.fret};
        next_idx        <= next_idx + 1'b1;
        loaded_any      <= 1'b1;
      end
    end
  end

  // --------------------------------------------------------------- drawing
  logic [9:0] addr_or;
  logic       hit;
  logic [4:0] hit_fret;
  logic       hit_matched;

  always_comb begin
    addr_or     = '0;
    hit         = 1'b0;
    hit_fret    = '0;
    hit_matched = 1'b0;
    for (int i = 0; i < SLOTS; i++) begin
      automatic int x  = PLAY_X + PX_PER_TICK * (int'(slot[i].t) - int'(song_time));
      automatic int dx = int'(hcount) - (x - 16);
      automatic int dy = int'(vcount) - (YC - 16);
      if (slot[i].valid && dx >= 0 && dx < 32 && dy >= 0 && dy < 32) begin
        addr_or     = addr_or | {5'(dy), 5'(dx)};
        hit         = 1'b1;
        hit_fret    = slot[i].fret;
        hit_matched = slot[i].matched;
      end
    end
  end

  assign sprite_addr = addr_or;

  logic       hit_d, matched_d;
  logic [4:0] fret_d;
  logic [12:0] px;

  assign px = sprite_data[int'(fret_d) * 13 +: 13];

  always_ff @(posedge clk) begin
    hit_d     <= hit && (hcount < 11'd1024);
    fret_d    <= (hit_fret > 5'd17) ? 5'd0 : hit_fret;
    matched_d <= hit_matched;
    if (!hit_d || !px[12]) pixel <= 13'h0000;
    else if (matched_d)    pixel <= {1'b1, ~px[11:0]};
    else                   pixel <= px;
  end
endmodule
