// gh_pkg: constants, types and elaboration-time tables shared by the audio
// board and the game board.
//
// Audio side: 48 correlation channels (40 semitones from E2 plus 8 chords),
// each compared against a reference magnitude spectrum of 1024 FFT bins. The
// reference spectra here are synthetic: a harmonic series of peaks at each
// note's fundamental, computed by ref_mag() so that the correlators, the
// divisor table and the testbenches all see the same numbers. With a 4096
// point FFT at 104 MHz / 104 / 256 = 3906.25 Hz one bin is 0.954 Hz.
//
// Game side: 37 pitches (E2..E5), six strings in standard tuning, a 32-bit
// song metadata word (time, pitch, string, fret, end flag) and the hard-coded
// song "Mary Had a Little Lamb" played on the top two strings.
package gh_pkg;

  // ------------------------------------------------------------ audio side
  localparam int N_CORR   = 48;   // correlators: notes + chords
  localparam int N_NOTES  = 40;   // single notes E2..G5
  localparam int BINS     = 1024; // bins below ~1 kHz used for correlation
  localparam int MAG_W    = 16;
  localparam int DOT_W    = 42;
  localparam int CORR_W   = 16;   // correlation, unsigned Q8.8
  localparam int CORR_FRAC = 8;

  // Bin of each semitone E2..D#3, times 16 (f * 4096 / 3906.25 * 16).
  localparam int BASE_BIN_X16 [12] = '{1383, 1465, 1552, 1644, 1742, 1845,
                                       1955, 2071, 2195, 2325, 2463, 2610};

  function automatic int note_bin_x16(input int n);
    return BASE_BIN_X16[n % 12] << (n / 12);
  endfunction

  // Reference spectrum of a single note: peaks at harmonics 1..4, each with
  // half-height shoulders one bin either side.
  function automatic int note_mag(input int n, input int bin);
    int amp [4];
    int v, c;
    amp = '{8000, 4000, 2500, 1500};
    v = 0;
    for (int h = 1; h <= 4; h++) begin
      c = (note_bin_x16(n) * h + 8) / 16;
      if (bin == c) v += amp[h-1];
      else if (bin == c - 1 || bin == c + 1) v += amp[h-1] / 2;
    end
    return v;
  endfunction

  // Chords 40..47: E, A, D, G, C, F major, E minor, A minor (root, third,
  // fifth as note indices from E2).
  localparam int CHORD_ROOT  [8] = '{0, 5, 10, 3, 8, 1, 0, 5};
  localparam int CHORD_THIRD [8] = '{4, 4, 4, 4, 4, 4, 3, 3};

  function automatic logic [MAG_W-1:0] ref_mag(input int k, input int bin);
    int v;
    if (k < N_NOTES) v = note_mag(k, bin);
    else begin
      v = note_mag(CHORD_ROOT[k-N_NOTES], bin)
        + note_mag(CHORD_ROOT[k-N_NOTES] + CHORD_THIRD[k-N_NOTES], bin)
        + note_mag(CHORD_ROOT[k-N_NOTES] + 7, bin);
    end
    if (v > 65535) v = 65535;
    return MAG_W'(v);
  endfunction

  // Number of single notes making up channel k, and the j-th of them.
  function automatic int chan_notes(input int k);
    return (k < N_NOTES) ? 1 : 3;
  endfunction

  function automatic int chan_note(input int k, input int j);
    if (k < N_NOTES) return k;
    if (j == 0) return CHORD_ROOT[k-N_NOTES];
    if (j == 1) return CHORD_ROOT[k-N_NOTES] + CHORD_THIRD[k-N_NOTES];
    return CHORD_ROOT[k-N_NOTES] + 7;
  endfunction

  // The c-th candidate non-zero bin of channel k (c = 0..35): note j,
  // harmonic h, offset -1/0/+1. Bins outside 0..BINS-1 return -1.
  function automatic int cand_bin(input int k, input int c);
    int j, h, o, b;
    j = c / 12;
    h = (c / 3) % 4 + 1;
    o = c % 3 - 1;
    if (j >= chan_notes(k)) return -1;
    b = (note_bin_x16(chan_note(k, j)) * h + 8) / 16 + o;
    return (b >= 0 && b < BINS) ? b : -1;
  endfunction

  // |reference|^2, the divisor of each correlation: summed over the distinct
  // candidate bins only (all other bins are zero).
  function automatic logic [DOT_W-1:0] ref_energy(input int k);
    logic [DOT_W-1:0] e;
    logic [MAG_W-1:0] m;
    int b;
    bit dup;
    e = '0;
    for (int c = 0; c < 36; c++) begin
      b = cand_bin(k, c);
      dup = (b < 0);
      for (int d = 0; d < c; d++) if (cand_bin(k, d) == b) dup = 1'b1;
      if (!dup) begin
        m = ref_mag(k, b);
        e += DOT_W'(m) * DOT_W'(m);
      end
    end
    return e;
  endfunction

  // ------------------------------------------------------------- game side
  localparam int PITCHES  = 37;   // E2 .. E5
  localparam int STRINGS  = 6;
  localparam int MAX_FRET = 17;
  localparam int TIME_W   = 16;   // song time in 10 ms ticks

  // Open-string pitch of string 1 (high E) .. string 6 (low E).
  localparam int OPEN_PITCH [STRINGS] = '{24, 19, 15, 10, 5, 0};

  typedef enum logic [1:0] {
    ST_PLAYING = 2'd0,
    ST_PAUSED  = 2'd1,
    ST_OVER    = 2'd2
  } game_state_t;

  // One metadata word as stored on the card: 16 + 6 + 3 + 5 + 2 bits.
  typedef struct packed {
    logic [15:0] t;       // time in 10 ms ticks
    logic [5:0]  pitch;   // 0..36
    logic [2:0]  str;     // 0..5 = string 1..6
    logic [4:0]  fret;    // 0..17
    logic [1:0]  eof;     // 2'b11 = end of song
  } meta_t;

  // The song: Mary Had a Little Lamb, one beat = 50 ticks, first note at 2 s.
  localparam int SONG_LEN = 26;
  localparam int SONG_PITCH [SONG_LEN] = '{24, 22, 20, 22, 24, 24, 24,
                                           22, 22, 22, 24, 27, 27,
                                           24, 22, 20, 22, 24, 24, 24, 24,
                                           22, 22, 24, 22, 20};
  localparam int SONG_BEATS [SONG_LEN] = '{1, 1, 1, 1, 1, 1, 2,
                                           1, 1, 2, 1, 1, 2,
                                           1, 1, 1, 1, 1, 1, 1, 1,
                                           1, 1, 1, 1, 4};
  localparam int SONG_START = 200;
  localparam int BEAT_TICKS = 50;

  // String used to play each song pitch (top two strings only).
  function automatic int pitch_string(input int p);
    return (p >= OPEN_PITCH[0]) ? 0 : 1;
  endfunction

  function automatic meta_t song_note(input int i);
    meta_t m;
    int t;
    t = SONG_START;
    for (int j = 0; j < i; j++) t += SONG_BEATS[j] * BEAT_TICKS;
    m.t     = 16'(t);
    m.pitch = 6'(SONG_PITCH[i]);
    m.str   = 3'(pitch_string(SONG_PITCH[i]));
    m.fret  = 5'(SONG_PITCH[i] - OPEN_PITCH[pitch_string(SONG_PITCH[i])]);
    m.eof   = (i == SONG_LEN - 1) ? 2'b11 : 2'b00;
    return m;
  endfunction

  // ----------------------------------------------------------- fret sprites
  // 3x5 digit font, rows top to bottom, 3 bits per row (MSB = left).
  localparam logic [14:0] FONT [10] = '{
    15'b111_101_101_101_111, 15'b010_110_010_010_111, 15'b111_001_111_100_111,
    15'b111_001_111_001_111, 15'b101_101_111_001_001, 15'b111_100_111_001_111,
    15'b111_100_111_101_111, 15'b111_001_001_001_001, 15'b111_101_111_101_111,
    15'b111_101_111_001_111};

  function automatic logic font_px(input int d, input int col, input int row);
    return FONT[d][14 - (row * 3 + col)];
  endfunction

  // Pixel of fret sprite f at (x, y): {alpha, RGB}. An orange disc with the
  // fret number in white.
  function automatic logic [12:0] sprite_pixel(input int f, input int x, input int y);
    int dx, dy, s, x0, y0, d;
    dx = 2 * x - 31;
    dy = 2 * y - 31;
    if (dx * dx + dy * dy > 31 * 31) return 13'h0000;
    if (f < 10) begin s = 4; x0 = 10; y0 = 6; d = f;
    end else begin
      s = 3; y0 = 8;
      if (x < 16) begin x0 = 6; d = 1; end else begin x0 = 17; d = f - 10; end
    end
    if (x >= x0 && x < x0 + 3 * s && y >= y0 && y < y0 + 5 * s &&
        font_px(d, (x - x0) / s, (y - y0) / s))
      return 13'h1FFF;
    return 13'h1F80;
  endfunction

endpackage
