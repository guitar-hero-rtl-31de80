// buffer_serializer: funnels the 37 parallel match reports into one score
// update and one match event per guitar string.
//
// Each cycle, of the pitches reporting a match the highest one wins (the
// others that cycle are dropped; two matches in one 100 MHz cycle are
// practically impossible). For it the block outputs, registered:
//   score_valid, score_diff = |song_time - note time|   to the score keeper
//   str_valid[s], str_fret[s] for every string s on which the pitch can be
//   played (fret 0..MAX_FRET in standard tuning), and str_time = note time,
//   so the string renderers can find and mark the matching sprite.
module buffer_serializer
  import gh_pkg::STRINGS, gh_pkg::OPEN_PITCH, gh_pkg::MAX_FRET;
#(
  parameter int PITCHES = gh_pkg::PITCHES
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [PITCHES-1:0] match,
  input  logic [15:0]        match_time [PITCHES],
  input  logic [15:0]        song_time,
  output logic               score_valid,
  output logic [15:0]        score_diff,
  output logic [STRINGS-1:0] str_valid,
  output logic [4:0]         str_fret [STRINGS],
  output logic [15:0]        str_time
);
  logic        any;
  int          sel;
  logic [15:0] t;

  always_comb begin
    any = 1'b0;
    sel = 0;
    for (int p = 0; p < PITCHES; p++)
      if (match[p]) begin
        any = 1'b1;
        sel = p;
      end
    t = match_time[sel];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      score_valid <= 1'b0;
      score_diff  <= '0;
      str_valid   <= '0;
      str_time    <= '0;
      for (int s = 0; s < STRINGS; s++) str_fret[s] <= '0;
    end else begin
      score_valid <= any;
      score_diff  <= (song_time >= t) ? song_time - t : t - song_time;
      str_time    <= t;
      for (int s = 0; s < STRINGS; s++) begin
        str_valid[s] <= any && (sel >= OPEN_PITCH[s]) && (sel - OPEN_PITCH[s] <= MAX_FRET);
        str_fret[s]  <= 5'(sel - OPEN_PITCH[s]);
      end
    end
  end
endmodule
