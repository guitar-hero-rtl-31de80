// scoring_unit: the matching and scoring block of the game board.
//
// The active-note vector (one bit per pitch) is compared with its value one
// cycle earlier so that only rising edges trigger matches. Each of the
// PITCHES pitch matchers owns the notes of its pitch, fetched on request from
// the shared metadata controller. Their match reports go through the
// buffer-serializer, which drives the score keeper and the per-string match
// events for the graphics. Latency from a rising edge to the score update:
// 1 cycle (edge) + 1 (matcher) + 1 (buffer-serializer) + 1 (score).
module scoring_unit
  import gh_pkg::STRINGS;
#(
  parameter int PITCHES = gh_pkg::PITCHES,
  parameter int WINDOW  = 100
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [PITCHES-1:0] notes,
  input  logic [15:0]        song_time,
  output logic [15:0]        score,
  output logic               score_event,
  output logic [STRINGS-1:0] str_valid,
  output logic [4:0]         str_fret [STRINGS],
  output logic [15:0]        str_time
);
  logic [PITCHES-1:0] notes_d, trig, req, avail, match;
  logic [15:0]        match_time [PITCHES];
  logic [15:0]        time_bus;
  logic               time_ok;
  logic               sv;
  logic [15:0]        sdiff;

  always_ff @(posedge clk) notes_d <= rst ? '0 : notes;
  assign trig = notes & ~notes_d;

  metadata_controller #(.PITCHES(PITCHES)) u_meta (
    .clk(clk), .rst(rst), .req(req), .avail(avail), .time_bus(time_bus), .time_ok(time_ok));

  for (genvar p = 0; p < PITCHES; p++) begin : g_pitch
    pitch_matcher #(.WINDOW(WINDOW)) u_pm (
      .clk(clk), .rst(rst), .song_time(song_time), .trigger(trig[p]),
      .req(req[p]), .avail(avail[p]), .time_bus(time_bus), .time_ok(time_ok),
      .match(match[p]), .match_time(match_time[p]));
  end

  buffer_serializer #(.PITCHES(PITCHES)) u_bs (
    .clk(clk), .rst(rst), .match(match), .match_time(match_time), .song_time(song_time),
    .score_valid(sv), .score_diff(sdiff),
    .str_valid(str_valid), .str_fret(str_fret), .str_time(str_time));

  score_keeper #(.SCORE_W(16)) u_score (
    .clk(clk), .rst(rst), .valid(sv), .diff(sdiff), .score(score));

  assign score_event = sv;
endmodule
