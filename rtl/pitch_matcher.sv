// pitch_matcher: keeps the two notes of one pitch nearest to "now" and
// decides, when the player plays that pitch, which of them was meant.
//
// Slots: `past` (the latest note time already gone by) and `future` (the
// next note time not yet reached). When song_time passes the future note it
// moves into past and the future slot becomes empty. An empty future slot
// raises req towards the metadata controller; when avail pulses the new time
// is taken from time_bus (time_ok = 0 means the pitch has no more notes and
// no further requests are made).
// A trigger (rising edge of this pitch in the active-note vector) compares
// |song_time - past| and |song_time - future| and picks the closer note. If
// it lies within WINDOW ticks it is reported on match_time with a one-cycle
// `match` pulse (the cycle after the trigger) and that slot is emptied so
// the note cannot score twice; otherwise nothing happens.
// The window and consuming a matched past note are this design's choices.
module pitch_matcher #(
  parameter int WINDOW = 100
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] song_time,
  input  logic        trigger,
  output logic        req,
  input  logic        avail,
  input  logic [15:0] time_bus,
  input  logic        time_ok,
  output logic        match,
  output logic [15:0] match_time
);
  logic [15:0] past_t, fut_t;
  logic        past_v, fut_v, done;
  logic [16:0] d_past, d_fut;

  always_comb begin
    d_past = past_v ? {1'b0, song_time - past_t} : 17'h1FFFF;
    if (!fut_v)                  d_fut = 17'h1FFFF;
    else if (fut_t >= song_time) d_fut = {1'b0, fut_t - song_time};
    else                         d_fut = {1'b0, song_time - fut_t};
  end

  assign req = !fut_v && !done;

  always_ff @(posedge clk) begin
    if (rst) begin
      past_t <= '0; fut_t <= '0;
      past_v <= 1'b0; fut_v <= 1'b0; done <= 1'b0;
      match  <= 1'b0; match_time <= '0;
    end else begin
      match <= 1'b0;
      if (avail) begin
        if (time_ok) begin
          fut_t <= time_bus;
          fut_v <= 1'b1;
        end else begin
          done <= 1'b1;
        end
      end else if (trigger && (d_fut <= d_past) && d_fut <= 17'(WINDOW)) begin
        match      <= 1'b1;
        match_time <= fut_t;
        fut_v      <= 1'b0;
      end else if (trigger && d_past < d_fut && d_past <= 17'(WINDOW)) begin
        match      <= 1'b1;
        match_time <= past_t;
        past_v     <= 1'b0;
      end else if (fut_v && song_time > fut_t) begin
        past_t <= fut_t;
        past_v <= 1'b1;
        fut_v  <= 1'b0;
      end
    end
  end
endmodule
