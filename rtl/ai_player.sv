// ai_player: automatic "guitar player" for testing the scoring and graphics
// without the audio board.
//
// While enabled it walks through pitches 0..PITCHES-1, raising one bit of
// `notes` for a single clock cycle each, so every pitch sees a rising edge
// once every PITCHES cycles and no note is ever missed (it plays each note as
// early as the matching window allows). Output is registered; disabled, it
// outputs zeros and restarts from pitch 0.
module ai_player #(
  parameter int PITCHES = 37
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               enable,
  output logic [PITCHES-1:0] notes
);
  localparam int PW = $clog2(PITCHES);
  logic [PW-1:0] idx;

  always_ff @(posedge clk) begin
    if (rst || !enable) begin
      idx   <= '0;
      notes <= '0;
    end else begin
      notes      <= '0;
      notes[idx] <= 1'b1;
      idx        <= (idx == PW'(PITCHES - 1)) ? '0 : idx + 1'b1;
    end
  end
endmodule
