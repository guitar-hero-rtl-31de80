// game_control: global song clock and game state of the game board.
//
// song_time counts 10 ms ticks (TICK_CYCLES = 1,000,000 cycles at 100 MHz)
// in 16 bits, enough for about 11 minutes. It only advances while the state
// is PLAYING. A reset press clears song_time and the tick prescaler and
// starts playing from time 0; a rising edge of the pause button toggles
// between PLAYING and PAUSED; reaching SONG_END puts the game in OVER, where
// time stops until the next reset. Buttons are expected already debounced.
// The exact transitions and SONG_END are this design's choices; the tick,
// width, pause and reset behaviour follow the original design.
module game_control
  import gh_pkg::*;
#(
  parameter int TICK_CYCLES = 1000000,
  parameter int SONG_END    = 1700
) (
  input  logic        clk,
  input  logic        btn_reset,
  input  logic        btn_pause,
  output logic [15:0] song_time,
  output game_state_t state,
  output logic        tick
);
  localparam int PW = $clog2(TICK_CYCLES);

  logic [PW-1:0] presc;
  logic          pause_d;

  always_ff @(posedge clk) begin
    if (btn_reset) begin
      presc     <= '0;
      song_time <= '0;
      state     <= ST_PLAYING;
      pause_d   <= 1'b0;
      tick      <= 1'b0;
    end else begin
      pause_d <= btn_pause;
      tick    <= 1'b0;
      unique case (state)
        ST_PLAYING: begin
          if (btn_pause && !pause_d) state <= ST_PAUSED;
          else if (song_time >= 16'(SONG_END)) state <= ST_OVER;
          else if (presc == PW'(TICK_CYCLES - 1)) begin
            presc     <= '0;
            song_time <= song_time + 1'b1;
            tick      <= 1'b1;
          end else begin
            presc <= presc + 1'b1;
          end
        end
        ST_PAUSED: if (btn_pause && !pause_d) state <= ST_PLAYING;
        ST_OVER:   ;
        default:   state <= ST_PLAYING;
      endcase
    end
  end
endmodule
