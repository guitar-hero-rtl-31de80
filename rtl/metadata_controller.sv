// metadata_controller: serves song metadata to the 37 pitch matchers.
//
// The song (gh_pkg::song_note, Mary Had a Little Lamb) is held in a small
// ROM of 32-bit metadata words in time order. Each pitch has a read pointer.
// A pitch matcher that needs its next note raises req[p]. The controller
// polls the request lines round-robin, one pitch per cycle; for a request it
// scans the song from that pitch's pointer, one entry per cycle, to the next
// note of that pitch, then drives its time on time_bus with time_ok = 1 (or
// time_ok = 0 when the pitch has no notes left) and pulses avail[p] for one
// cycle. time_bus/time_ok hold until the next answer. One idle cycle follows
// each answer so the matcher can drop its request.
// Polling order and scan-per-cycle are this design's choices; the
// request/available handshake and the shared 16-bit time bus follow the
// original design.
module metadata_controller
  import gh_pkg::SONG_LEN, gh_pkg::meta_t;
#(
  parameter int PITCHES = gh_pkg::PITCHES
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [PITCHES-1:0] req,
  output logic [PITCHES-1:0] avail,
  output logic [15:0]        time_bus,
  output logic               time_ok
);
  localparam int PW = $clog2(PITCHES);
  localparam int IW = $clog2(SONG_LEN + 1);

  meta_t song_rom [SONG_LEN];
  initial for (int i = 0; i < SONG_LEN; i++) song_rom[i] = gh_pkg::song_note(i);

  typedef enum logic [1:0] {S_POLL, S_SCAN, S_HOLD} state_t;
  state_t state;

  logic [PW-1:0] cur;
  logic [IW-1:0] ptr [PITCHES];
  logic [IW-1:0] idx;
  meta_t         entry;

  assign entry = song_rom[idx < IW'(SONG_LEN) ? idx : '0];

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_POLL;
      cur      <= '0;
      idx      <= '0;
      avail    <= '0;
      time_bus <= '0;
      time_ok  <= 1'b0;
      for (int p = 0; p < PITCHES; p++) ptr[p] <= '0;
    end else begin
      avail <= '0;
      unique case (state)
        S_POLL: begin
          if (req[cur]) begin
            idx   <= ptr[cur];
            state <= S_SCAN;
          end else begin
            cur <= (cur == PW'(PITCHES - 1)) ? '0 : cur + 1'b1;
          end
        end
        S_SCAN: begin
          if (idx >= IW'(SONG_LEN)) begin
            time_ok    <= 1'b0;
            avail[cur] <= 1'b1;
            ptr[cur]   <= idx;
            state      <= S_HOLD;
          end else if (entry.pitch == 6'(cur)) begin
            time_bus   <= entry.t;
            time_ok    <= 1'b1;
            avail[cur] <= 1'b1;
            ptr[cur]   <= idx + 1'b1;
            state      <= S_HOLD;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        S_HOLD: begin
          cur   <= (cur == PW'(PITCHES - 1)) ? '0 : cur + 1'b1;
          state <= S_POLL;
        end
        default: state <= S_POLL;
      endcase
    end
  end
endmodule
