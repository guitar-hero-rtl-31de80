// bram_to_fft: frame storage and AXI-Stream feeder for the FFT core.
//
// A FRAME-word circular buffer (one block RAM per 2048 words on the FPGA) is
// written at address HEAD by every oversampled sample; HEAD then advances, so
// it always points at the oldest sample. Each write also starts the
// transfer of a complete frame to the FFT core: words HEAD, HEAD+1, ... are
// read out of the synchronous RAM and offered on m_tdata with m_tvalid; the
// address moves on only when m_tready accepts a beat (normally every cycle).
// m_tlast is raised on the FRAME-th beat (after FRAME-1 accepted transfers).
// If the core reports last_missing (it counted a frame end we did not mark)
// the feeder drops the frame in progress and restarts it from HEAD so that
// both sides agree on where a frame begins again.
// Timing: one priming cycle after the write, then one beat per accepted cycle.
// A sample written during a transfer queues one more transfer; this and the
// restart-from-HEAD reading of "realign" are this design's choices.
module bram_to_fft #(
  parameter int FRAME = 4096,
  parameter int W     = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] sample,
  input  logic         sample_valid,
  output logic [W-1:0] m_tdata,
  output logic         m_tvalid,
  output logic         m_tlast,
  input  logic         m_tready,
  input  logic         last_missing
);
  localparam int AW = $clog2(FRAME);

  typedef enum logic [1:0] {S_IDLE, S_PRIME, S_SEND} state_t;
  state_t state;

  logic [W-1:0]  mem [FRAME];
  logic [AW-1:0] head, rd_ptr, rd_addr;
  logic [AW-1:0] beat;
  logic          pending;
  logic          fire;

  assign fire     = (state == S_SEND) && m_tready;
  assign m_tvalid = (state == S_SEND);
  assign m_tlast  = (state == S_SEND) && (beat == AW'(FRAME - 1));
  // address of the word to show in the next cycle
  assign rd_addr  = (state == S_SEND && fire) ? rd_ptr + 1'b1 : rd_ptr;

  always_ff @(posedge clk) begin
    if (sample_valid) mem[head] <= sample;
    m_tdata <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      head    <= '0;
      rd_ptr  <= '0;
      beat    <= '0;
      pending <= 1'b0;
    end else begin
      if (sample_valid) head <= head + 1'b1;
      unique case (state)
        S_IDLE: begin
          if (sample_valid || pending) begin
            state   <= S_PRIME;
            pending <= 1'b0;
          end
          rd_ptr <= sample_valid ? head + 1'b1 : head;
        end
        S_PRIME: begin
          // the RAM now presents the word at rd_ptr
          if (sample_valid) pending <= 1'b1;
          state <= S_SEND;
          beat  <= '0;
        end
        S_SEND: begin
          if (sample_valid) pending <= 1'b1;
          if (last_missing) begin
            state  <= S_PRIME;
            rd_ptr <= sample_valid ? head + 1'b1 : head;
            beat   <= '0;
          end else if (fire) begin
            rd_ptr <= rd_ptr + 1'b1;
            beat   <= beat + 1'b1;
            if (beat == AW'(FRAME - 1)) state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
