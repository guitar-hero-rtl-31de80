// xfft_model: behavioural stand-in for the 4096-point streaming FFT core,
// for simulation only.
//
// Input: real 16-bit two's complement samples on s_tdata, always ready.
// Beats are counted; a frame ends with the FRAME-th beat. If that beat has
// no s_tlast the model pulses last_missing for one cycle; if s_tlast comes
// early it is taken as the frame end and that frame is dropped (the core's
// "unexpected last"). Either way the count restarts, so the model follows
// the feeder after a realignment, as the real core does.
// Each complete frame is transformed at once (radix-2 FFT on reals) and
// scaled by 2/FRAME, so a sine of amplitude A centred on a bin reads A in
// magnitude there. After LAT cycles the frame leaves on m_* one beat per
// cycle in bit-reversed order, m_tuser carrying the bin index and m_tlast
// the last beat; {imag, real} are 16-bit and saturate. Frames queue if they
// come faster than they leave. frames_in / frames_out count frames.
module xfft_model #(
  parameter int FRAME = 4096,
  parameter int LAT   = 20
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] s_tdata,
  input  logic        s_tvalid,
  input  logic        s_tlast,
  output logic        s_tready,
  output logic        last_missing,
  output logic [31:0] m_tdata,
  output logic [11:0] m_tuser,
  output logic        m_tvalid,
  output logic        m_tlast,
  output int          frames_in,
  output int          frames_out,
  output int          realigns
);
  localparam int LG = $clog2(FRAME);
  real  buf_re [FRAME];
  int   cnt;
  typedef logic [31:0] frame_t [FRAME];
  frame_t out_q [$];
  int   ready_at [$];
  int   cyc, beat;
  frame_t cur;
  bit   sending;

  function automatic int bitrev(input int x);
    int r = 0;
    for (int i = 0; i < LG; i++) if (x & (1 << i)) r |= 1 << (LG - 1 - i);
    return r;
  endfunction

  function automatic logic [15:0] sat16(input real x);
    if (x > 32767.0) return 16'h7FFF;
    if (x < -32768.0) return 16'h8000;
    return 16'(int'($rtoi(x >= 0.0 ? x + 0.5 : x - 0.5)));
  endfunction

  task automatic transform();
    real re [FRAME], im [FRAME];
    real wr, wi, tr, ti, ang;
    frame_t f;
    for (int i = 0; i < FRAME; i++) begin re[bitrev(i)] = buf_re[i]; im[bitrev(i)] = 0.0; end
    for (int len = 2; len <= FRAME; len *= 2)
      for (int i = 0; i < FRAME; i += len)
        for (int j = 0; j < len / 2; j++) begin
          ang = -2.0 * 3.14159265358979 * j / len;
          wr = $cos(ang); wi = $sin(ang);
          tr = re[i+j+len/2] * wr - im[i+j+len/2] * wi;
          ti = re[i+j+len/2] * wi + im[i+j+len/2] * wr;
          re[i+j+len/2] = re[i+j] - tr; im[i+j+len/2] = im[i+j] - ti;
          re[i+j] += tr; im[i+j] += ti;
        end
    // natural-order result re/im[k]; output beat b carries bin bitrev(b)
    for (int b = 0; b < FRAME; b++) begin
      int k;
      k = bitrev(b);
      f[b] = {sat16(im[k] * 2.0 / FRAME), sat16(re[k] * 2.0 / FRAME)};
    end
    out_q.push_back(f);
    ready_at.push_back(cyc + LAT);
  endtask

  assign s_tready = 1'b1;

  always @(posedge clk) begin
    if (rst) begin
      cnt <= 0; last_missing <= 1'b0; cyc <= 0; frames_in <= 0; frames_out <= 0; realigns <= 0;
      m_tvalid <= 1'b0; m_tlast <= 1'b0; m_tdata <= '0; m_tuser <= '0; sending = 0; beat = 0;
      out_q.delete(); ready_at.delete();
    end else begin
      cyc <= cyc + 1;
      last_missing <= 1'b0;
      if (s_tvalid) begin
        buf_re[cnt] = real'(signed'(s_tdata));
        if (cnt == FRAME - 1) begin
          if (!s_tlast) begin last_missing <= 1'b1; realigns <= realigns + 1; end
          else begin transform(); frames_in <= frames_in + 1; end
          cnt <= 0;
        end else if (s_tlast) begin
          realigns <= realigns + 1;
          cnt <= 0;
        end else cnt <= cnt + 1;
      end
      // output side
      m_tvalid <= 1'b0; m_tlast <= 1'b0;
      if (!sending && out_q.size() > 0 && cyc >= ready_at[0]) begin
        cur = out_q.pop_front(); void'(ready_at.pop_front());
        sending = 1; beat = 0;
      end
      if (sending) begin
        m_tvalid <= 1'b1;
        m_tdata  <= cur[beat];
        m_tuser  <= 12'(bitrev(beat));
        m_tlast  <= (beat == FRAME - 1);
        if (beat == FRAME - 1) begin sending = 0; frames_out <= frames_out + 1; end
        beat++;
      end
    end
  end
endmodule
