// correlator: streaming dot product of the current magnitude spectrum with
// the reference spectrum of one note or chord.
//
// The reference spectrum (BINS words) sits in a ROM initialised at
// elaboration from gh_pkg::ref_mag(NOTE, bin). Each magnitude beat uses its
// bin index (TUSER) as the ROM address; one cycle later the reference word
// and the delayed magnitude enter a multiply-accumulate pipeline laid out
// like a DSP48 slice:
//   edge 0  ROM read, magnitude delayed     (beat accepted)
//   edge 1  A/B input registers
//   edge 2  M register  (16 x 16 product)
//   edge 3  P register  (accumulate)
//   edge 4  output register: dot_product, dot_product_valid for one cycle
// Only bins below BINS are accumulated (the clock enable of the original
// DSP): with the FFT's bit-reversed order that is one beat in four. The beat
// with TLAST, whatever its bin, closes the frame: four edges after it is
// accepted the sum appears on dot_product and the accumulator restarts at
// zero for the next frame. The synthetic reference contents are this
// design's own; the structure follows the original.
module correlator
#(
  parameter int NOTE  = 0,
  parameter int BINS  = gh_pkg::BINS,
  parameter int IDX_W = 12,
  parameter int ACC_W = gh_pkg::DOT_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [15:0]      mag_tdata,
  input  logic [IDX_W-1:0] mag_tuser,
  input  logic             mag_tvalid,
  input  logic             mag_tlast,
  output logic [ACC_W-1:0] dot_product,
  output logic             dot_product_valid
);
  localparam int AW = $clog2(BINS);

  logic [15:0] ref_rom [BINS];
  initial begin
    for (int i = 0; i < BINS; i++) ref_rom[i] = '0;
    for (int c = 0; c < 36; c++)
      if (gh_pkg::cand_bin(NOTE, c) >= 0 && gh_pkg::cand_bin(NOTE, c) < BINS)
        ref_rom[gh_pkg::cand_bin(NOTE, c)] = gh_pkg::ref_mag(NOTE, gh_pkg::cand_bin(NOTE, c));
  end

  // stage 0: ROM read
  logic [15:0] ref_q, mag_d;
  logic        ce0, last0;
  // stage 1: A/B
  logic [15:0] a_r, b_r;
  logic        ce1, last1;
  // stage 2: M
  logic [31:0] m_r;
  logic        ce2, last2;
  // stage 3: P
  logic [ACC_W-1:0] acc, p_frame;
  logic             last3;

  always_ff @(posedge clk) ref_q <= ref_rom[mag_tuser[AW-1:0]];

  always_ff @(posedge clk) begin
    if (rst) begin
      {ce0, last0, ce1, last1, ce2, last2, last3} <= '0;
      acc               <= '0;
      p_frame           <= '0;
      dot_product       <= '0;
      dot_product_valid <= 1'b0;
      mag_d <= '0; a_r <= '0; b_r <= '0; m_r <= '0;
    end else begin
      mag_d <= mag_tdata;
      ce0   <= mag_tvalid && (mag_tuser < IDX_W'(BINS));
      last0 <= mag_tvalid && mag_tlast;

      a_r   <= mag_d;
      b_r   <= ref_q;
      ce1   <= ce0;
      last1 <= last0;

      m_r   <= 32'(a_r) * 32'(b_r);
      ce2   <= ce1;
      last2 <= last1;

      last3 <= last2;
      if (last2) begin
        p_frame <= acc + (ce2 ? ACC_W'(m_r) : '0);
        acc     <= '0;
      end else if (ce2) begin
        acc <= acc + ACC_W'(m_r);
      end

      dot_product_valid <= last3;
      if (last3) dot_product <= p_frame;
    end
  end
endmodule
