// fft_magnitude: magnitude of the complex FFT output stream.
//
// Fully pipelined, one beat per cycle, no back-pressure:
//   stage 1      re^2 and im^2 in parallel (the squaring multipliers)
//   stage 2      re^2 + im^2 (the register slice / adder)
//   stages 3..18 integer square root, one result bit per stage, MSB first
// TUSER (bin index) and TLAST travel alongside, so m_* appear IN_W + 2
// cycles after the matching s_* beat. The result is floor(sqrt(re^2+im^2)),
// which for 16-bit signed inputs fits in 16 bits.
// The original design used vendor multiplier and CORDIC square-root cores;
// the bit-by-bit root used here is this design's own.
module fft_magnitude #(
  parameter int IN_W  = 16,
  parameter int IDX_W = 12
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [2*IN_W-1:0] s_tdata,   // {imag, real}
  input  logic [IDX_W-1:0]  s_tuser,
  input  logic              s_tvalid,
  input  logic              s_tlast,
  output logic [IN_W-1:0]   m_tdata,
  output logic [IDX_W-1:0]  m_tuser,
  output logic              m_tvalid,
  output logic              m_tlast
);
  localparam int SQ_W = 2 * IN_W;       // width of re^2 + im^2
  localparam int R_W  = IN_W;           // root width
  localparam int NS   = R_W + 2;        // pipeline depth

  typedef struct packed {
    logic             valid;
    logic             last;
    logic [IDX_W-1:0] idx;
  } side_t;

  side_t                side  [NS];
  logic [SQ_W-1:0]      re_sq, im_sq;
  logic [SQ_W-1:0]      rad   [R_W+1];    // radicand per root stage
  logic [R_W-1:0]       root  [R_W+1];

  logic signed [IN_W-1:0] re_in, im_in;
  assign re_in = s_tdata[IN_W-1:0];
  assign im_in = s_tdata[2*IN_W-1:IN_W];

  always_ff @(posedge clk) begin
    // stage 1: squares
    re_sq <= SQ_W'(re_in * re_in);
    im_sq <= SQ_W'(im_in * im_in);
    // stage 2: sum
    rad[0]  <= re_sq + im_sq;
    root[0] <= '0;
    // root stages: try setting bit (R_W-1-i)
    for (int i = 0; i < R_W; i++) begin
      logic [R_W-1:0] trial;
      trial = root[i] | (R_W'(1) << (R_W - 1 - i));
      rad[i+1] <= rad[i];
      if (SQ_W'(trial) * SQ_W'(trial) <= rad[i]) root[i+1] <= trial;
      else                                       root[i+1] <= root[i];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NS; i++) side[i] <= '0;
    end else begin
      side[0] <= '{valid: s_tvalid, last: s_tlast, idx: s_tuser};
      for (int i = 1; i < NS; i++) side[i] <= side[i-1];
    end
  end

  assign m_tdata  = root[R_W];
  assign m_tuser  = side[NS-1].idx;
  assign m_tvalid = side[NS-1].valid;
  assign m_tlast  = side[NS-1].last & side[NS-1].valid;
endmodule
