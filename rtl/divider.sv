// divider: fully pipelined unsigned divider producing a saturated Q_W-bit
// fixed-point quotient  q = min((dividend << FRAC) / divisor, 2^Q_W - 1).
//
// One new division may enter every cycle. Stage 0 forms the shifted
// dividend and checks for overflow (quotient would not fit, or divisor 0);
// stages 1..Q_W each decide one quotient bit by restoring division, MSB
// first; the remaining stages are plain delay so that the total latency is
// LATENCY cycles, the latency of the divider core the original design used.
// A tag (here the note index) travels with each operand pair.
// The restoring algorithm, the Q8.8 format and saturation are this design's
// choices; the original design gives only the core's function and latency.
module divider #(
  parameter int LATENCY = 46,
  parameter int N_W     = 42,
  parameter int D_W     = 42,
  parameter int FRAC    = 8,
  parameter int Q_W     = 16,
  parameter int TAG_W   = 6
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [N_W-1:0]   dividend,
  input  logic [D_W-1:0]   divisor,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [Q_W-1:0]   quotient,
  output logic [TAG_W-1:0] out_tag
);
  localparam int R_W   = N_W + FRAC;           // shifted dividend width
  // working width: holds both the shifted dividend and divisor << Q_W
  localparam int X_W   = ((R_W > D_W + Q_W) ? R_W : D_W + Q_W) + 1;
  localparam int DIV_S = Q_W + 1;              // stages doing work
  localparam int PAD   = LATENCY - DIV_S;      // delay stages

  typedef struct packed {
    logic             valid;
    logic             sat;
    logic [TAG_W-1:0] tag;
    logic [X_W-1:0]   rem;
    logic [D_W-1:0]   den;
    logic [Q_W-1:0]   q;
  } stage_t;

  stage_t st [DIV_S];

  always_ff @(posedge clk) begin
    // stage 0: shift and overflow check
    st[0].valid <= in_valid && !rst;
    st[0].tag   <= in_tag;
    st[0].rem   <= X_W'({dividend, FRAC'(0)});
    st[0].den   <= divisor;
    st[0].q     <= '0;
    st[0].sat   <= (divisor == '0) ||
                   (X_W'({dividend, FRAC'(0)}) >= (X_W'(divisor) << Q_W));
    for (int i = 1; i < DIV_S; i++) begin
      st[i] <= st[i-1];
      st[i].valid <= st[i-1].valid && !rst;
      if (st[i-1].rem >= (X_W'(st[i-1].den) << (Q_W - i))) begin
        st[i].rem <= st[i-1].rem - (X_W'(st[i-1].den) << (Q_W - i));
        st[i].q   <= st[i-1].q | (Q_W'(1) << (Q_W - i));
      end
    end
  end

  // result of the last working stage, then PAD delay stages
  logic [Q_W+TAG_W:0] res;
  assign res = {st[DIV_S-1].valid,
                st[DIV_S-1].sat ? {Q_W{1'b1}} : st[DIV_S-1].q,
                st[DIV_S-1].tag};

  generate
    if (PAD > 0) begin : g_pad
      logic [Q_W+TAG_W:0] dly [PAD];
      always_ff @(posedge clk) begin
        dly[0] <= rst ? '0 : res;
        for (int i = 1; i < PAD; i++) dly[i] <= rst ? '0 : dly[i-1];
      end
      assign {out_valid, quotient, out_tag} = dly[PAD-1];
    end else begin : g_nopad
      assign {out_valid, quotient, out_tag} = res;
    end
  endgenerate
endmodule
