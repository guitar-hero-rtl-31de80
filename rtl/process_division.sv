// process_division: turns the 48 dot products of one FFT frame into 48
// correlation indices with a single pipelined divider.
//
//   correlation[k] = (dot_product[k] << 8) / |reference k|^2   (Q8.8)
//
// When dot_valid arrives (all correlators finish in the same cycle) the dot
// products are latched and a counter feeds them, one per cycle, into the
// divider together with the precomputed divisor of that channel and its index
// as tag. Results come back LATENCY cycles later in the same order and are
// written into the output array by tag; when the last one is written,
// corr_valid pulses for one cycle. Total time: N + LATENCY + 1 cycles from
// dot_valid to corr_valid. Divisors come from gh_pkg::ref_energy(), the same
// synthetic reference spectra the correlators hold.
module process_division
  import gh_pkg::*;
#(
  parameter int N       = gh_pkg::N_CORR,
  parameter int LATENCY = 46
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DOT_W-1:0]  dot_product [N],
  input  logic              dot_valid,
  output logic [CORR_W-1:0] corr [N],
  output logic              corr_valid
);
  localparam int IW = $clog2(N + 1);

  // divisor table: one constant per channel
  logic [DOT_W-1:0] divisor_rom [N];
  for (genvar k = 0; k < N; k++) begin : g_divisor
    localparam logic [DOT_W-1:0] ENERGY = gh_pkg::ref_energy(k);
    assign divisor_rom[k] = ENERGY;
  end

  logic [DOT_W-1:0] held [N];
  logic [IW-1:0]    idx;
  logic             busy;

  logic              d_valid;
  logic [CORR_W-1:0] d_q;
  logic [5:0]        d_tag;

  divider #(
    .LATENCY(LATENCY), .N_W(DOT_W), .D_W(DOT_W), .FRAC(CORR_FRAC),
    .Q_W(CORR_W), .TAG_W(6)
  ) u_div (
    .clk      (clk),
    .rst      (rst),
    .in_valid (busy),
    .dividend (held[idx[5:0]]),
    .divisor  (divisor_rom[idx[5:0]]),
    .in_tag   (idx[5:0]),
    .out_valid(d_valid),
    .quotient (d_q),
    .out_tag  (d_tag)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      busy       <= 1'b0;
      idx        <= '0;
      corr_valid <= 1'b0;
      for (int k = 0; k < N; k++) corr[k] <= '0;
    end else begin
      corr_valid <= 1'b0;
      if (dot_valid && !busy) begin
        for (int k = 0; k < N; k++) held[k] <= dot_product[k];
        busy <= 1'b1;
        idx  <= '0;
      end else if (busy) begin
        if (idx == IW'(N - 1)) busy <= 1'b0;
        idx <= idx + 1'b1;
      end
      if (d_valid) begin
        corr[d_tag] <= d_q;
        if (d_tag == 6'(N - 1)) corr_valid <= 1'b1;
      end
    end
  end
endmodule
