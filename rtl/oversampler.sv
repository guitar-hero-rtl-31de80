// oversampler: turns the 1 MSPS 12-bit XADC stream into a ~3.9 kSPS 16-bit
// stream by summing OVERSAMPLE consecutive conversions.
//
// Every cycle with eoc high adds adc_data to an accumulator. On the
// OVERSAMPLE-th conversion the full sum (20 bits for 256 x 12 bits) is
// shifted right so that OUT_W bits remain (4 extra bits of precision for
// 256x, as the averaging gains sqrt(256) = 16 in SNR; a smaller OVERSAMPLE,
// used only to shorten simulations, shifts left instead), presented on `sample`
// and flagged by a one-cycle `done` strobe in the cycle after that eoc.
// With eoc every 104 cycles, done comes once per 26,624 cycles.
// The sum-and-shift form and the unsigned input code are this design's
// choices; the rate and widths follow the original design.
module oversampler #(
  parameter int OVERSAMPLE = 256,
  parameter int IN_W       = 12,
  parameter int OUT_W      = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             eoc,
  input  logic [IN_W-1:0]  adc_data,
  output logic [OUT_W-1:0] sample,
  output logic             done
);
  localparam int CNT_W = $clog2(OVERSAMPLE);
  localparam int SUM_W = IN_W + CNT_W;

  logic [SUM_W-1:0] acc;
  logic [CNT_W-1:0] cnt;
  logic [SUM_W-1:0] sum_next;

  assign sum_next = acc + SUM_W'(adc_data);

  always_ff @(posedge clk) begin
    if (rst) begin
      acc    <= '0;
      cnt    <= '0;
      done   <= 1'b0;
      sample <= '0;
    end else begin
      done <= 1'b0;
      if (eoc) begin
        if (cnt == CNT_W'(OVERSAMPLE - 1)) begin
          if (SUM_W >= OUT_W) sample <= OUT_W'(sum_next >> (SUM_W - OUT_W));
          else                sample <= OUT_W'(sum_next) << (OUT_W - SUM_W);
          done   <= 1'b1;
          acc    <= '0;
          cnt    <= '0;
        end else begin
          acc <= sum_next;
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
