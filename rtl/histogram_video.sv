// histogram_video: draws the stored spectrum as a histogram, one pixel
// column per FFT bin across a 1024x768 screen.
//
// For pixel (hcount, vcount) the spectrum word at address hcount is read
// (raddr, data back one cycle later); the pixel is white when vcount is less
// than the magnitude shifted right by SHIFT (7, so full scale is 512 lines),
// black otherwise. Bars therefore grow downward from the top line, which is
// the comparison the original design describes. Columns at or beyond 1024 are
// black. The pixel is registered: it belongs to the hcount/vcount presented
// two cycles earlier.
module histogram_video #(
  parameter int SHIFT = 7
) (
  input  logic        clk,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  output logic [9:0]  raddr,
  input  logic [15:0] rdata,
  output logic [11:0] pixel
);
  logic [9:0] vcount_d;
  logic       in_range_d;
  logic [15:0] height;

  assign raddr  = hcount[9:0];
  assign height = rdata >> SHIFT;

  always_ff @(posedge clk) begin
    vcount_d   <= vcount;
    in_range_d <= (hcount < 11'd1024);
    pixel      <= (in_range_d && 16'(vcount_d) < height) ? 12'hFFF : 12'h000;
  end
endmodule
