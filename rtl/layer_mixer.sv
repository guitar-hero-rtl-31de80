// layer_mixer: combines the game graphics layers by priority.
//
// From bottom to top: background (always opaque), strings 6..1 (13-bit
// pixels whose bit 12 is the alpha bit), and the pause effect, which inverts
// every colour of the finished picture while the game is paused. Sprites of
// different strings never overlap, so the order among strings only matters
// in theory (string 1 wins). The output is registered (one cycle).
module layer_mixer #(
  parameter int N_LAYERS = 6
) (
  input  logic        clk,
  input  logic [11:0] bg,
  input  logic [12:0] layers [N_LAYERS],
  input  logic        paused,
  input  logic        blank,
  output logic [11:0] pixel
);
  logic [11:0] mix;

  always_comb begin
    mix = bg;
    for (int i = N_LAYERS - 1; i >= 0; i--)
      if (layers[i][12]) mix = layers[i][11:0];
    if (paused) mix = ~mix;
  end

  always_ff @(posedge clk) pixel <= blank ? 12'h000 : mix;
endmodule
