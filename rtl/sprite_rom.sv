// sprite_rom: the shared table of the 18 fret sprites (frets 0..17).
//
// Each sprite is 32x32 pixels of 13 bits: bit 12 is the alpha bit (1 =
// opaque), bits 11:0 are RGB. One read at addr = {row[4:0], column[4:0]}
// returns that pixel of all 18 sprites side by side, sprite f in bits
// [13f+12 : 13f], one cycle after the address; each string renderer then
// picks its own sprite's slice. The art (an orange disc with the fret number
// in white, gh_pkg::sprite_pixel) is computed at elaboration and is this
// design's own; the original sprites were drawn by hand.
module sprite_rom #(
  parameter int SPRITES = 18,
  parameter int SIZE    = 32
) (
  input  logic                      clk,
  input  logic [2*$clog2(SIZE)-1:0] addr,
  output logic [SPRITES*13-1:0]     data
);
  logic [SPRITES*13-1:0] rom [SIZE*SIZE];
  initial
    for (int a = 0; a < SIZE * SIZE; a++)
      for (int f = 0; f < SPRITES; f++)
        rom[a][f*13 +: 13] = gh_pkg::sprite_pixel(f, a % SIZE, a / SIZE);

  always_ff @(posedge clk) data <= rom[addr];
endmodule
