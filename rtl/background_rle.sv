// background_rle: background layer drawn from a run-length compressed,
// palette-indexed image.
//
// Run table word: [7:6] = run length - 1 (1..4 pixels), [5:0] = palette
// index; runs follow the screen in raster order and continue across line
// ends. The palette maps 64 indices to 12-bit RGB. Both tables are RAMs
// filled through the load ports (on the FPGA they were initialised with the
// image at configuration).
// Decoding: the run table is read one cycle ahead. word_idx is the word
// shown now and cnt the pixels of its run already shown; the read address
// for the next cycle is word_idx + 1 when this pixel ends the run, word_idx
// otherwise, so runs of one pixel can follow each other every cycle. Outside
// the visible lines the decoder holds; during vertical blanking it rewinds to
// word 0. Latency: pixel belongs to the hcount/vcount of two cycles earlier
// (palette read + output register); black while blanked.
// The decoder state has no reset: every vertical blank rewinds it, so only
// the partial frame right after configuration can be misaligned. Both
// tables are cleared at configuration, so an unloaded image is black.
// Loading through ports instead of initialisation files is this design's
// choice; the word format and the two tables follow the original design.
module background_rle #(
  parameter int RUN_DEPTH = 262144,
  parameter int PALETTE   = 64
) (
  input  logic        clk,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic        run_we,
  input  logic [$clog2(RUN_DEPTH)-1:0] run_waddr,
  input  logic [7:0]  run_wdata,
  input  logic        pal_we,
  input  logic [$clog2(PALETTE)-1:0] pal_waddr,
  input  logic [11:0] pal_wdata,
  output logic [11:0] pixel
);
  localparam int AW = $clog2(RUN_DEPTH);

  logic [7:0]    run_mem [RUN_DEPTH];
  logic [11:0]   pal_mem [PALETTE];
  logic [7:0]    q;
  logic [AW-1:0] word_idx, addr;
  logic [1:0]    cnt;
  logic          active, vblank, advance;
  logic [11:0]   pal_q;
  logic          active_d;

  // cleared at configuration so that an unloaded table draws black
  initial for (int i = 0; i < RUN_DEPTH; i++) run_mem[i] = '0;
  initial for (int i = 0; i < PALETTE; i++) pal_mem[i] = '0;

  assign active  = (hcount < 11'd1024) && (vcount < 10'd768);
  assign vblank  = (vcount >= 10'd768);
  assign advance = active && (cnt == q[7:6]);

  always_comb begin
    if (vblank)       addr = '0;
    else if (advance) addr = word_idx + 1'b1;
    else              addr = word_idx;
  end

  always_ff @(posedge clk) begin
    if (run_we) run_mem[run_waddr] <= run_wdata;
    q <= run_mem[addr];
  end

  always_ff @(posedge clk) begin
    if (pal_we) pal_mem[pal_waddr] <= pal_wdata;
    pal_q <= pal_mem[q[5:0]];
  end

  always_ff @(posedge clk) begin
    word_idx <= addr;
    if (vblank)       cnt <= '0;
    else if (advance) cnt <= '0;
    else if (active)  cnt <= cnt + 1'b1;
    active_d <= active;
    pixel    <= active_d ? pal_q : 12'h000;
  end
endmodule
