// async_fifo: small dual-clock FIFO for moving words between clock domains.
//
// DEPTH words (a power of two) in a register array written on wclk. Read
// and write pointers are one bit wider than the address and cross the clock
// boundary in Gray code through two flip-flops each, so `full` (write side)
// and `empty` (read side) are conservative and never wrong. Reads are
// first-word fall-through: rdata shows the oldest word whenever empty is low,
// and rd_en pops it. Writes when full and reads when empty are ignored.
// The original design used a vendor distributed-RAM FIFO core of 16 words;
// this Gray-pointer structure is this design's own.
module async_fifo #(
  parameter int W     = 16,
  parameter int DEPTH = 16
) (
  input  logic         wclk,
  input  logic         wrst,
  input  logic         wr_en,
  input  logic [W-1:0] wdata,
  output logic         full,
  input  logic         rclk,
  input  logic         rrst,
  input  logic         rd_en,
  output logic [W-1:0] rdata,
  output logic         empty
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin, wgray, rbin, rgray;
  logic [AW:0]  rgray_w1, rgray_w2;   // read pointer seen by the write side
  logic [AW:0]  wgray_r1, wgray_r2;   // write pointer seen by the read side
  logic [AW:0]  wbin_n, rbin_n;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  assign full   = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wbin_n = wbin + (AW+1)'(wr_en && !full);

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wdata;
    if (wrst) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_n;
      wgray    <= bin2gray(wbin_n);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  // read side
  assign empty  = (rgray == wgray_r2);
  assign rdata  = mem[rbin[AW-1:0]];
  assign rbin_n = rbin + (AW+1)'(rd_en && !empty);

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_n;
      rgray    <= bin2gray(rbin_n);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end
endmodule
