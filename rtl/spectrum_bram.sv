// spectrum_bram: dual-clock store of the latest magnitude spectrum.
//
// Write side (FFT clock): the magnitude stream writes word m_tuser whenever a
// beat is valid, its bin index is below DEPTH (the bins under ~1 kHz) and
// block_write is low (the SD saver holds it high while copying). Because the
// index comes with each beat, the FFT's bit-reversed output order does not
// matter. Read side (any clock): registered read, data one cycle after raddr.
// Two instances are used: one for the histogram video, one for the SD saver.
module spectrum_bram #(
  parameter int DEPTH = 1024,
  parameter int W     = 16,
  parameter int IDX_W = 12
) (
  input  logic                     wclk,
  input  logic [W-1:0]             mag_tdata,
  input  logic [IDX_W-1:0]         mag_tuser,
  input  logic                     mag_tvalid,
  input  logic                     block_write,
  input  logic                     rclk,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge wclk)
    if (mag_tvalid && !block_write && mag_tuser < IDX_W'(DEPTH))
      mem[mag_tuser[$clog2(DEPTH)-1:0]] <= mag_tdata;

  always_ff @(posedge rclk)
    rdata <= mem[raddr];
endmodule
