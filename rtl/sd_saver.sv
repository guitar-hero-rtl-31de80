// sd_saver: copies the 1024-word magnitude spectrum to the SD card so that
// reference spectra can be recorded from a real guitar.
//
// A spectrum is 2048 bytes, four 512-byte sectors. Slot s (0..63) occupies
// sectors 4s..4s+3; sd_addr is the byte address of the sector (sector*512).
// On `start` with the controller ready, the saver raises `active` (which
// blocks writes into the spectrum memory it reads) and for each quarter of
// the spectrum: pulses sd_wr for one cycle, then streams the quarter's 256
// words as 512 bytes, high byte first. The controller's
// sd_ready_for_next_byte is high for several cycles per byte: the current
// byte is held on sd_din while it is high and the saver moves to the next
// byte when it falls. After 512 bytes it waits for sd_ready before the next
// sector; after the fourth, active drops. The spectrum memory is read with
// one cycle of latency (raddr -> rdata).
// Byte order, address formula and the falling-edge byte advance are this
// design's choices; the sector split, slot count and active flag follow the
// original design.
module sd_saver #(
  parameter int WORDS        = 1024,
  parameter int SECTOR_BYTES = 512
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [5:0]  slot,
  output logic [$clog2(WORDS)-1:0] raddr,
  input  logic [15:0] rdata,
  output logic [31:0] sd_addr,
  output logic        sd_wr,
  output logic [7:0]  sd_din,
  input  logic        sd_ready_for_next_byte,
  input  logic        sd_ready,
  output logic        active
);
  localparam int SECTORS = WORDS * 2 / SECTOR_BYTES;
  localparam int BW      = $clog2(SECTOR_BYTES);
  localparam int SCW     = $clog2(SECTORS);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_BYTES, S_WAIT} state_t;
  state_t state;

  logic [SCW-1:0] sector;
  logic [BW-1:0]  byte_idx;
  logic           rfnb_d;
  logic [5:0]     slot_r;

  assign active  = (state != S_IDLE);
  assign raddr   = {sector, byte_idx[BW-1:1]};
  assign sd_din  = byte_idx[0] ? rdata[7:0] : rdata[15:8];
  assign sd_addr = (32'(slot_r) * SECTORS + 32'(sector)) * SECTOR_BYTES;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      sector   <= '0;
      byte_idx <= '0;
      rfnb_d   <= 1'b0;
      sd_wr    <= 1'b0;
      slot_r   <= '0;
    end else begin
      rfnb_d <= sd_ready_for_next_byte;
      sd_wr  <= 1'b0;
      unique case (state)
        S_IDLE: if (start && sd_ready) begin
          slot_r   <= slot;
          sector   <= '0;
          byte_idx <= '0;
          state    <= S_REQ;
        end
        S_REQ: if (sd_ready) begin
          sd_wr <= 1'b1;
          state <= S_BYTES;
        end
        S_BYTES: if (rfnb_d && !sd_ready_for_next_byte) begin
          byte_idx <= byte_idx + 1'b1;
          if (byte_idx == BW'(SECTOR_BYTES - 1)) state <= S_WAIT;
        end
        S_WAIT: if (sd_ready && !sd_wr) begin
          if (sector == SCW'(SECTORS - 1)) state <= S_IDLE;
          else begin
            sector <= sector + 1'b1;
            state  <= S_REQ;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
