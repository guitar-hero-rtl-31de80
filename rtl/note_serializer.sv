// note_serializer: sends the active-note vector to the game board over two
// wires, slowly enough to survive ~70 cm of unterminated cable.
//
// A packet is SEGMENTS time segments of SEG_CYCLES clock cycles each
// (64 x 8192 = 524,288 cycles, ~5.2 ms at 100 MHz). ser_data during segment
// i is bit i of the vector latched at the start of the packet for i < NOTES
// and 0 for the unused segments; ser_sync is high during the last segment,
// marking the end of the packet. packet_start pulses in the first cycle of
// each packet (the latch moment). Outputs are registered.
// Latching at the packet start and the whole-segment sync pulse are this
// design's reading of the original description.
module note_serializer #(
  parameter int NOTES      = 48,
  parameter int SEGMENTS   = 64,
  parameter int SEG_CYCLES = 8192
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [NOTES-1:0] notes,
  output logic             ser_data,
  output logic             ser_sync,
  output logic             packet_start
);
  localparam int CW = $clog2(SEG_CYCLES);
  localparam int SW = $clog2(SEGMENTS);

  logic [CW-1:0]    cyc;
  logic [SW-1:0]    seg;
  logic [NOTES-1:0] latched;

  always_ff @(posedge clk) begin
    if (rst) begin
      cyc          <= '0;
      seg          <= '0;
      latched      <= '0;
      ser_data     <= 1'b0;
      ser_sync     <= 1'b0;
      packet_start <= 1'b0;
    end else begin
      packet_start <= (cyc == '0) && (seg == '0);
      if (cyc == '0 && seg == '0) latched <= notes;
      if (cyc == CW'(SEG_CYCLES - 1)) begin
        cyc <= '0;
        seg <= (seg == SW'(SEGMENTS - 1)) ? '0 : seg + 1'b1;
      end else begin
        cyc <= cyc + 1'b1;
      end
      // registered outputs for the current (seg, cyc)
      if (cyc == '0 && seg == '0)         ser_data <= notes[0];
      else if (32'(seg) < NOTES)          ser_data <= latched[seg];
      else                                ser_data <= 1'b0;
      ser_sync <= (seg == SW'(SEGMENTS - 1));
    end
  end
endmodule
