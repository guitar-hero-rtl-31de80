// xvga: 1024x768 at 60 Hz video timing from a 65 MHz pixel clock.
//
// hcount runs 0..1343 (1024 visible, 24 front porch, 136 sync, 160 back
// porch), vcount 0..805 (768 visible, 3 front porch, 6 sync, 29 back
// porch). hsync and vsync are active low (VESA DMT); blank is high outside
// the visible area. All outputs change on the same clock edge; the
// drawing modules see (hcount, vcount) and answer with their own latency.
// The standard VESA timing is this design's choice.
module xvga #(
  parameter int H_ACTIVE = 1024, parameter int H_FP = 24, parameter int H_SYNC = 136, parameter int H_BP = 160,
  parameter int V_ACTIVE = 768,  parameter int V_FP = 3,  parameter int V_SYNC = 6,   parameter int V_BP = 29
) (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        blank
);
  localparam int H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
    end else if (hcount == 11'(H_TOTAL - 1)) begin
      hcount <= '0;
      vcount <= (vcount == 10'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
    end else begin
      hcount <= hcount + 1'b1;
    end
  end

  assign hsync = !((hcount >= 11'(H_ACTIVE + H_FP)) && (hcount < 11'(H_ACTIVE + H_FP + H_SYNC)));
  assign vsync = !((vcount >= 10'(V_ACTIVE + V_FP)) && (vcount < 10'(V_ACTIVE + V_FP + V_SYNC)));
  assign blank = (hcount >= 11'(H_ACTIVE)) || (vcount >= 10'(V_ACTIVE));
endmodule
