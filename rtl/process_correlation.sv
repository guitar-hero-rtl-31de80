// process_correlation: per-note post-processing of the correlation index in
// the video clock domain.
//
// 1. Whenever its FIFO is not empty it pops one correlation (Q8.8).
// 2. Exponential moving average with alpha = 1/2^ALPHA_SHIFT (1/32):
//      acc <= acc - acc/32 + latest,   filtered = acc/32
//    which is  filtered' = alpha*latest + (1-alpha)*filtered  kept with
//    ALPHA_SHIFT extra fraction bits. The update lands the cycle after the pop.
// 3. Hysteresis: the note turns active when filtered > th_on and inactive
//    when filtered < th_off.
// 4. Calibration: while cal_sel is high, a cal_inc / cal_dec pulse moves the
//    upper (cal_upper = 1) or lower threshold by TH_STEP.
// 5. Video: the note owns lines NOTE*ROW_H .. NOTE*ROW_H+ROW_H-2 of the
//    screen; there it draws a green bar `filtered` pixels long (clamped to
//    1023) and one-pixel red / blue markers at th_on / th_off. Other pixels
//    are black so the 48 outputs can be OR-ed. The pixel is registered and
//    belongs to the hcount/vcount of the previous cycle.
// Threshold defaults, step size and screen layout are this design's choices.
module process_correlation #(
  parameter int NOTE        = 0,
  parameter int ALPHA_SHIFT = 5,
  parameter int TH_ON       = 192,
  parameter int TH_OFF      = 128,
  parameter int TH_STEP     = 4,
  parameter int ROW_H       = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        fifo_empty,
  input  logic [15:0] fifo_data,
  output logic        fifo_rd,
  input  logic        cal_sel,
  input  logic        cal_upper,
  input  logic        cal_inc,
  input  logic        cal_dec,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  output logic        active,
  output logic        updated,
  output logic [15:0] filtered,
  output logic [15:0] th_on,
  output logic [15:0] th_off,
  output logic [11:0] pixel
);
  localparam int ACC_W = 16 + ALPHA_SHIFT;

  logic [ACC_W-1:0] acc, acc_next;
  logic [15:0]      filt_next;

  assign fifo_rd   = !fifo_empty;
  assign acc_next  = acc - (acc >> ALPHA_SHIFT) + ACC_W'(fifo_data);
  assign filt_next = 16'(acc_next >> ALPHA_SHIFT);
  assign filtered  = 16'(acc >> ALPHA_SHIFT);

  always_ff @(posedge clk) begin
    if (rst) begin
      acc     <= '0;
      active  <= 1'b0;
      updated <= 1'b0;
      th_on   <= 16'(TH_ON);
      th_off  <= 16'(TH_OFF);
    end else begin
      updated <= 1'b0;
      if (!fifo_empty) begin
        acc     <= acc_next;
        updated <= 1'b1;
        if (filt_next > th_on)       active <= 1'b1;
        else if (filt_next < th_off) active <= 1'b0;
      end
      if (cal_sel) begin
        if (cal_upper) begin
          if (cal_inc)      th_on <= th_on + 16'(TH_STEP);
          else if (cal_dec) th_on <= th_on - 16'(TH_STEP);
        end else begin
          if (cal_inc)      th_off <= th_off + 16'(TH_STEP);
          else if (cal_dec) th_off <= th_off - 16'(TH_STEP);
        end
      end
    end
  end

  // bar chart row
  logic [15:0] bar;
  logic        in_row;
  assign bar    = (filtered > 16'd1023) ? 16'd1023 : filtered;
  assign in_row = (32'(vcount) / ROW_H == NOTE) && (32'(vcount) % ROW_H != ROW_H - 1)
                  && (hcount < 11'd1024);

  always_ff @(posedge clk) begin
    if (!in_row)                          pixel <= 12'h000;
    else if (16'(hcount) == th_on)        pixel <= 12'hF00;
    else if (16'(hcount) == th_off)       pixel <= 12'h00F;
    else if (16'(hcount) < bar)           pixel <= active ? 12'h0F0 : 12'h080;
    else                                  pixel <= 12'h000;
  end
endmodule
