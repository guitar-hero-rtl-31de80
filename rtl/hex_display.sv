// hex_display: multiplexed eight-digit seven-segment display of a 32-bit
// value in hexadecimal (score in the upper four digits, song time in the
// lower four on the game board).
//
// A free-running counter selects one digit every DIGIT_CYCLES cycles; `an`
// enables that digit (active low) and `seg` shows its segments gfedcba
// (active low), as on the Nexys 4 board. Outputs are registered.
module hex_display #(
  parameter int DIGIT_CYCLES = 65536
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] value,
  output logic [6:0]  seg,
  output logic [7:0]  an
);
  localparam int CW = $clog2(DIGIT_CYCLES);

  logic [CW-1:0] cnt;
  logic [2:0]    digit;
  logic [3:0]    nib;
  logic [6:0]    seg_on;   // active high gfedcba

  assign nib = value[digit*4 +: 4];

  always_comb begin
    unique case (nib)
      4'h0: seg_on = 7'b0111111; 4'h1: seg_on = 7'b0000110;
      4'h2: seg_on = 7'b1011011; 4'h3: seg_on = 7'b1001111;
      4'h4: seg_on = 7'b1100110; 4'h5: seg_on = 7'b1101101;
      4'h6: seg_on = 7'b1111101; 4'h7: seg_on = 7'b0000111;
      4'h8: seg_on = 7'b1111111; 4'h9: seg_on = 7'b1101111;
      4'hA: seg_on = 7'b1110111; 4'hB: seg_on = 7'b1111100;
      4'hC: seg_on = 7'b0111001; 4'hD: seg_on = 7'b1011110;
      4'hE: seg_on = 7'b1111001; default: seg_on = 7'b1110001;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      digit <= '0;
      seg   <= '1;
      an    <= '1;
    end else begin
      if (cnt == CW'(DIGIT_CYCLES - 1)) begin
        cnt   <= '0;
        digit <= digit + 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
      seg <= ~seg_on;
      an  <= ~(8'b1 << digit);
    end
  end
endmodule
