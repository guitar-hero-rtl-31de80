// score_keeper: turns each match's timing error into points.
//
// diff is |song time - note time| in 10 ms ticks. Points: 100 within
// 100 ms (diff <= 10), 50 within 250 ms, 25 within 500 ms, 10 within 1 s,
// none beyond. The score register (SCORE_W bits, wrapping) is updated the
// cycle after `valid`. Reading "within" as <= is this design's choice.
module score_keeper #(
  parameter int SCORE_W = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               valid,
  input  logic [15:0]        diff,
  output logic [SCORE_W-1:0] score
);
  logic [6:0] points;

  always_comb begin
    if      (diff <= 16'd10)  points = 7'd100;
    else if (diff <= 16'd25)  points = 7'd50;
    else if (diff <= 16'd50)  points = 7'd25;
    else if (diff <= 16'd100) points = 7'd10;
    else                      points = 7'd0;
  end

  always_ff @(posedge clk) begin
    if (rst)        score <= '0;
    else if (valid) score <= score + SCORE_W'(points);
  end
endmodule
