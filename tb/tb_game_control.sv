// tb_game_control: with a 10-cycle tick and SONG_END = 60, checks that the
// tick pulses exactly every TICK_CYCLES cycles while playing, that pause
// presses of random length toggle PAUSED/PLAYING and freeze song_time, that
// the state becomes OVER at SONG_END and stays there, and that reset
// restarts from time 0 in PLAYING.
module tb_game_control;
  import gh_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int TICK = 10, SEND = 60;
  logic        rst, pause, tick;
  logic [15:0] t;
  game_state_t st;

  game_control #(.TICK_CYCLES(TICK), .SONG_END(SEND)) dut (.clk(clk), .btn_reset(rst), .btn_pause(pause),
    .song_time(t), .state(st), .tick(tick));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, last_tick = -1, ticks = 0;
  bit check_period = 1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    #1;
    if (tick) begin
      if (last_tick >= 0 && check_period) check(cyc - last_tick == TICK, $sformatf("tick period %0d", cyc - last_tick));
      last_tick = cyc; ticks++;
    end
  end

  task automatic press(input int len);
    @(negedge clk) pause = 1;
    repeat (len) @(negedge clk);
    pause = 0;
  endtask

  initial begin
    logic [15:0] t0;
    rst = 1; pause = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    check(st == ST_PLAYING && t == 0, "starts playing at 0");
    repeat (10 * TICK + 3) @(negedge clk);
    check(t == 10, $sformatf("time %0d after 10 ticks", t));
    for (int i = 0; i < 3; i++) begin
      check_period = 0;
      press($urandom_range(1, 30));
      check(st == ST_PAUSED, "paused");
      t0 = t;
      repeat ($urandom_range(20, 200)) @(negedge clk);
      check(t == t0 && st == ST_PAUSED, "time frozen while paused");
      press($urandom_range(1, 30));
      check(st == ST_PLAYING, "resumed");
      last_tick = -1; check_period = 1;
      repeat ($urandom_range(20, 50)) @(negedge clk);
    end
    while (st != ST_OVER && cyc < 40000) @(negedge clk);
    check(st == ST_OVER && t == SEND, $sformatf("over at time %0d", t));
    repeat (50) @(negedge clk);
    press(3);
    check(st == ST_OVER && t == SEND, "over is final");
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    check(st == ST_PLAYING && t == 0, "reset restarts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
