// tb_string_renderer: renders string 1 (the busiest string of the song) at
// a series of song times and checks random pixels in and around the string's
// row two cycles after their coordinates. A model of the slot rules gives the
// notes on screen: notes load in time order once less than LOOKAHEAD ticks
// ahead, at most SLOTS at a time, and leave TIMEOUT ticks after their time.
// Each visible note's sprite (from a sprite table model with one cycle of
// latency) must sit centred at PLAY_X + 2 * (t - song_time) on the string's
// line; a match event for a note must invert that sprite's colours.
module tb_string_renderer;
  import gh_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int STR = 0, YC = 300 + STR * 80;
  logic         rst, mv, loaded, matched;
  logic [15:0]  now, mt;
  logic [4:0]   mf;
  logic [10:0]  h;
  logic [9:0]   v, saddr;
  logic [233:0] sdata;
  logic [12:0]  pixel;

  string_renderer #(.STRING(STR)) dut (.clk(clk), .rst(rst), .song_time(now), .hcount(h), .vcount(v),
    .match_valid(mv), .match_time(mt), .match_fret(mf), .sprite_addr(saddr), .sprite_data(sdata),
    .pixel(pixel), .loaded_any(loaded), .matched_any(matched));

  always @(posedge clk)
    for (int f = 0; f < 18; f++) sdata[f*13 +: 13] <= sprite_pixel(f, int'(saddr[4:0]), int'(saddr[9:5]));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nt [$], nf [$];
  bit is_matched [int];

  initial begin
    meta_t m;
    int e, x, vis_lo, vis_hi, sx, sy, found, nvis, maxvis;
    logic [12:0] exp_px;
    rst = 1; now = 0; mv = 0; mt = 0; mf = 0; h = 0; v = 0;
    for (int i = 0; i < SONG_LEN; i++) begin
      m = song_note(i);
      if (m.str == STR) begin nt.push_back(int'(m.t)); nf.push_back(int'(m.fret)); end
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    maxvis = 0;
    for (int t = 0; t < 1700; t += $urandom_range(1, 12)) begin
      @(negedge clk) now = 16'(t);
      repeat (8) @(negedge clk);   // let the slots settle
      // model: loaded notes [x_lo, e) with x_lo = expired count
      e = 0; x = 0;
      foreach (nt[i]) begin
        if (nt[i] < t + 448) e++;
        if (t > nt[i] + 64) x++;
      end
      vis_lo = x; vis_hi = (e < x + 5) ? e : x + 5;
      nvis = vis_hi - vis_lo;
      if (nvis > maxvis) maxvis = nvis;
      // sometimes match the note closest to the play line
      if ($urandom_range(0, 3) == 0 && nvis > 0) begin
        int j;
        j = vis_lo + $urandom_range(0, nvis - 1);
        @(negedge clk) begin mv = 1; mt = 16'(nt[j]); mf = 5'(nf[j]); end
        @(negedge clk) mv = 0;
        is_matched[nt[j]] = 1;
      end
      for (int n = 0; n < 60; n++) begin
        sx = $urandom_range(0, 1100);
        sy = YC - 20 + $urandom_range(0, 40);
        if (n < 20 && nvis > 0) sx = 128 + 2 * (nt[vis_lo + n % nvis] - t) - 16 + $urandom_range(0, 31);
        if (sx < 0) sx = 0;
        @(negedge clk) begin h = 11'(sx); v = 10'(sy); end
        @(negedge clk);
        @(negedge clk);
        exp_px = '0; found = 0;
        for (int i = vis_lo; i < vis_hi; i++) begin
          int dx, dy;
          dx = sx - (128 + 2 * (nt[i] - t) - 16);
          dy = sy - (YC - 16);
          if (dx >= 0 && dx < 32 && dy >= 0 && dy < 32 && sx < 1024) begin
            exp_px = sprite_pixel(nf[i], dx, dy);
            if (!exp_px[12]) exp_px = '0;
            else if (is_matched.exists(nt[i])) exp_px = {1'b1, ~exp_px[11:0]};
            found++;
          end
        end
        check(found <= 1, "sprites overlap");
        check(pixel == exp_px, $sformatf("t=%0d pixel %0d,%0d = %h expected %h", t, sx, sy, pixel, exp_px));
      end
    end
    check(loaded && matched, "loaded and matched flags");
    check(maxvis == 5, $sformatf("all %0d slots used", maxvis));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
