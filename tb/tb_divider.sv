// tb_divider: random dividends and divisors (including zero divisors,
// overflowing quotients and exact ratios) one per cycle with random gaps;
// each quotient must equal min((a << 8) / d, 65535) and arrive with its tag
// exactly 46 cycles after entry.
module tb_divider;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst, iv, ov;
  logic [41:0] a, d;
  logic [5:0]  ti, to;
  logic [15:0] q;

  divider dut (.clk(clk), .rst(rst), .in_valid(iv), .dividend(a), .divisor(d), .in_tag(ti),
    .out_valid(ov), .quotient(q), .out_tag(to));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { longint q; int tag; int t; } exp_t;
  exp_t eq [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    #1;
    if (ov) begin
      exp_t e;
      if (eq.size() == 0) check(0, "unexpected output");
      else begin
        e = eq.pop_front();
        check(q == 16'(e.q) && to == 6'(e.tag), $sformatf("q %0d expected %0d", q, e.q));
        check(cyc - e.t == 46, $sformatf("latency %0d", cyc - e.t));
      end
    end
  end

  initial begin
    logic [63:0] x;
    rst = 1; iv = 0; a = 0; d = 0; ti = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      iv = ($urandom_range(0, 4) != 0);
      a = {$urandom, $urandom} >> $urandom_range(22, 60);
      d = {$urandom, $urandom} >> $urandom_range(22, 63);
      if (i % 50 == 0) d = 0;
      if (i % 37 == 0) d = a;
      if (i % 41 == 0) begin a = 42'h3FF_FFFF_FFFF; d = 42'h3FF_FFFF_FFFF; end
      ti = 6'(i);
      if (iv) begin
        x = (d == 0) ? 64'hFFFF : ((64'(a) << 8) / 64'(d));
        if (x > 64'hFFFF) x = 64'hFFFF;
        eq.push_back('{longint'(x), i % 64, cyc});
      end
    end
    @(negedge clk) iv = 0;
    repeat (60) @(posedge clk);
    check(eq.size() == 0, "all results came out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
