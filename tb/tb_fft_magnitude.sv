// tb_fft_magnitude: streams random complex values (plus corner cases) and
// checks each output beat against floor(sqrt(re^2 + im^2)) computed here by
// search, with the index and TLAST carried alongside and the fixed latency of
// 18 cycles.
module tb_fft_magnitude;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst, s_valid, s_last, m_valid, m_last;
  logic [31:0] s_data;
  logic [11:0] s_user, m_user;
  logic [15:0] m_data;

  fft_magnitude dut (.clk(clk), .rst(rst), .s_tdata(s_data), .s_tuser(s_user), .s_tvalid(s_valid),
    .s_tlast(s_last), .m_tdata(m_data), .m_tuser(m_user), .m_tvalid(m_valid), .m_tlast(m_last));

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

  function automatic int isqrt(longint x);
    longint r = 0;
    for (int b = 15; b >= 0; b--) if ((r + (64'd1 << b)) * (r + (64'd1 << b)) <= x) r += (64'd1 << b);
    return int'(r);
  endfunction

  typedef struct { int mag; int idx; bit last; int t; } exp_t;
  exp_t q [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    rst = 1; s_valid = 0; s_last = 0; s_data = 0; s_user = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 2000; i++) begin
      shortint re, im;
      @(negedge clk);
      case (i)
        0: begin re = -32768; im = -32768; end
        1: begin re = 32767; im = 0; end
        2: begin re = 0; im = 0; end
        default: begin re = shortint'($urandom); im = shortint'($urandom); end
      endcase
      if (i % 5 == 4) re = re >>> 6;
      s_valid = ($urandom_range(0, 3) != 0);
      s_last  = (i % 64 == 63);
      s_user  = 12'(i);
      s_data  = {im, re};
      if (s_valid) q.push_back('{isqrt(longint'(re) * re + longint'(im) * im), i % 4096, s_last, cyc});
    end
    @(negedge clk) s_valid = 0;
    repeat (30) @(posedge clk);
    check(q.size() == 0, "all beats came out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (m_valid) begin
      if (q.size() == 0) check(0, "unexpected output");
      else begin
        exp_t e;
        e = q.pop_front();
        check(m_data == 16'(e.mag), $sformatf("mag %0d expected %0d", m_data, e.mag));
        check(m_user == 12'(e.idx) && m_last == e.last, "index / last");
        check(cyc - e.t == 18, $sformatf("latency %0d", cyc - e.t));
      end
    end
  end
endmodule
