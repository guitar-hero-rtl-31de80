// tb_correlator: feeds whole FFT frames of random magnitudes in bit-reversed
// order with random gaps to a chord correlator and a note correlator, and
// checks each dot product against the sum over bins < 1024 of
// magnitude * gh_pkg::ref_mag(), and that it is valid exactly 4 edges after
// the TLAST beat and for one cycle. Frames are back to back, so the
// accumulator restart is checked as well.
module tb_correlator;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NA = 45, NB = 7;
  logic        rst, valid, last, va, vb;
  logic [15:0] mag;
  logic [11:0] idx;
  logic [41:0] da, db;

  correlator #(.NOTE(NA)) ua (.clk(clk), .rst(rst), .mag_tdata(mag), .mag_tuser(idx), .mag_tvalid(valid),
    .mag_tlast(last), .dot_product(da), .dot_product_valid(va));
  correlator #(.NOTE(NB)) ub (.clk(clk), .rst(rst), .mag_tdata(mag), .mag_tuser(idx), .mag_tvalid(valid),
    .mag_tlast(last), .dot_product(db), .dot_product_valid(vb));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [11:0] bitrev(logic [11:0] x);
    for (int i = 0; i < 12; i++) bitrev[i] = x[11 - i];
  endfunction

  int cyc = 0, last_cyc = -100, nva = 0, nvb = 0;
  longint ea, eb;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    #1;
    if (va) begin
      nva++;
      check(da == 42'(ea), $sformatf("note %0d dot %0d expected %0d", NA, da, ea));
      check(cyc - last_cyc == 4, $sformatf("valid %0d edges after TLAST", cyc - last_cyc));
    end
    if (vb) begin
      nvb++;
      check(db == 42'(eb), $sformatf("note %0d dot %0d expected %0d", NB, db, eb));
    end
  end

  initial begin
    longint sa, sb;
    rst = 1; valid = 0; last = 0; mag = 0; idx = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int f = 0; f < 4; f++) begin
      sa = 0; sb = 0;
      for (int i = 0; i < 4096; i++) begin
        @(negedge clk);
        while ($urandom_range(0, 7) == 0) begin valid = 0; last = 0; @(negedge clk); end
        valid = 1;
        idx = bitrev(12'(i));
        mag = 16'($urandom_range(0, (f == 1) ? 65535 : 4000));
        last = (i == 4095);
        if (idx < 1024) begin
          sa += longint'(mag) * gh_pkg::ref_mag(NA, int'(idx));
          sb += longint'(mag) * gh_pkg::ref_mag(NB, int'(idx));
        end
        if (last) begin last_cyc = cyc + 1; ea = sa; eb = sb; end
      end
    end
    @(negedge clk) begin valid = 0; last = 0; end
    repeat (10) @(posedge clk);
    check(nva == 4 && nvb == 4, $sformatf("frames %0d %0d", nva, nvb));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
