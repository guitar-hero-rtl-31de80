// tb_spectrum_bram: writes a stream of magnitudes in bit-reversed index order
// (as the FFT delivers them) on one clock and reads the memory back on an
// unrelated clock. Only indices below 1024 may land, and nothing while
// block_write is high.
module tb_spectrum_bram;
  logic wclk = 0, rclk = 0;
  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;
  int checks = 0, failures = 0;

  logic [15:0] mag, rdata;
  logic [11:0] idx;
  logic        valid, block;
  logic [9:0]  raddr;

  spectrum_bram dut (.wclk(wclk), .mag_tdata(mag), .mag_tuser(idx), .mag_tvalid(valid),
    .block_write(block), .rclk(rclk), .raddr(raddr), .rdata(rdata));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (40000) @(posedge wclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [11:0] bitrev(logic [11:0] x);
    for (int i = 0; i < 12; i++) bitrev[i] = x[11 - i];
  endfunction

  task automatic frame(input int seed, input bit blk);
    for (int i = 0; i < 4096; i++) begin
      @(negedge wclk);
      valid = 1; block = blk;
      idx = bitrev(12'(i));
      mag = 16'(idx * 7 + seed);
    end
    @(negedge wclk) valid = 0;
  endtask

  task automatic readback(input int seed);
    for (int a = 0; a < 1024; a++) begin
      @(negedge rclk) raddr = 10'(a);
      @(posedge rclk); #1;
      check(rdata == 16'(a * 7 + seed), $sformatf("bin %0d = %h", a, rdata));
    end
  endtask

  initial begin
    valid = 0; block = 0; idx = 0; mag = 0; raddr = 0;
    frame(3, 0);
    readback(3);
    frame(100, 1);     // blocked: old contents stay
    readback(3);
    frame(55, 0);
    readback(55);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
