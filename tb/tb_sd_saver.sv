// tb_sd_saver: saves a random spectrum to two random slots through the
// behavioural SD controller and checks all 2048 bytes of each (address
// slot*4+quarter sectors, high byte first), the sector count, that active
// covers the whole save, and that a start while busy is ignored.
module tb_sd_saver;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst, start, sd_wr, rfnb, ready, active;
  logic [5:0]  slot;
  logic [9:0]  raddr;
  logic [15:0] rdata;
  logic [31:0] sd_addr;
  logic [7:0]  sd_din;
  int          sectors, bad;
  logic [15:0] spec [1024];

  sd_saver dut (.clk(clk), .rst(rst), .start(start), .slot(slot), .raddr(raddr), .rdata(rdata),
    .sd_addr(sd_addr), .sd_wr(sd_wr), .sd_din(sd_din), .sd_ready_for_next_byte(rfnb),
    .sd_ready(ready), .active(active));
  sd_controller_model sdm (.clk(clk), .rst(rst), .addr(sd_addr), .wr(sd_wr), .din(sd_din),
    .ready_for_next_byte(rfnb), .ready(ready), .sectors(sectors), .bad_starts(bad));
  always_ff @(posedge clk) rdata <= spec[raddr];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic save(input int s);
    int sec0, cyc;
    sec0 = sectors;
    @(negedge clk) begin start = 1; slot = 6'(s); end
    @(negedge clk) start = 0;
    check(active, "active after start");
    cyc = 0;
    while (active && cyc < 100000) begin
      @(negedge clk) cyc++;
      if (cyc == 50) begin start = 1; slot = 6'(s ^ 1); end   // ignored
      if (cyc == 51) start = 0;
      if (sectors - sec0 < 4) check(active, "active during save");
    end
    check(sectors - sec0 == 4, $sformatf("sectors %0d", sectors - sec0));
    for (int q = 0; q < 4; q++)
      for (int b = 0; b < 512; b++) begin
        int a, w;
        a = (s * 4 + q) * 512 + b;
        w = spec[q * 256 + b / 2];
        check(sdm.get(a) == ((b % 2 == 0) ? (w >> 8) : (w & 255)),
              $sformatf("slot %0d byte %0d = %0d", s, q * 512 + b, sdm.get(a)));
      end
  endtask

  initial begin
    rst = 1; start = 0; slot = 0;
    for (int i = 0; i < 1024; i++) spec[i] = 16'($urandom);
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    save($urandom_range(0, 31) * 2);
    for (int i = 0; i < 1024; i++) spec[i] = 16'($urandom);
    save(63);
    check(bad == 0, "controller saw no bad starts");
    check(sdm.get(64 * 2048) == -1, "nothing written past slot 63");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
