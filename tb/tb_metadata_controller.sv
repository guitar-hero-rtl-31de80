// tb_metadata_controller: 37 requester models raise requests at random
// times; every answer must go to a pitch that is requesting, carry that
// pitch's next note time from the song in order (time_ok = 1) or time_ok = 0
// once its notes are used up, and come within a bounded time. At the end
// every pitch must have received exactly its notes of the song.
module tb_metadata_controller;
  import gh_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst, tok;
  logic [36:0] req, avail;
  logic [15:0] tbus;

  metadata_controller dut (.clk(clk), .rst(rst), .req(req), .avail(avail), .time_bus(tbus), .time_ok(tok));

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

  int expq [37][$];
  int waitc [37];
  bit done [37];

  initial begin
    meta_t m;
    int nans, maxw;
    for (int i = 0; i < SONG_LEN; i++) begin m = song_note(i); expq[m.pitch].push_back(int'(m.t)); end
    rst = 1; req = '0; nans = 0; maxw = 0;
    foreach (done[p]) begin done[p] = 0; waitc[p] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      for (int p = 0; p < 37; p++) begin
        if (avail[p]) begin
          nans++;
          check(req[p], $sformatf("answer to pitch %0d without request", p));
          if (expq[p].size() > 0) begin
            check(tok && tbus == 16'(expq[p][0]), $sformatf("pitch %0d time %0d expected %0d", p, tbus, expq[p][0]));
            void'(expq[p].pop_front());
          end else begin
            check(!tok, $sformatf("pitch %0d should be finished", p));
            done[p] = 1;
          end
          if (waitc[p] > maxw) maxw = waitc[p];
          req[p] = 0; waitc[p] = 0;
        end else if (req[p]) waitc[p]++;
        else if (!done[p] && $urandom_range(0, 200) == 0) req[p] = 1;
      end
      check($countones(avail) <= 1, "one answer at a time");
    end
    foreach (done[p]) check(done[p] && expq[p].size() == 0, $sformatf("pitch %0d got all its notes", p));
    check(maxw <= 37 * (SONG_LEN + 3), $sformatf("longest wait %0d cycles", maxw));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
