// tb_bram_to_fft: writes samples into the frame buffer (reduced FRAME of 64)
// and checks each transferred frame beat by beat: oldest sample first, TLAST
// on exactly the FRAME-th beat, data held while TREADY is low (random
// back-pressure), a new frame per written sample, and a restart from the
// oldest sample after last_missing.
module tb_bram_to_fft;
  localparam int FRAME = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst, sv, tvalid, tlast, tready, lm;
  logic [15:0] sample, tdata;

  bram_to_fft #(.FRAME(FRAME), .W(16)) dut (
    .clk(clk), .rst(rst), .sample(sample), .sample_valid(sv),
    .m_tdata(tdata), .m_tvalid(tvalid), .m_tlast(tlast), .m_tready(tready), .last_missing(lm));

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

  logic [15:0] model [$];   // samples in age order, newest last

  task automatic write_sample(input logic [15:0] v);
    @(negedge clk); sample = v; sv = 1;
    @(negedge clk); sv = 0;
    model.push_back(v);
    if (model.size() > FRAME) void'(model.pop_front());
  endtask

  // receive one frame and compare with the model (pad unknown words as don't care)
  task automatic receive_frame(input bit backpressure, input int abort_at);
    int beat = 0;
    int lastseen = 0;
    int cycles = 0;
    while (beat < FRAME && cycles < 10 * FRAME) begin
      @(negedge clk);
      tready = backpressure ? ($urandom_range(0, 3) != 0) : 1'b1;
      lm = (beat == abort_at) && tvalid;
      #1;
      if (tvalid && tready && !lm) begin
        int off = beat - (FRAME - model.size());
        if (off >= 0) check(tdata == model[off], $sformatf("beat %0d data %h expected %h", beat, tdata, model[off]));
        check(tlast == (beat == FRAME - 1), $sformatf("tlast at beat %0d", beat));
        if (tlast) lastseen++;
        beat++;
      end
      @(posedge clk);
      if (lm) begin beat = 0; abort_at = -1; end
      cycles++;
    end
    @(negedge clk); lm = 0;
    check(lastseen == 1, "one TLAST per frame");
  endtask

  initial begin
    rst = 1; sv = 0; sample = 0; tready = 1; lm = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    // fill FRAME samples; frames are triggered but drained with tready high
    for (int i = 0; i < FRAME; i++) begin
      write_sample(16'($urandom));
      repeat (FRAME + 4) @(posedge clk);
    end
    // now a full frame of known data
    write_sample(16'hA5A5);
    receive_frame(0, -1);
    write_sample(16'h1234);
    receive_frame(1, -1);
    // last_missing after 10 beats: frame restarts from the oldest sample
    write_sample(16'h4321);
    receive_frame(0, 10);
    repeat (5) @(posedge clk);
    check(!tvalid, "idle after the frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
