// note_deserializer: game-board receiver for the two-wire active-note link.
//
// ser_data and ser_sync are brought into this clock domain through two
// flip-flops each. The falling edge of sync marks the start of a packet;
// from there a cycle counter tracks the SEG_CYCLES-long segments and the
// data wire is sampled in the middle of each one, far from the edges where a
// slow cable smears the pulses. Segment i's sample becomes bit i; after
// segment NOTES-1 the whole vector is copied to `notes` and notes_valid
// pulses. Until the first sync fall the receiver waits. The receiver itself
// is this design's own; the packet format is the transmitter's.
module note_deserializer #(
  parameter int NOTES      = 48,
  parameter int SEG_CYCLES = 8192
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ser_data,
  input  logic             ser_sync,
  output logic [NOTES-1:0] notes,
  output logic             notes_valid
);
  localparam int CW = $clog2(SEG_CYCLES);
  localparam int SW = $clog2(NOTES + 1);

  logic [2:0]       data_s, sync_s;
  logic             running;
  logic [CW-1:0]    cyc;
  logic [SW-1:0]    seg;
  logic [NOTES-1:0] shreg;

  always_ff @(posedge clk) begin
    if (rst) begin
      data_s      <= '0;
      sync_s      <= '0;
      running     <= 1'b0;
      cyc         <= '0;
      seg         <= '0;
      shreg       <= '0;
      notes       <= '0;
      notes_valid <= 1'b0;
    end else begin
      data_s      <= {data_s[1:0], ser_data};
      sync_s      <= {sync_s[1:0], ser_sync};
      notes_valid <= 1'b0;
      if (sync_s[2] && !sync_s[1]) begin
        // falling edge of sync: segment 0 starts now
        running <= 1'b1;
        cyc     <= CW'(1);
        seg     <= '0;
      end else if (running) begin
        if (cyc == CW'(SEG_CYCLES / 2)) shreg[seg] <= data_s[1];
        if (cyc == CW'(SEG_CYCLES - 1)) begin
          cyc <= '0;
          if (seg == SW'(NOTES - 1)) begin
            running     <= 1'b0;
            notes       <= shreg;
            notes_valid <= 1'b1;
          end
          seg <= seg + 1'b1;
        end else begin
          cyc <= cyc + 1'b1;
        end
      end
    end
  end
endmodule
