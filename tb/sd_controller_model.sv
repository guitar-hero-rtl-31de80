// sd_controller_model: behavioural stand-in for the SD card controller's
// write interface, for simulation only.
//
// Idle with `ready` high. A one-cycle `wr` while ready starts a sector write
// at byte address `addr`: ready drops, and for each of the 512 bytes
// ready_for_next_byte is high for HOLD cycles (the byte on din is taken on
// the first of them) and then low for GAP cycles. After the last byte ready
// returns high after BUSY cycles. Every byte is stored in a sparse memory by
// absolute byte address, and the number of sectors written is counted.
module sd_controller_model #(
  parameter int HOLD = 8,
  parameter int GAP  = 3,
  parameter int BUSY = 20
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] addr,
  input  logic        wr,
  input  logic [7:0]  din,
  output logic        ready_for_next_byte,
  output logic        ready,
  output int          sectors,
  output int          bad_starts
);
  logic [7:0] mem [int];
  int         state, cnt, nbyte;
  logic [31:0] base;

  function automatic int get(input int a);
    return mem.exists(a) ? int'(mem[a]) : -1;
  endfunction

  always @(posedge clk) begin
    if (rst) begin
      state <= 0; ready <= 1'b1; ready_for_next_byte <= 1'b0;
      sectors <= 0; bad_starts <= 0; cnt <= 0; nbyte <= 0; base <= '0;
    end else begin
      case (state)
        0: if (wr) begin
             if (addr[8:0] != 9'd0) bad_starts <= bad_starts + 1;
             base <= addr; ready <= 1'b0; state <= 1; cnt <= GAP; nbyte <= 0;
           end
        1: begin  // gap before a byte
             if (cnt > 0) cnt <= cnt - 1;
             else begin ready_for_next_byte <= 1'b1; cnt <= HOLD - 1; state <= 2; end
           end
        2: begin  // byte window; sample on its first cycle
             if (cnt == HOLD - 1) mem[int'(base) + nbyte] = din;
             if (cnt > 0) cnt <= cnt - 1;
             else begin
               ready_for_next_byte <= 1'b0;
               if (nbyte == 511) begin state <= 3; cnt <= BUSY; end
               else begin nbyte <= nbyte + 1; cnt <= GAP; state <= 1; end
             end
           end
        default: begin
             if (cnt > 0) cnt <= cnt - 1;
             else begin ready <= 1'b1; sectors <= sectors + 1; state <= 0; end
           end
      endcase
      if (wr && state != 0) bad_starts <= bad_starts + 1;
    end
  end
endmodule
