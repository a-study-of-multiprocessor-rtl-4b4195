// fifo: circular-queue FIFO buffer with rd/wr controls and full/empty flags.
//
// A register file of 2**ADDR_W words is used as a ring. The write pointer
// marks the head of the queue and the read pointer the tail; each accepted
// write or read moves its pointer by one place. Equal pointers mean either
// empty or full, so both flags are kept in registers and updated with the
// pointer moves: a lone write clears empty and sets full when the write
// pointer catches the read pointer; a lone read clears full and sets empty
// when the read pointer catches the write pointer.
//
// Interface and timing
//   wr     write w_data at the rising edge; ignored while full unless a read
//          is accepted in the same cycle
//   rd     remove the head word at the rising edge; ignored while empty
//   r_data the head word, combinational from the register file (show-ahead),
//          so a reader samples r_data in the same cycle it asserts rd
//   rst    asynchronous, active high: empties the queue
//
// The ring organisation, the rd/wr names and the two flags follow the
// published design. The depth of 16 is taken from the bench experiment, in
// which a reader drains 16 bytes from a full buffer; the figure of the ring
// draws eight slots only as an illustration. Simultaneous read and write of a
// full buffer is this design's own choice.
module fifo #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ADDR_W = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              rd,
  input  logic              wr,
  input  logic [DATA_W-1:0] w_data,
  output logic [DATA_W-1:0] r_data,
  output logic              empty,
  output logic              full
);

  logic [DATA_W-1:0] mem [2**ADDR_W];
  logic [ADDR_W-1:0] w_ptr, r_ptr;
  logic              do_rd, do_wr;

  assign do_rd = rd && !empty;
  assign do_wr = wr && (!full || do_rd);

  always_ff @(posedge clk) begin
    if (do_wr) mem[w_ptr] <= w_data;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      w_ptr <= '0;
      r_ptr <= '0;
      empty <= 1'b1;
      full  <= 1'b0;
    end else begin
      if (do_wr) w_ptr <= w_ptr + 1'b1;
      if (do_rd) r_ptr <= r_ptr + 1'b1;
      if (do_wr && !do_rd) begin
        empty <= 1'b0;
        full  <= (ADDR_W'(w_ptr + 1'b1) == r_ptr);
      end else if (do_rd && !do_wr) begin
        full  <= 1'b0;
        empty <= (ADDR_W'(r_ptr + 1'b1) == w_ptr);
      end
    end
  end

  assign r_data = mem[r_ptr];

  a_flags_exclusive: assert property (@(posedge clk) disable iff (rst) !(empty && full))
    else $error("fifo: empty and full at once");

endmodule
