// fifo_ram: byte FIFO between the read control unit and the USB interface.
//
// Synchronous FIFO of DEPTH words of W bits on one clock (the 50 MHz FPGA
// clock). It is first-word-fall-through: rd_trf always shows the oldest word
// while empty is low, and rd_en removes it at the next rising edge. Writes to
// a full FIFO and reads from an empty one are ignored (an assertion flags
// them). level gives the number of words held. The FIFO with 8-bit slots,
// written by read control and read by the USB interface, follows the
// original system; its depth (2048, one block RAM of bytes) and the
// fall-through behaviour are this design's choices.
module fifo_ram #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned W     = 8
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       wr_en,
  input  logic [W-1:0]               din,
  input  logic                       rd_en,
  output logic [W-1:0]               rd_trf,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] level
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned LW = $clog2(DEPTH + 1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          do_wr, do_rd;

  assign empty = (level == 0);
  assign full  = (level == LW'(DEPTH));
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      level <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      level <= level + LW'(do_wr) - LW'(do_rd);
    end
  end

  assign rd_trf = mem[rptr];

  no_overflow:  assert property (@(posedge clk) disable iff (rst) !(wr_en && full))
    else $error("fifo_ram: write to a full FIFO");
  no_underflow: assert property (@(posedge clk) disable iff (rst) !(rd_en && empty))
    else $error("fifo_ram: read from an empty FIFO");
endmodule
