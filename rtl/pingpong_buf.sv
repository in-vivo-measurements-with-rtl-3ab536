// pingpong_buf: the two memory slots of the data recording module with the
// multiplexers around them.
//
// The write port (master clock) is steered to slot #1 when wr_slot is 0 and
// to slot #2 when it is 1; the read port (FPGA clock) returns the registered
// read data of the slot chosen by rd_slot, which the read control unit sets
// to the slot not being written. Two slots with a multiplexer in front of
// and behind them follow the original system's block diagram; the select encoding
// is this design's choice.
module pingpong_buf #(
  parameter int unsigned DEPTH = 10,
  parameter int unsigned W     = 8
) (
  input  logic                     wr_clk,
  input  logic                     wr_en,
  input  logic                     wr_slot,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [W-1:0]             wr_data,
  input  logic                     rd_clk,
  input  logic                     rd_slot,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [W-1:0]             rd_data
);
  logic [W-1:0] rd_data0, rd_data1;
  logic         rd_slot_q;  // aligns the read mux with the registered read

  mem_slot #(.DEPTH(DEPTH), .W(W)) u_slot1 (
    .wr_clk (wr_clk), .wr_en (wr_en && !wr_slot), .wr_addr (wr_addr), .wr_data (wr_data),
    .rd_clk (rd_clk), .rd_addr (rd_addr), .rd_data (rd_data0)
  );

  mem_slot #(.DEPTH(DEPTH), .W(W)) u_slot2 (
    .wr_clk (wr_clk), .wr_en (wr_en && wr_slot), .wr_addr (wr_addr), .wr_data (wr_data),
    .rd_clk (rd_clk), .rd_addr (rd_addr), .rd_data (rd_data1)
  );

  always_ff @(posedge rd_clk) rd_slot_q <= rd_slot;

  assign rd_data = rd_slot_q ? rd_data1 : rd_data0;
endmodule
