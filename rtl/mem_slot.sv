// mem_slot: one memory slot of the data recording module's double buffer.
//
// A small simple dual-port RAM of DEPTH words of W bits: the write port is
// clocked by the master clock (write control side), the read port by the
// FPGA clock (read control side), with a registered read (data appears one
// rd_clk cycle after rd_addr). One slot holds one frame: nine information
// bytes and one CRC byte. Two slots written alternately follow the original system;
// the size and byte organisation are this design's choice.
module mem_slot #(
  parameter int unsigned DEPTH = 10,
  parameter int unsigned W     = 8
) (
  input  logic                     wr_clk,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [W-1:0]             wr_data,
  input  logic                     rd_clk,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [W-1:0]             rd_data
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge wr_clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge rd_clk) begin
    rd_data <= mem[rd_addr];
  end
endmodule
