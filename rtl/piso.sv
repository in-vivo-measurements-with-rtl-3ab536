// piso: parallel-in serial-out register for the ASIC command line.
//
// A command word (W = 24 bits: 5-bit preamble, 14-bit payload, 5-bit CRC) is
// loaded from din and shifted out MSB first on dout, one bit per master clock
// (clk4M) cycle while shift_en is high. valid is high from the load until the
// last bit has been shifted; last is high while the final bit is on dout.
// The 24-bit serialisation in the master-clock domain follows the original system.
//
// The load request arrives from the 50 MHz domain as a toggle (load_tgl); it
// is synchronised here with two flops and a change of its value loads din.
// din must be stable from the toggle until valid rises; the command
// controller guarantees this. The toggle and the last flag are this design's
// own additions.
//
// Timing: load is seen 2-3 clk cycles after load_tgl changes; dout shows bit
// W-1 from then on; each rising clk edge with shift_en high moves to the next
// bit; after W such edges valid is low and dout is 0.
module piso #(
  parameter int unsigned W = 24
) (
  input  logic         clk,       // clk4M
  input  logic         rst,
  input  logic [W-1:0] din,
  input  logic         load_tgl,
  input  logic         shift_en,  // en_trf
  output logic         dout,
  output logic         valid,
  output logic         last
);
  logic [W-1:0]           sh;
  logic [$clog2(W+1)-1:0] cnt;      // bits still to send
  logic [2:0]             tgl_sync; // two-flop synchroniser + edge history

  always_ff @(posedge clk) begin
    if (rst) begin
      sh       <= '0;
      cnt      <= '0;
      tgl_sync <= '0;
    end else begin
      tgl_sync <= {tgl_sync[1:0], load_tgl};
      if (tgl_sync[2] != tgl_sync[1]) begin
        sh  <= din;
        cnt <= ($clog2(W+1))'(W);
      end else if (shift_en && cnt != 0) begin
        sh  <= {sh[W-2:0], 1'b0};
        cnt <= cnt - 1'b1;
      end
    end
  end

  assign valid = (cnt != 0);
  assign last  = (cnt == 1);
  assign dout  = valid & sh[W-1];
endmodule
