// dff_sync: produces en_trf, the command transfer window seen by the ASIC,
// aligned to the master clock (clk4M).
//
// en (en_pls from the command controller, 50 MHz domain) passes a two-flop
// synchroniser. The output flop raises en_trf when the synchronised enable is
// high and the PISO holds valid data, and drops it on the edge that shifts
// the PISO's last bit, so the window covers exactly one command word. That
// en_trf is a flop clocked by the master clock follows the original system; the
// gating by the PISO's valid and last flags is this design's choice.
//
// Timing: en_trf rises 3 clk cycles after en goes high (with valid high) and
// stays high for as many cycles as the PISO has bits left (24 for a command).
module dff_sync (
  input  logic clk,     // clk4M
  input  logic rst,
  input  logic en,      // en_pls, asynchronous to clk
  input  logic valid,   // PISO holds unsent bits
  input  logic last,    // PISO shows its last bit
  output logic en_trf
);
  logic [1:0] en_s;

  always_ff @(posedge clk) begin
    if (rst) begin
      en_s   <= '0;
      en_trf <= 1'b0;
    end else begin
      en_s   <= {en_s[0], en};
      en_trf <= en_s[1] & valid & ~(en_trf & last);
    end
  end
endmodule
