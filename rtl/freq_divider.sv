// freq_divider: derives the ASIC master clock (4 MHz) from the FPGA clock
// (50 MHz).
//
// The ratio 50/4 = 12.5 is not an integer, so a phase accumulator is used:
// every input cycle it adds 2*F_OUT_HZ, and each time it passes F_IN_HZ the
// output flop toggles. The output therefore toggles every 6 or 7 input cycles,
// alternating periods of 12 and 13 input cycles, with an exact 4 MHz average
// and one input cycle of jitter. The division itself follows the original system;
// the accumulator is this design's choice, since the original description does not say
// how the fractional ratio is obtained.
//
// Interface: clk_in, synchronous active-high rst, clk_out (registered).
// tick_out pulses for one input cycle in the cycle before each rising edge of
// clk_out (it is provided for observation and tests).
module freq_divider #(
  parameter int unsigned F_IN_HZ  = 50_000_000,
  parameter int unsigned F_OUT_HZ = 4_000_000
) (
  input  logic clk_in,
  input  logic rst,
  output logic clk_out,
  output logic tick_out
);
  localparam logic [31:0] STEP = 32'(2 * F_OUT_HZ);
  localparam logic [31:0] MODV = 32'(F_IN_HZ);

  logic [31:0] acc;
  logic [32:0] sum;
  logic        wrap;

  always_comb begin
    sum  = {1'b0, acc} + {1'b0, STEP};
    wrap = (sum >= {1'b0, MODV});
  end

  always_ff @(posedge clk_in) begin
    if (rst) begin
      acc     <= '0;
      clk_out <= 1'b0;
    end else begin
      acc <= wrap ? 32'(sum - {1'b0, MODV}) : sum[31:0];
      if (wrap) clk_out <= ~clk_out;
    end
  end

  assign tick_out = wrap & ~clk_out;

  initial begin
    assert (F_OUT_HZ > 0 && 2 * F_OUT_HZ <= F_IN_HZ)
      else $error("freq_divider: F_OUT_HZ must be at most F_IN_HZ/2");
  end
endmodule
