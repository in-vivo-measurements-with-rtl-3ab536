// tb_freq_divider: checks the 50 MHz -> 4 MHz divider at its default
// parameters. Over 2500 input cycles the output must have exactly 200
// rising edges, every high and low phase must last 6 or 7 input cycles,
// consecutive periods must alternate 12/13, and tick_out must precede each
// rising edge by one cycle.
module tb_freq_divider;
  logic clk = 1'b0, rst = 1'b1;
  logic clk_out, tick_out, clk_out_q;
  int checks = 0, failures = 0;

  freq_divider dut (.clk_in (clk), .rst (rst), .clk_out (clk_out), .tick_out (tick_out));

  always #10ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int rises = 0, phase = 0, period = 0, last_period = 0;
    bit tick_q = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    @(posedge clk);
    clk_out_q = clk_out;
    for (int i = 0; i < 2500; i++) begin
      tick_q = tick_out;
      @(posedge clk);
      phase++;
      period++;
      if (clk_out != clk_out_q) begin
        check(phase == 6 || phase == 7, $sformatf("phase of %0d cycles", phase));
        phase = 0;
        if (clk_out) begin
          rises++;
          check(tick_q, "tick_out before rising edge");
          if (rises > 2) check(period + last_period == 25, $sformatf("periods %0d+%0d", last_period, period));
          if (rises > 1) last_period = period;
          period = 0;
        end
      end else begin
        check(!tick_q, "no tick_out without rising edge");
      end
      clk_out_q = clk_out;
    end
    check(rises == 200, $sformatf("%0d rising edges in 2500 cycles", rises));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
