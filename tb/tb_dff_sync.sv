// tb_dff_sync: drives en asynchronously and models a PISO's valid/last from
// a bit counter that counts down on every cycle with en_trf high. Checks
// that en_trf rises on the third rising clk edge after en (when valid), stays high for exactly
// the number of bits left (24 for a command, also shorter counts), stays low
// without en or without valid, and falls with the last bit.
module tb_dff_sync;
  logic clk = 1'b0, rst = 1'b1;
  logic en = 1'b0, en_trf;
  int   cnt = 0;
  logic valid, last;
  int checks = 0, failures = 0;

  assign valid = (cnt != 0);
  assign last  = (cnt == 1);

  dff_sync dut (.clk (clk), .rst (rst), .en (en), .valid (valid), .last (last), .en_trf (en_trf));

  always #125ns clk = ~clk;

  always @(posedge clk) if (!rst && en_trf && cnt != 0) cnt <= cnt - 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // valid without en: no window
    @(negedge clk); cnt = 24;
    repeat (10) begin @(negedge clk); check(!en_trf, "no en_trf without en"); end
    // en without valid: no window
    @(negedge clk); cnt = 0;
    for (int t = 0; t < 12; t++) begin
      int bits, lat, hi, dly;
      bits = (t % 2 == 0) ? 24 : 1 + int'($urandom % 30);
      @(negedge clk);
      cnt = bits;
      dly = $urandom % 100;
      #(dly * 1ns);
      en = 1'b1;
      lat = 0;
      while (!en_trf) begin @(negedge clk); lat++; if (lat > 10) break; end
      check(lat == 3, $sformatf("en_trf latency %0d", lat));
      hi = 0;
      while (en_trf) begin @(negedge clk); hi++; if (hi > 100) break; end
      check(hi == bits, $sformatf("window %0d cycles for %0d bits", hi, bits));
      check(cnt == 0, "all bits shifted");
      repeat (5) begin @(negedge clk); check(!en_trf, "stays low after window"); end
      en = 1'b0;
      repeat (4) @(negedge clk);
    end
    @(negedge clk); en = 1'b1; cnt = 0;
    repeat (6) begin @(negedge clk); check(!en_trf, "no en_trf without valid"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
