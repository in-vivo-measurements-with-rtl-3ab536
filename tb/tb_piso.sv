// tb_piso: loads random 24-bit words through the toggle handshake and
// shifts them out with shift_en patterns that include pauses. Checks that
// the load takes effect within 3 cycles, that dout gives the word MSB first,
// one bit per enabled cycle, that last marks the final bit and that valid
// stays high exactly until the last bit has been shifted.
module tb_piso;
  logic        clk = 1'b0, rst = 1'b1;
  logic [23:0] din = '0;
  logic        load_tgl = 1'b0, shift_en = 1'b0;
  logic        dout, valid, last;
  int checks = 0, failures = 0;

  piso #(.W(24)) dut (.clk (clk), .rst (rst), .din (din), .load_tgl (load_tgl),
                      .shift_en (shift_en), .dout (dout), .valid (valid), .last (last));

  always #125ns clk = ~clk;  // 4 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    @(posedge clk);
    check(!valid && !dout, "idle after reset");
    for (int w = 0; w < 40; w++) begin
      logic [23:0] word;
      int lat, sent;
      word = 24'($urandom);
      @(negedge clk);
      din = word;
      load_tgl = ~load_tgl;
      lat = 0;
      while (!valid) begin @(negedge clk); lat++; end
      check(lat >= 2 && lat <= 3, $sformatf("load latency %0d", lat));
      sent = 0;
      while (valid) begin
        check(dout == word[23 - sent], $sformatf("word %0d bit %0d", w, 23 - sent));
        check(last == (sent == 23), "last flag");
        shift_en = (w % 3 == 0) ? 1'($urandom) : 1'b1;
        @(negedge clk);
        if (shift_en) sent++;
        shift_en = 1'b0;
      end
      check(sent == 24, $sformatf("valid for %0d bits", sent));
      check(!dout, "dout low when empty");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
