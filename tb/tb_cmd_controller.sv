// tb_cmd_controller: the testbench plays the PISO in a slow clock domain:
// when load_tgl changes it raises valid some cycles later, and drops it a
// set time after en_pls has risen. Checks that every ws flips load_tgl once,
// that en_pls never rises before valid has been seen (two synchroniser
// cycles), that it rises within 3 cycles of valid and falls within 3 cycles
// after valid falls, that busy covers the whole command, and that a ws
// while busy is ignored and counted in dropped.
module tb_cmd_controller;
  logic       clk = 1'b0, rst = 1'b1;
  logic       ws = 1'b0, valid = 1'b0;
  logic       load_tgl, en_pls, busy;
  logic [7:0] dropped;
  int checks = 0, failures = 0;

  cmd_controller dut (.clk (clk), .rst (rst), .ws (ws), .valid (valid), .load_tgl (load_tgl),
                      .en_pls (en_pls), .busy (busy), .dropped (dropped));

  always #10ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic tgl0;
    int   ignored = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(!busy && !en_pls, "idle after reset");
    for (int c = 0; c < 20; c++) begin
      int t;
      tgl0 = load_tgl;
      ws = 1'b1; @(negedge clk); ws = 1'b0;
      check(load_tgl != tgl0, "ws flips load_tgl");
      check(busy, "busy after ws");
      // a second request while busy is ignored
      if (c % 4 == 1) begin
        ws = 1'b1; @(negedge clk); ws = 1'b0;
        ignored++;
        check(load_tgl != tgl0, "no second flip while busy");
      end
      t = 5 + int'($urandom % 20);
      repeat (t) begin @(negedge clk); check(!en_pls, "no en_pls before valid"); end
      valid = 1'b1;
      @(negedge clk); check(!en_pls, "en_pls waits for synchronised valid");
      t = 0;
      while (!en_pls) begin @(negedge clk); t++; if (t > 10) break; end
      check(t >= 1 && t <= 2, $sformatf("en_pls after valid: %0d", t));
      repeat (24 * 12) begin @(negedge clk); check(en_pls && busy, "en_pls held during dump"); end
      valid = 1'b0;
      t = 0;
      while (en_pls) begin @(negedge clk); t++; if (t > 10) break; end
      check(t >= 1 && t <= 3, $sformatf("en_pls falls %0d cycles after valid", t));
      check(!busy, "not busy after transfer");
      repeat (3) @(negedge clk);
    end
    check(dropped == 8'(ignored), $sformatf("dropped %0d, expected %0d", dropped, ignored));
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
