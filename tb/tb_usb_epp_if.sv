// tb_usb_epp_if: an EPP host drives address and data cycles against the
// interface; a queue models the FIFO (head on rx_data, popped by rx_rd).
// Checks: the wait handshake of every cycle and db_oe only during reads;
// command bytes assemble into tx_data MSB first and only the write of the
// last byte pulses wr_req, exactly once; the address register reads back;
// FIFO reads return the queue's bytes in order with one rx_rd each; a read
// of an empty FIFO returns 0 without rx_rd; status and level registers
// reflect the inputs.
module tb_usb_epp_if;
  import nrec_pkg::*;

  logic        clk = 1'b0, rst = 1'b1;
  logic        astb_n = 1'b1, dstb_n = 1'b1, wr_n = 1'b1;
  logic        wt, db_oe;
  logic [7:0]  db_i = '0, db_o;
  logic [23:0] tx_data;
  logic        wr_req, rx_rd;
  logic        cmd_busy = 1'b0;
  logic [7:0]  q [$];
  logic [7:0]  dropped_in = 8'h5C;
  int checks = 0, failures = 0, n_wr_req = 0, n_rx_rd = 0;

  usb_epp_if dut (
    .clk (clk), .rst (rst), .astb_n (astb_n), .dstb_n (dstb_n), .wr_n (wr_n), .wt (wt),
    .db_i (db_i), .db_o (db_o), .db_oe (db_oe),
    .tx_data (tx_data), .wr_req (wr_req), .cmd_busy (cmd_busy),
    .rx_data (q.size() > 0 ? q[0] : 8'hEE), .rx_rd (rx_rd),
    .fifo_empty (q.size() == 0), .fifo_full (q.size() >= 40),
    .fifo_level (16'(q.size())), .frames_dropped (dropped_in)
  );

  always #10ns clk = ~clk;

  always @(posedge clk) begin
    if (!rst && wr_req) n_wr_req++;
    if (!rst && rx_rd) begin
      n_rx_rd++;
      void'(q.pop_front());
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic epp_cycle(input bit addr_cycle, input bit write, input logic [7:0] wdata,
                           output logic [7:0] rdata);
    int t = 0;
    @(negedge clk);
    wr_n = !write;
    db_i = wdata;
    repeat (2) @(negedge clk);
    check(!db_oe, "bus not driven before the strobe");
    if (addr_cycle) astb_n = 1'b0; else dstb_n = 1'b0;
    while (!wt) begin @(negedge clk); t++; end
    check(t >= 2 && t <= 5, $sformatf("wait rose after %0d cycles", t));
    @(negedge clk);
    rdata = db_o;
    check(db_oe == !write, "db_oe only during reads");
    astb_n = 1'b1;
    dstb_n = 1'b1;
    t = 0;
    while (wt) begin @(negedge clk); t++; end
    check(t >= 2 && t <= 5, $sformatf("wait fell after %0d cycles", t));
    check(!db_oe, "bus released after the cycle");
    wr_n = 1'b1;
  endtask

  task automatic reg_write(input logic [7:0] a, input logic [7:0] d);
    logic [7:0] dummy;
    epp_cycle(1, 1, a, dummy);
    epp_cycle(0, 1, d, dummy);
  endtask

  task automatic reg_read(input logic [7:0] a, output logic [7:0] d);
    logic [7:0] dummy;
    epp_cycle(1, 1, a, dummy);
    epp_cycle(0, 0, 8'h00, d);
  endtask

  initial begin
    logic [7:0] d, a;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // address register reads back
    epp_cycle(1, 1, 8'h06, d);
    epp_cycle(1, 0, 8'h00, a);
    check(a == 8'h06, "address register read back");
    // commands
    for (int c = 0; c < 6; c++) begin
      logic [23:0] cmd;
      int n0;
      cmd = 24'($urandom);
      n0 = n_wr_req;
      reg_write(REG_CMD2, cmd[23:16]);
      reg_write(REG_CMD1, cmd[15:8]);
      check(n_wr_req == n0, "no wr_req before the last byte");
      reg_write(REG_CMD0, cmd[7:0]);
      check(n_wr_req == n0 + 1, "one wr_req per command");
      check(tx_data == cmd, $sformatf("tx_data %h vs %h", tx_data, cmd));
      reg_read(REG_CMD2, d);
      check(d == cmd[23:16], "command byte read back");
    end
    // status: busy
    cmd_busy = 1'b1;
    reg_read(REG_STATUS, d);
    check(d == 8'b0000_0101, $sformatf("status busy+empty %b", d));
    cmd_busy = 1'b0;
    // empty FIFO read
    reg_read(REG_FIFO, d);
    check(d == 8'h00 && n_rx_rd == 0, "empty FIFO read");
    // fill the FIFO model and read it back
    for (int i = 0; i < 45; i++) q.push_back(8'($urandom));
    reg_read(REG_STATUS, d);
    check(d == 8'b0000_0010, $sformatf("status full %b", d));
    reg_read(REG_LVL_LO, d);
    check(d == 8'd45, "level low byte");
    reg_read(REG_LVL_HI, d);
    check(d == 8'd0, "level high byte");
    reg_read(REG_DROP, d);
    check(d == dropped_in, "dropped register");
    for (int i = 0; i < 45; i++) begin
      logic [7:0] e;
      e = q[0];
      reg_read(REG_FIFO, d);
      check(d == e, $sformatf("FIFO byte %0d", i));
    end
    check(n_rx_rd == 45 && q.size() == 0, "one pop per FIFO read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
