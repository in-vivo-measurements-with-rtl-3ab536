// tb_fifo_ram: random pushes and pops against a queue model at the default
// depth (2048), including a phase that fills the FIFO to full and one that
// drains it to empty. Checks the first-word-fall-through data, empty, full
// and level every cycle. The testbench never writes when full nor reads when
// empty, so the FIFO's own assertions stay quiet.
module tb_fifo_ram;
  localparam int DEPTH = 2048;
  logic        clk = 1'b0, rst = 1'b1;
  logic        wr_en = 1'b0, rd_en = 1'b0;
  logic [7:0]  din = '0, rd_trf;
  logic        empty, full;
  logic [11:0] level;
  logic [7:0]  q [$];
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;

  fifo_ram #(.DEPTH(DEPTH), .W(8)) dut (
    .clk (clk), .rst (rst), .wr_en (wr_en), .din (din), .rd_en (rd_en),
    .rd_trf (rd_trf), .empty (empty), .full (full), .level (level)
  );

  always #10ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step(input int p_wr, input int p_rd);
    @(negedge clk);
    check(int'(level) == q.size(), $sformatf("level %0d vs %0d", level, q.size()));
    check(empty == (q.size() == 0), "empty flag");
    check(full == (q.size() == DEPTH), "full flag");
    if (q.size() != 0) check(rd_trf == q[0], "head data");
    if (full) n_full++;
    if (empty) n_empty++;
    wr_en = (q.size() < DEPTH) && (int'($urandom % 100) < p_wr);
    rd_en = (q.size() > 0) && (int'($urandom % 100) < p_rd);
    din   = 8'($urandom);
    @(posedge clk);
    if (rd_en) void'(q.pop_front());
    if (wr_en) q.push_back(din);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (3000) step(50, 50);
    repeat (5000) step(90, 10);   // fill up
    repeat (5000) step(10, 90);   // drain
    repeat (3000) step(60, 40);
    check(n_full > 0, "FIFO reached full");
    check(n_empty > 0, "FIFO reached empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
