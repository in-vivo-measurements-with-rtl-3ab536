// tb_read_ctrl: the testbench plays the write side (4 MHz): it fills one of
// two slot models with a random 10-byte frame and flips toggle, alternating
// slots, and a registered-read memory model answers rd_slot/rd_addr on the
// 50 MHz side. FIFO pushes are collected in a queue. Checks that every frame
// arrives complete and in order from the slot just written, within 30
// cycles of the toggle, and that with fifo_room low a frame is skipped whole
// and counted in frames_dropped.
module tb_read_ctrl;
  logic        clk = 1'b0, wclk = 1'b0, rst = 1'b1;
  logic        toggle = 1'b0;
  logic        rd_slot;
  logic [3:0]  rd_addr;
  logic [7:0]  rd_data;
  logic        fifo_wr;
  logic [7:0]  fifo_din;
  logic        fifo_full = 1'b0, fifo_room = 1'b1;
  logic [15:0] frames_read, frames_dropped;
  logic [7:0]  mem [2][10];
  logic [7:0]  got [$];
  int checks = 0, failures = 0;

  read_ctrl dut (
    .clk (clk), .rst (rst), .toggle (toggle), .rd_slot (rd_slot), .rd_addr (rd_addr),
    .rd_data (rd_data), .fifo_wr (fifo_wr), .fifo_din (fifo_din), .fifo_full (fifo_full),
    .fifo_room (fifo_room), .frames_read (frames_read), .frames_dropped (frames_dropped)
  );

  always #10ns  clk  = ~clk;
  always #125ns wclk = ~wclk;

  always @(posedge clk) begin
    rd_data <= mem[rd_slot][rd_addr];
    if (!rst && fifo_wr) got.push_back(fifo_din);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int dropped = 0, taken = 0;
    for (int s = 0; s < 2; s++) for (int a = 0; a < 10; a++) mem[s][a] = '0;
    repeat (5) @(posedge clk);
    rst = 1'b0;
    for (int f = 0; f < 24; f++) begin
      logic [7:0] frame [10];
      bit s, skip;
      int t;
      s = toggle;           // the write side fills the slot toggle selects
      skip = (f % 6 == 5);
      @(negedge wclk);
      for (int a = 0; a < 10; a++) begin
        frame[a] = 8'($urandom);
        mem[s][a] = frame[a];
      end
      fifo_room = !skip;
      toggle = ~toggle;
      got.delete();
      t = 0;
      repeat (40) begin @(negedge clk); t++; if (got.size() == 10) break; end
      if (skip) begin
        dropped++;
        check(got.size() == 0, $sformatf("frame %0d skipped when no room", f));
      end else begin
        taken++;
        check(got.size() == 10, $sformatf("frame %0d: %0d bytes", f, got.size()));
        check(t <= 30, $sformatf("frame %0d took %0d cycles", f, t));
        for (int a = 0; a < 10 && a < got.size(); a++)
          check(got[a] == frame[a], $sformatf("frame %0d byte %0d", f, a));
        check(rd_slot == s, "read the slot just written");
      end
      // idle before the next frame
      repeat (4) @(negedge wclk);
      fifo_room = 1'b1;
    end
    check(frames_read == 16'(taken), $sformatf("frames_read %0d vs %0d", frames_read, taken));
    check(frames_dropped == 16'(dropped), $sformatf("frames_dropped %0d vs %0d", frames_dropped, dropped));
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
