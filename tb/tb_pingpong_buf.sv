// tb_pingpong_buf: fills the two slots alternately with different random
// frames through the write port, steered by wr_slot, and reads each slot
// back through the read port with rd_slot. Checks that each slot returns its
// own frame (the write demultiplexer and read multiplexer select the right
// slot) and that writing one slot leaves the other untouched.
module tb_pingpong_buf;
  logic       wclk = 1'b0, rclk = 1'b0;
  logic       wr_en = 1'b0, wr_slot = 1'b0, rd_slot = 1'b0;
  logic [3:0] wr_addr = '0, rd_addr = '0;
  logic [7:0] wr_data = '0, rd_data;
  logic [7:0] ref_mem [2][10];
  int checks = 0, failures = 0;

  pingpong_buf #(.DEPTH(10), .W(8)) dut (
    .wr_clk (wclk), .wr_en (wr_en), .wr_slot (wr_slot), .wr_addr (wr_addr), .wr_data (wr_data),
    .rd_clk (rclk), .rd_slot (rd_slot), .rd_addr (rd_addr), .rd_data (rd_data)
  );

  always #125ns wclk = ~wclk;
  always #10ns  rclk = ~rclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write_slot(input bit s);
    for (int a = 0; a < 10; a++) begin
      @(negedge wclk);
      wr_en = 1'b1; wr_slot = s; wr_addr = 4'(a); wr_data = 8'($urandom);
      ref_mem[s][a] = wr_data;
    end
    @(negedge wclk); wr_en = 1'b0;
  endtask

  task automatic read_slot(input bit s, input int r);
    for (int a = 0; a < 10; a++) begin
      @(negedge rclk); rd_slot = s; rd_addr = 4'(a);
      @(negedge rclk);
      check(rd_data == ref_mem[s][a], $sformatf("round %0d slot %0d addr %0d", r, s, a));
    end
  endtask

  initial begin
    write_slot(0);
    write_slot(1);
    for (int r = 0; r < 10; r++) begin
      bit s = 1'(r);
      write_slot(s);
      read_slot(!s, r);  // the slot not being written
      read_slot(s, r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge wclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
