// tb_mem_slot: writes random bytes through the 4 MHz write port and reads
// them back through the 50 MHz read port, comparing with a reference array.
// Checks the one-cycle registered read latency and that unwritten addresses
// keep their previous contents.
module tb_mem_slot;
  logic       wclk = 1'b0, rclk = 1'b0;
  logic       wr_en = 1'b0;
  logic [3:0] wr_addr = '0, rd_addr = '0;
  logic [7:0] wr_data = '0, rd_data;
  logic [7:0] ref_mem [10];
  int checks = 0, failures = 0;

  mem_slot #(.DEPTH(10), .W(8)) dut (
    .wr_clk (wclk), .wr_en (wr_en), .wr_addr (wr_addr), .wr_data (wr_data),
    .rd_clk (rclk), .rd_addr (rd_addr), .rd_data (rd_data)
  );

  always #125ns wclk = ~wclk;
  always #10ns  rclk = ~rclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int r = 0; r < 8; r++) begin
      // write all or some addresses
      for (int a = 0; a < 10; a++) begin
        if (r == 0 || $urandom % 2 == 0) begin
          @(negedge wclk);
          wr_en = 1'b1; wr_addr = 4'(a); wr_data = 8'($urandom);
          ref_mem[a] = wr_data;
        end
      end
      @(negedge wclk); wr_en = 1'b0;
      @(negedge wclk);
      // read back
      for (int a = 9; a >= 0; a--) begin
        @(negedge rclk); rd_addr = 4'(a);
        @(negedge rclk);
        check(rd_data == ref_mem[a], $sformatf("round %0d addr %0d: %h vs %h", r, a, rd_data, ref_mem[a]));
      end
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
