// tb_write_ctrl: sends 85-bit frames (preamble 8'hB8, 72 information bits,
// 5-bit CRC) on the serial input, with idle gaps of random length (down to
// none, i.e. back-to-back frames) and random noise bytes that do not contain
// the preamble between frames. A memory model records the writes of each
// slot. Checks, per frame: nine information bytes and the CRC byte land at
// addresses 0..9 of the slot selected by toggle, toggle flips once per
// frame on the CRC write, slots alternate, and frame_cnt counts frames.
module tb_write_ctrl;
  import nrec_pkg::*;
  import nrec_tb_pkg::*;

  logic        clk = 1'b0, rst = 1'b1;
  logic        sdin = 1'b0;
  logic        wr_en, wr_slot, toggle;
  logic [3:0]  wr_addr;
  logic [7:0]  wr_data;
  logic [15:0] frame_cnt;
  int checks = 0, failures = 0;

  write_ctrl #(.PREAMBLE(8'hB8)) dut (
    .clk (clk), .rst (rst), .sdin (sdin), .wr_en (wr_en), .wr_slot (wr_slot),
    .wr_addr (wr_addr), .wr_data (wr_data), .toggle (toggle), .frame_cnt (frame_cnt)
  );

  always #125ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] mem [2][10];
  int         nwr [2] = '{0, 0};
  int         toggles = 0;
  logic       toggle_q = 1'b0;
  always @(posedge clk) begin
    if (!rst && wr_en) begin
      mem[wr_slot][wr_addr] = wr_data;
      nwr[wr_slot]++;
    end
  end
  always @(negedge clk) begin
    if (!rst) begin
      if (toggle != toggle_q) toggles++;
      toggle_q = toggle;
    end
  end

  task automatic send_bits(input logic [127:0] v, input int n);
    for (int i = n - 1; i >= 0; i--) begin
      @(negedge clk);
      sdin = v[i];
    end
  endtask

  initial begin
    logic [71:0] info;
    logic [4:0]  crc;
    int          slot_used [2] = '{0, 0};
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int f = 0; f < 30; f++) begin
      int gap, slot, w0;
      gap = (f % 5 == 0) ? 0 : int'($urandom % 20);
      // idle zeros, then noise bytes 8'h11 that cannot form the preamble
      send_bits(128'(0), gap);
      if (f % 7 == 3) send_bits(128'h1111, 16);
      info = make_info(f, 6'(f % 8));
      info[63:0] = {$urandom, $urandom};
      crc = crc5(128'(info), 72);
      slot = int'(toggle);
      w0 = nwr[slot];
      send_bits({43'b0, 8'hB8, info, crc}, 85);
      @(negedge clk); sdin = 1'b0;  // the CRC byte write, toggle flips
      @(negedge clk);
      check(toggle != 1'(slot), $sformatf("frame %0d: toggle flipped", f));
      check(nwr[slot] - w0 == 10, $sformatf("frame %0d: %0d writes", f, nwr[slot] - w0));
      for (int i = 0; i < 9; i++)
        check(mem[slot][i] == info[71 - 8*i -: 8], $sformatf("frame %0d byte %0d", f, i));
      check(mem[slot][9] == {3'b000, crc}, $sformatf("frame %0d CRC byte", f));
      check(frame_cnt == 16'(f + 1), "frame count");
      slot_used[slot]++;
    end
    @(negedge clk);
    check(toggles == 30, $sformatf("%0d toggles", toggles));
    check(slot_used[0] == 15 && slot_used[1] == 15, "slots alternate");
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
