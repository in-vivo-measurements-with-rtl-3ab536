// tb_tracking_workloads: sustained recording at the two tracking rates and
// at the capture limit, with the design at its default parameters.
//
// A chip model streams frames and an EPP host drains the FIFO continuously
// (the address register is set to REG_FIFO once, then only data cycles are
// run, about 20 FPGA cycles per byte). Three phases, N_FRAMES frames each:
//   1. one row, 8 channels at 30 kS/s: a frame every 133 master clocks
//   2. whole array, 64 channels at 4 kS/s: 8 rows x 4 kHz = a frame every
//      125 master clocks, id sweeping 0..7
//   3. back-to-back frames (85 master clocks), the most the link can carry
// Every frame is checked against the model (mode, id, samples, CRC) and no
// frame may be dropped. The test also checks the measured frame rate of
// each phase against the configured period.
module tb_tracking_workloads;
  import nrec_pkg::*;
  import nrec_tb_pkg::*;

  localparam int N_FRAMES = 300;

  logic       clk = 1'b0, rst = 1'b1;
  logic       astb_n = 1'b1, dstb_n = 1'b1, wr_n = 1'b1;
  logic       epp_wait, db_oe;
  logic [7:0] db_i = '0, db_o;
  logic       clk4m, din, en_trf, dout;
  int checks = 0, failures = 0;

  neural_fpga_if dut (
    .clk50m (clk), .rst (rst),
    .epp_astb_n (astb_n), .epp_dstb_n (dstb_n), .epp_wr_n (wr_n), .epp_wait (epp_wait),
    .epp_db_i (db_i), .epp_db_o (db_o), .epp_db_oe (db_oe),
    .asic_clk4m (clk4m), .asic_din (din), .asic_en_trf (en_trf), .asic_dout (dout)
  );

  asic_model #(.PREAMBLE(8'hB8), .FRAME_PERIOD(133)) asic (
    .clk4m (clk4m), .din (din), .en_trf (en_trf), .dout (dout)
  );

  always #10ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic epp_cycle(input bit addr_cycle, input bit write, input logic [7:0] wdata,
                           output logic [7:0] rdata);
    @(posedge clk);
    wr_n = !write;
    db_i = wdata;
    @(posedge clk);
    if (addr_cycle) astb_n = 1'b0; else dstb_n = 1'b0;
    while (!epp_wait) @(posedge clk);
    @(posedge clk);
    rdata = db_o;
    astb_n = 1'b1;
    dstb_n = 1'b1;
    while (epp_wait) @(posedge clk);
    wr_n = 1'b1;
  endtask

  task automatic reg_write(input logic [7:0] a, input logic [7:0] d);
    logic [7:0] dummy;
    epp_cycle(1, 1, a, dummy);
    epp_cycle(0, 1, d, dummy);
  endtask

  task automatic send_cmd(input logic [13:0] payload);
    logic [23:0] c;
    c = make_cmd(payload);
    reg_write(REG_CMD2, c[23:16]);
    reg_write(REG_CMD1, c[15:8]);
    reg_write(REG_CMD0, c[7:0]);
    while (dut.cmd_busy) @(posedge clk);
    repeat (2) @(posedge clk4m);
  endtask

  int unsigned next_frame = 0;
  int          ids_seen = 0;

  // drain: REG_FIFO is already in the address register
  task automatic read_frame();
    logic [7:0]  b [FRAME_BYTES];
    logic [71:0] info, exp_info;
    logic [7:0]  dummy;
    for (int i = 0; i < int'(FRAME_BYTES); i++) begin
      while (dut.fifo_empty) @(posedge clk);
      epp_cycle(0, 0, 8'h00, b[i]);
    end
    for (int i = 0; i < 9; i++) info[71 - 8*i -: 8] = b[i];
    exp_info = make_info(next_frame, asic.id_log[next_frame]);
    check(info == exp_info, $sformatf("frame %0d content", next_frame));
    check(b[9] == {3'b000, crc5(128'(exp_info), 72)}, $sformatf("frame %0d CRC", next_frame));
    ids_seen |= 1 << int'(asic.id_log[next_frame][2:0]);
    next_frame++;
  endtask

  task automatic phase(input string name, input int period, input bit sweep, input bit restart);
    longint t0, t1;
    int f0;
    asic.frame_period = period;
    if (restart) send_cmd({2'b11, sweep, 8'h00, 3'd5});
    begin
      logic [7:0] dummy;
      epp_cycle(1, 1, REG_FIFO, dummy);
    end
    ids_seen = 0;
    // skip frames still in flight from the previous phase
    repeat (4) read_frame();
    f0 = int'(asic.frame_no);
    t0 = cyc;
    repeat (N_FRAMES) read_frame();
    t1 = cyc;
    check(dut.frames_dropped == 0, $sformatf("%s: no frame dropped (%0d)", name, dut.frames_dropped));
    begin
      real rate = real'(int'(asic.frame_no) - f0) / (real'(t1 - t0) * 20.0e-9);
      real want = 4.0e6 / real'(period);
      check(rate > 0.97 * want && rate < 1.03 * want,
            $sformatf("%s: %0.0f frames/s, expected %0.0f", name, rate, want));
      $display("%s: %0d frames checked, %0.0f frames/s, max FIFO level seen %0d bytes",
               name, N_FRAMES, rate, max_level);
    end
    if (sweep) check(ids_seen == 8'hFF, $sformatf("%s: all 8 row ids seen", name));
    else       check(ids_seen == 8'h20, $sformatf("%s: only row 5 seen", name));
  endtask

  int max_level = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (!dut.rst_hold && int'(dut.fifo_level) > max_level) max_level = int'(dut.fifo_level);

  initial begin
    repeat (40) @(posedge clk);
    rst = 1'b0;
    repeat (120) @(posedge clk);
    send_cmd({2'b00, 12'h123});
    send_cmd({2'b01, 12'h045});
    phase("8 ch at 30 kS/s", 133, 1'b0, 1'b1);
    phase("64 ch at 4 kS/s", 125, 1'b1, 1'b1);
    phase("back-to-back frames", 85, 1'b1, 1'b0);
    check(asic.cmds_bad == 0, $sformatf("commands intact (%0d bad)", asic.cmds_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
