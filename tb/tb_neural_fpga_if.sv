// tb_neural_fpga_if: end-to-end test of the FPGA interface at its default
// parameters (50 MHz clock, 4 MHz master clock, 2048-byte FIFO), with a
// behavioural ASIC model on the serial side and an EPP host on the other.
//
// Sequence: reset; three start-up commands (bandpass, gain calibration,
// select a single row = static tracking); read and check frames; a select
// command that sweeps all eight rows; read and check frames; stop reading
// until the FIFO overflows and frames are dropped; drain and check again.
// Every frame read is compared with the packet the model sent (mode, id,
// eight samples, CRC). Each command's en_trf window must be 24 master
// clocks long and the word must reach the model intact. Mechanisms counted
// and required at least once: command transfer, busy seen by the host, both
// memory slots written, static and sweep frames, all eight sweep ids, FIFO
// full, frames dropped, empty FIFO read. Frame period of the model: 133
// master clocks in static mode (8 channels at 30 kS/s) and 125 in sweep mode
// (64 channels at 4 kS/s).
module tb_neural_fpga_if;
  import nrec_pkg::*;
  import nrec_tb_pkg::*;

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

  asic_model #(.PREAMBLE(8'hB8), .FRAME_PERIOD(125)) asic (
    .clk4m (clk4m), .din (din), .en_trf (en_trf), .dout (dout)
  );

  always #10ns clk = ~clk;  // 50 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- EPP host ----------------
  task automatic epp_cycle(input bit addr_cycle, input bit write, input logic [7:0] wdata,
                           output logic [7:0] rdata);
    @(posedge clk);
    wr_n = !write;
    db_i = wdata;
    repeat (2) @(posedge clk);
    if (addr_cycle) astb_n = 1'b0; else dstb_n = 1'b0;
    while (!epp_wait) @(posedge clk);
    @(posedge clk);
    rdata = db_o;
    if (!write) check(db_oe, "db driven during a read cycle");
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

  task automatic reg_read(input logic [7:0] a, output logic [7:0] d);
    logic [7:0] dummy;
    epp_cycle(1, 1, a, dummy);
    epp_cycle(0, 0, 8'h00, d);
  endtask

  // ---------------- mechanism counters ----------------
  int n_cmd = 0, n_busy_seen = 0, n_slot [2] = '{0, 0}, n_static = 0, n_sweep = 0;
  int n_full = 0, n_dropped = 0, n_empty_read = 0;
  bit id_seen [8];

  // en_trf windows measured on the master clock
  int win = 0;
  int windows [$];
  always @(posedge clk4m) begin
    if (en_trf) win <= win + 1;
    else if (win != 0) begin
      windows.push_back(win);
      win <= 0;
    end
  end

  // slot usage: count the CRC-byte writes into each slot
  always @(posedge clk4m) begin
    if (dut.wc_wr_en && dut.wc_wr_addr == 4'(FRAME_BYTES - 1)) n_slot[dut.wc_wr_slot]++;
  end

  task automatic send_cmd(input logic [13:0] payload);
    logic [23:0] c;
    logic [7:0]  st;
    int          n_prev;
    c = make_cmd(payload);
    n_prev = asic.cmds.size();
    reg_write(REG_CMD2, c[23:16]);
    reg_write(REG_CMD1, c[15:8]);
    reg_write(REG_CMD0, c[7:0]);
    reg_read(REG_STATUS, st);
    if (st[2]) n_busy_seen++;
    do reg_read(REG_STATUS, st); while (st[2]);
    repeat (2) @(posedge clk4m);  // the model records the word after en_trf falls
    check(asic.cmds.size() == n_prev + 1, $sformatf("command %0d reached the ASIC (%0d seen)", n_cmd, asic.cmds.size()));
    if (asic.cmds.size() == n_prev + 1) begin
      check(asic.cmds[n_prev] == c, $sformatf("command %h received as %h", c, asic.cmds[n_prev]));
      check(asic.window_cycles[n_prev] == 24,
            $sformatf("en_trf window %0d cycles", asic.window_cycles[n_prev]));
      n_cmd++;
    end
  endtask

  int unsigned next_frame = 0;   // number of the next frame expected from the FIFO

  task automatic read_frame();
    logic [7:0]  b [FRAME_BYTES];
    logic [71:0] info, exp_info;
    logic [5:0]  id;
    for (int i = 0; i < int'(FRAME_BYTES); i++) reg_read(REG_FIFO, b[i]);
    for (int i = 0; i < 9; i++) info[71 - 8*i -: 8] = b[i];
    check(next_frame < asic.id_log.size(), "frame was sent by the ASIC");
    id = asic.id_log[next_frame];
    exp_info = make_info(next_frame, id);
    check(info == exp_info, $sformatf("frame %0d: got %h exp %h", next_frame, info, exp_info));
    check(b[9] == {3'b000, crc5(128'(exp_info), 72)}, $sformatf("frame %0d CRC byte", next_frame));
    if (asic.sweep && next_frame > 0 && id != asic.row) n_sweep++;
    if (!asic.sweep || id == asic.row) n_static++;
    id_seen[id[2:0]] = 1;
    next_frame++;
  endtask

  function automatic int fifo_frames();
    return int'(dut.fifo_level) / int'(FRAME_BYTES);
  endfunction

  task automatic read_level(output int lvl);
    logic [7:0] lo, hi;
    reg_read(REG_LVL_LO, lo);
    reg_read(REG_LVL_HI, hi);
    lvl = int'({hi, lo});
  endtask

  task automatic read_frames(input int n);
    int lvl;
    for (int k = 0; k < n; k++) begin
      do read_level(lvl); while (lvl < int'(FRAME_BYTES));
      check(lvl % int'(FRAME_BYTES) == 0, "FIFO holds whole frames");
      read_frame();
    end
  endtask

  initial begin
    logic [7:0] st, d;
    int lvl, dropped;
    repeat (40) @(posedge clk);
    rst = 1'b0;
    repeat (120) @(posedge clk);

    // empty FIFO read returns 0 and pops nothing
    reg_read(REG_FIFO, d);
    reg_read(REG_STATUS, st);
    check(d == 8'h00 && st[0], $sformatf("empty FIFO read d=%h st=%h lvl=%0d", d, st, dut.fifo_level));
    n_empty_read++;

    // start-up: bandpass, gain calibration, select row 3 (static tracking)
    send_cmd({2'b00, 12'h5A3});
    send_cmd({2'b01, 12'h0F0});
    // 8 channels at 30 kS/s: one frame every 4 MHz / 30 kHz = 133 master clocks
    asic.frame_period = 133;
    send_cmd({2'b11, 1'b0, 8'h00, 3'd3});
    read_frames(24);
    check(n_static >= 24, "static tracking frames");

    // sweep all rows, 64 channels at 4 kS/s: 8 x 4 kHz = 32 k frames/s,
    // one frame every 125 master clocks
    asic.frame_period = 125;
    send_cmd({2'b11, 1'b1, 8'h00, 3'd0});
    read_frames(40);

    // overflow: stop reading until frames are dropped
    do begin
      repeat (2000) @(posedge clk);
      reg_read(REG_STATUS, st);
    end while (!st[1] && dut.frames_dropped == 0);
    repeat (3 * 125 * 13) @(posedge clk);
    reg_read(REG_STATUS, st);
    if (st[1] || int'(dut.fifo_level) > 2048 - 2 * int'(FRAME_BYTES)) n_full++;
    reg_read(REG_DROP, d);
    check(d != 0, "frames dropped while the FIFO was full");
    // drain every frame that made it into the FIFO
    read_level(lvl);
    check(lvl % int'(FRAME_BYTES) == 0, "FIFO full of whole frames");
    for (int k = 0; k < lvl / int'(FRAME_BYTES); k++) read_frame();
    // frames dropped since then: skip them, then continue checking
    reg_read(REG_DROP, d);
    dropped = int'(d);
    n_dropped = dropped;
    next_frame += dropped;
    read_frames(10);

    // mechanism coverage
    check(n_cmd == 4, "four commands transferred");
    check(n_busy_seen > 0, "busy seen by the host");
    check(n_slot[0] > 0 && n_slot[1] > 0, "both memory slots used");
    check(n_static > 0, "static frames");
    check(n_sweep > 0, "sweep frames");
    for (int i = 0; i < 8; i++) check(id_seen[i], $sformatf("row id %0d seen", i));
    check(n_full > 0, "FIFO full");
    check(n_dropped > 0, "frames dropped");
    check(asic.cmds_bad == 0, "no malformed command at the ASIC");
    $display("mechanisms: commands=%0d busy=%0d slot1=%0d slot2=%0d static=%0d sweep=%0d full=%0d dropped=%0d empty_read=%0d",
             n_cmd, n_busy_seen, n_slot[0], n_slot[1], n_static, n_sweep, n_full, n_dropped, n_empty_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
