// asic_model: behavioural model (not synthesizable logic of the design) of
// the serial port of the 64-channel neural recording ASIC, for testbenches.
//
// Commands: while en_trf is high, din is sampled on each rising edge of
// clk4m; when en_trf falls the collected word is checked (24 bits, command
// preamble, CRC-5) and recorded. A select command (payload[13:12] = 3)
// starts signal tracking: from then on the model sends an 85-bit frame on
// dout every frame_period master-clock cycles (FRAME_PERIOD at start, may be
// changed by the testbench): 8-bit PREAMBLE, the 72-bit
// packet nrec_tb_pkg::make_info(n, id) and its CRC-5, MSB first, with dout
// low between frames. In static mode id stays at the selected row; in sweep
// mode it runs 0..7 cyclically. A new select command takes effect at the
// next frame, so frames are never cut. dout changes just after each rising edge of
// clk4m. The frame layout follows the ASIC's description; command encoding,
// preamble values, CRC polynomial and sample values are the tests' choices.
module asic_model
  import nrec_tb_pkg::*;
#(
  parameter logic [7:0] PREAMBLE     = 8'hB8,
  parameter int         FRAME_PERIOD = 125
) (
  input  logic clk4m,
  input  logic din,
  input  logic en_trf,
  output logic dout
);
  // command reception
  logic [23:0] cmd_sh = '0;
  int          cmd_bits = 0;
  int          cmds_ok = 0, cmds_bad = 0;
  int          window_cycles [$];     // length of every en_trf window
  logic [23:0] cmds [$];
  logic        en_q = 1'b0;

  // tracking state
  bit          running = 0;
  bit          sweep = 0;
  logic [5:0]  row = '0;
  int unsigned frame_no = 0;          // frames sent
  logic [84:0] fr;
  int          bitpos = -1;           // bit of fr being sent, -1 when idle
  int          timer = 0;
  logic [5:0]  id_log [$];            // id of each frame sent
  int          frame_period = FRAME_PERIOD;  // may be changed by a testbench

  initial dout = 1'b0;

  always @(posedge clk4m) begin
    // command port
    en_q <= en_trf;
    if (en_trf) begin
      cmd_sh   <= {cmd_sh[22:0], din};
      cmd_bits <= cmd_bits + 1;
    end else if (en_q) begin
      window_cycles.push_back(cmd_bits);
      cmds.push_back(cmd_sh);
      if (cmd_bits == 24 && cmd_sh[23:19] == CMD_PREAMBLE &&
          crc5(128'(cmd_sh[23:5]), 19) == cmd_sh[4:0]) begin
        cmds_ok <= cmds_ok + 1;
        if (cmd_sh[18:17] == 2'b11) begin
          running <= 1;
          sweep   <= cmd_sh[16];
          row     <= {3'b000, cmd_sh[7:5]};
        end
      end else begin
        cmds_bad <= cmds_bad + 1;
      end
      cmd_bits <= 0;
    end

    // data port
    if (running) begin
      if (timer == 0) begin
        logic [5:0]  id;
        logic [71:0] info;
        id   = sweep ? 6'(frame_no % 8) : row;
        info = make_info(frame_no, id);
        fr   = {PREAMBLE, info, crc5(128'(info), 72)};
        id_log.push_back(id);
        frame_no <= frame_no + 1;
        bitpos   = 84;
      end
      timer <= (timer >= frame_period - 1) ? 0 : timer + 1;
    end
    if (bitpos >= 0) begin
      dout   <= fr[bitpos];
      bitpos = bitpos - 1;
    end else begin
      dout <= 1'b0;
    end
  end
endmodule
