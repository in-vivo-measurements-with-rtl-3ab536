// neural_fpga_if: FPGA interface between a USB host and a 64-channel neural
// recording ASIC.
//
// Two paths share the host port (usb_epp_if):
//  * Logic control (commands to the ASIC). The host writes a 24-bit command
//    (5-bit preamble, 14-bit payload, 5-bit CRC, all computed by the host).
//    The command controller has the PISO load it in the 4 MHz domain and,
//    once the PISO is valid, raises en_pls; the DFF sync turns it into
//    en_trf, high for exactly the 24 master-clock cycles in which the PISO
//    shifts the word out on Din, MSB first.
//  * Data recording (frames from the ASIC). The write control unit finds
//    each 85-bit frame (8-bit preamble, 72-bit information packet, 5-bit CRC)
//    on Dout and stores it in one of two memory slots, alternating, flipping
//    toggle after each frame. The read control unit, on the 50 MHz clock,
//    copies the completed slot byte by byte into the FIFO, which the host
//    drains through the REG_FIFO register, ten bytes per frame. A frame that
//    finds the FIFO without room for all ten bytes is dropped whole and
//    counted (REG_DROP).
// The freq_divider makes the ASIC's 4 MHz master clock from the 50 MHz FPGA
// clock; all 4 MHz logic runs on it. Signals that cross between the two
// clocks do so through synchronisers (toggle, PISO valid, load request,
// en_pls) or through the memory slots, which one side reads only after the
// other has finished writing.
//
// The structure follows the original system's two block diagrams; widths, the
// register map, the preamble value, the FIFO depth and the clock-crossing
// details are this design's choices. Reset is synchronous and active high;
// the 4 MHz logic is reset by a stretched copy of it (see below), so the
// design is ready about 100 FPGA cycles after rst falls.
module neural_fpga_if
  import nrec_pkg::*;
#(
  parameter int unsigned F_IN_HZ    = 50_000_000,
  parameter int unsigned F_OUT_HZ   = 4_000_000,
  parameter int unsigned FIFO_DEPTH = 2048,
  parameter logic [7:0]  PREAMBLE   = 8'hB8
) (
  input  logic       clk50m,
  input  logic       rst,
  // host (USB board) port
  input  logic       epp_astb_n,
  input  logic       epp_dstb_n,
  input  logic       epp_wr_n,
  output logic       epp_wait,
  input  logic [7:0] epp_db_i,
  output logic [7:0] epp_db_o,
  output logic       epp_db_oe,
  // ASIC port
  output logic       asic_clk4m,
  output logic       asic_din,
  output logic       asic_en_trf,
  input  logic       asic_dout
);
  localparam int unsigned LW = $clog2(FIFO_DEPTH + 1);

  logic clk4m, tick4m;

  // command path
  logic [CMD_BITS-1:0] tx_data;
  logic                wr_req, cmd_busy, load_tgl, en_pls;
  logic                piso_valid, piso_last;
  logic [7:0]          cmd_dropped;
  logic                en_trf;

  // recording path
  logic        wc_wr_en, wc_wr_slot, toggle;
  logic [3:0]  wc_wr_addr;
  logic [7:0]  wc_wr_data;
  logic [15:0] frames_stored, frames_read, frames_dropped;
  logic        fifo_room;
  logic        rd_slot;
  logic [3:0]  rd_addr;
  logic [7:0]  rd_data;
  logic        fifo_wr, fifo_rd, fifo_empty, fifo_full;
  logic [7:0]  fifo_din, fifo_dout;
  logic [LW-1:0] fifo_level;

  // The master clock stands still while the divider is in reset, so the
  // reset of everything but the divider is stretched by 48 FPGA cycles
  // (about four master-clock periods); the 4 MHz logic takes it through a
  // two-flop synchroniser. The 50 MHz logic thus leaves reset while the
  // 4 MHz logic is still held, with toggle and valid already cleared.
  logic [5:0] rst_cnt;
  logic       rst_hold;
  logic [1:0] rst4m_s;
  logic       rst4m;
  always_ff @(posedge clk50m) begin
    if (rst)               rst_cnt <= 6'd48;
    else if (rst_cnt != 0) rst_cnt <= rst_cnt - 6'd1;
  end
  assign rst_hold = rst | (rst_cnt != 0);
  always_ff @(posedge clk4m) rst4m_s <= {rst4m_s[0], rst_hold};
  assign rst4m = rst4m_s[1];

  freq_divider #(.F_IN_HZ(F_IN_HZ), .F_OUT_HZ(F_OUT_HZ)) u_div (
    .clk_in (clk50m), .rst (rst), .clk_out (clk4m), .tick_out (tick4m)
  );

  usb_epp_if u_usb (
    .clk (clk50m), .rst (rst_hold),
    .astb_n (epp_astb_n), .dstb_n (epp_dstb_n), .wr_n (epp_wr_n), .wt (epp_wait),
    .db_i (epp_db_i), .db_o (epp_db_o), .db_oe (epp_db_oe),
    .tx_data (tx_data), .wr_req (wr_req), .cmd_busy (cmd_busy),
    .rx_data (fifo_dout), .rx_rd (fifo_rd),
    .fifo_empty (fifo_empty), .fifo_full (fifo_full), .fifo_level (16'(fifo_level)),
    .frames_dropped (frames_dropped[7:0])
  );

  cmd_controller u_ctrl (
    .clk (clk50m), .rst (rst_hold), .ws (wr_req), .valid (piso_valid),
    .load_tgl (load_tgl), .en_pls (en_pls), .busy (cmd_busy), .dropped (cmd_dropped)
  );

  piso #(.W(CMD_BITS)) u_piso (
    .clk (clk4m), .rst (rst4m), .din (tx_data), .load_tgl (load_tgl),
    .shift_en (en_trf), .dout (asic_din), .valid (piso_valid), .last (piso_last)
  );

  dff_sync u_sync (
    .clk (clk4m), .rst (rst4m), .en (en_pls), .valid (piso_valid), .last (piso_last),
    .en_trf (en_trf)
  );

  // While the 4 MHz logic waits for its reset, its flops hold their
  // power-up values; the window seen by the ASIC is kept closed until then.
  assign asic_en_trf = en_trf & ~rst_hold;

  write_ctrl #(.PREAMBLE(PREAMBLE)) u_wr (
    .clk (clk4m), .rst (rst4m), .sdin (asic_dout),
    .wr_en (wc_wr_en), .wr_slot (wc_wr_slot), .wr_addr (wc_wr_addr), .wr_data (wc_wr_data),
    .toggle (toggle), .frame_cnt (frames_stored)
  );

  pingpong_buf #(.DEPTH(FRAME_BYTES), .W(8)) u_buf (
    .wr_clk (clk4m), .wr_en (wc_wr_en), .wr_slot (wc_wr_slot), .wr_addr (wc_wr_addr),
    .wr_data (wc_wr_data),
    .rd_clk (clk50m), .rd_slot (rd_slot), .rd_addr (rd_addr), .rd_data (rd_data)
  );

  read_ctrl u_rd (
    .clk (clk50m), .rst (rst_hold), .toggle (toggle),
    .rd_slot (rd_slot), .rd_addr (rd_addr), .rd_data (rd_data),
    .fifo_wr (fifo_wr), .fifo_din (fifo_din), .fifo_full (fifo_full),
    .fifo_room (fifo_room), .frames_read (frames_read), .frames_dropped (frames_dropped)
  );

  fifo_ram #(.DEPTH(FIFO_DEPTH), .W(8)) u_fifo (
    .clk (clk50m), .rst (rst_hold), .wr_en (fifo_wr), .din (fifo_din),
    .rd_en (fifo_rd), .rd_trf (fifo_dout),
    .empty (fifo_empty), .full (fifo_full), .level (fifo_level)
  );

  assign fifo_room  = (fifo_level <= LW'(FIFO_DEPTH - FRAME_BYTES));
  assign asic_clk4m = clk4m;
endmodule
