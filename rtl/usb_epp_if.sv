// usb_epp_if: the FPGA side of the USB link, a state machine on the board's
// parallel port (8-bit bidirectional data bus db, control signals astb,
// dstb, wr and wt, run from the 50 MHz FPGA clock).
//
// The host runs EPP-style cycles: it drives wr (low = write), pulls the
// address strobe astb or the data strobe dstb low, waits for wt (wait) to
// rise, releases the strobe and waits for wt to fall. An address cycle
// writes the address register; a data cycle writes or reads the register it
// names (see nrec_pkg::reg_addr_e):
//   REG_CMD2/1/0  command bytes [23:16], [15:8], [7:0] -> tx_data; writing
//                 REG_CMD0 pulses wr_req for one cycle (the command goes out)
//   REG_FIFO      read: the FIFO head (rx_data), popped with a one-cycle rx_rd
//   REG_STATUS    read: {5'b0, cmd_busy, fifo_full, fifo_empty}
//   REG_LVL_LO/HI read: FIFO fill level
//   REG_DROP      read: frames dropped because the FIFO was full (mod 256)
// The strobes and wr pass two-flop synchronisers; db is sampled once the
// synchronised strobe is low, when it has long been stable. On reads db_oe
// is high while wt is high. The signal names, the 8-bit bus and the 24-bit
// tx_data follow the original system; the cycle protocol details and the register
// map are this design's choices. The tristate pad itself is outside this
// module (db_i, db_o, db_oe).
//
// Timing: wt rises 3-4 clk cycles after a strobe falls and falls 3-4 cycles
// after it rises.
module usb_epp_if
  import nrec_pkg::*;
(
  input  logic        clk,        // clk50M
  input  logic        rst,
  // host port
  input  logic        astb_n,
  input  logic        dstb_n,
  input  logic        wr_n,
  output logic        wt,
  input  logic [7:0]  db_i,
  output logic [7:0]  db_o,
  output logic        db_oe,
  // command path
  output logic [23:0] tx_data,
  output logic        wr_req,
  input  logic        cmd_busy,
  // recording path
  input  logic [7:0]  rx_data,
  output logic        rx_rd,
  input  logic        fifo_empty,
  input  logic        fifo_full,
  input  logic [15:0] fifo_level,
  input  logic [7:0]  frames_dropped
);
  typedef enum logic [1:0] {S_IDLE, S_ACK} state_e;
  state_e     state;
  logic [1:0] astb_s, dstb_s, wr_s;
  logic [7:0] addr;
  logic       reading;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      astb_s  <= 2'b11;
      dstb_s  <= 2'b11;
      wr_s    <= 2'b11;
      addr    <= '0;
      tx_data <= '0;
      wr_req  <= 1'b0;
      rx_rd   <= 1'b0;
      wt      <= 1'b0;
      db_o    <= '0;
      reading <= 1'b0;
    end else begin
      astb_s <= {astb_s[0], astb_n};
      dstb_s <= {dstb_s[0], dstb_n};
      wr_s   <= {wr_s[0], wr_n};
      wr_req <= 1'b0;
      rx_rd  <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (!astb_s[1]) begin
            if (!wr_s[1]) addr <= db_i;
            else          db_o <= addr;
            reading <= wr_s[1];
            wt      <= 1'b1;
            state   <= S_ACK;
          end else if (!dstb_s[1]) begin
            reading <= wr_s[1];
            wt      <= 1'b1;
            state   <= S_ACK;
            if (!wr_s[1]) begin
              unique case (addr)
                REG_CMD2: tx_data[23:16] <= db_i;
                REG_CMD1: tx_data[15:8]  <= db_i;
                REG_CMD0: begin
                  tx_data[7:0] <= db_i;
                  wr_req       <= 1'b1;
                end
                default: ;
              endcase
            end else begin
              unique case (addr)
                REG_CMD2:   db_o <= tx_data[23:16];
                REG_CMD1:   db_o <= tx_data[15:8];
                REG_CMD0:   db_o <= tx_data[7:0];
                REG_FIFO: begin
                  db_o  <= fifo_empty ? 8'h00 : rx_data;
                  rx_rd <= !fifo_empty;
                end
                REG_STATUS: db_o <= {5'b0, cmd_busy, fifo_full, fifo_empty};
                REG_LVL_LO: db_o <= fifo_level[7:0];
                REG_LVL_HI: db_o <= fifo_level[15:8];
                REG_DROP:   db_o <= frames_dropped;
                default:    db_o <= 8'h00;
              endcase
            end
          end
        end
        S_ACK: if (astb_s[1] && dstb_s[1]) begin
          wt      <= 1'b0;
          reading <= 1'b0;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign db_oe = reading;
endmodule
