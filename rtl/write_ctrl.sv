// write_ctrl: write control unit of the data recording module, clocked by
// the 4 MHz master clock.
//
// It watches the ASIC's serial output (Dout), sampled on each rising clk
// edge. While hunting it compares the last 8 bits received with PREAMBLE;
// on a match it takes the next 72 information bits, MSB first, and writes
// them into the current memory slot as nine bytes (addresses 0..8) as soon
// as each byte is complete, then takes the 5-bit CRC and writes it as byte 9
// ({3'b000, crc}). With that last write it flips toggle, which selects the
// other slot for the next frame and tells the read control unit that a frame
// is ready. Then it hunts again. Alternating two slots and signalling each
// stored frame with toggle follows the original system; the preamble value, the
// byte layout and keeping the CRC unchecked for the host are this design's
// choices.
//
// Timing: the memory write port is registered (one cycle after a byte is
// complete); toggle flips on the edge that writes the CRC byte, one cycle
// after the last CRC bit is sampled. Back-to-back frames are accepted.
module write_ctrl
  import nrec_pkg::*;
#(
  parameter logic [7:0] PREAMBLE = 8'hB8
) (
  input  logic        clk,        // clk4M
  input  logic        rst,
  input  logic        sdin,       // ASIC Dout
  output logic        wr_en,
  output logic        wr_slot,    // slot being written (equals toggle)
  output logic [3:0]  wr_addr,
  output logic [7:0]  wr_data,
  output logic        toggle,
  output logic [15:0] frame_cnt   // frames stored (wraps)
);
  localparam int unsigned PAY_BITS = FRAME_INFO_BITS + FRAME_CRC_BITS;  // 77

  typedef enum logic {S_HUNT, S_DATA} state_e;
  state_e     state;
  logic [7:0] sh;        // preamble window / byte assembly
  logic [6:0] bitcnt;    // payload bits received so far
  logic [7:0] sh_next;

  assign sh_next = {sh[6:0], sdin};

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_HUNT;
      sh        <= '0;
      bitcnt    <= '0;
      toggle    <= 1'b0;
      wr_en     <= 1'b0;
      wr_addr   <= '0;
      wr_data   <= '0;
      frame_cnt <= '0;
    end else begin
      wr_en <= 1'b0;
      unique case (state)
        S_HUNT: begin
          if (sh_next == PREAMBLE) begin
            state  <= S_DATA;
            sh     <= '0;
            bitcnt <= '0;
          end else begin
            sh <= sh_next;
          end
        end
        S_DATA: begin
          sh     <= sh_next;
          bitcnt <= bitcnt + 7'd1;
          if (bitcnt < 7'(FRAME_INFO_BITS) && bitcnt[2:0] == 3'd7) begin
            wr_en   <= 1'b1;
            wr_addr <= 4'(bitcnt[6:3]);
            wr_data <= sh_next;
          end
          if (bitcnt == 7'(PAY_BITS - 1)) begin
            wr_en     <= 1'b1;
            wr_addr   <= 4'(FRAME_BYTES - 1);
            wr_data   <= {3'b000, sh_next[4:0]};
            state     <= S_HUNT;
            sh        <= '0;
          end
        end
        default: state <= S_HUNT;
      endcase
      // The slot write is registered: the CRC byte lands in the memory on
      // this edge, and the slot select flips with it.
      if (wr_en && wr_addr == 4'(FRAME_BYTES - 1)) begin
        toggle    <= ~toggle;
        frame_cnt <= frame_cnt + 16'd1;
      end
    end
  end

  assign wr_slot = toggle;
endmodule
