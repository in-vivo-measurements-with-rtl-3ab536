// read_ctrl: read control unit of the data recording module, clocked by the
// 50 MHz FPGA clock.
//
// toggle, from the write control unit in the master-clock domain, passes a
// two-flop synchroniser. When it changes, a frame has been completed in the
// slot that toggle no longer selects; this unit reads that slot's FRAME_BYTES
// bytes in order and pushes each one into the FIFO. A byte takes two cycles
// (address, then registered read data). A frame is taken only if the FIFO
// has room for all of it (fifo_room); otherwise it is skipped whole and
// counted in frames_dropped, so the host always receives complete frames.
// While it reads one slot the write control unit fills the other, as the
// original system does; the byte order, the whole-frame drop on a full FIFO
// and the counters are this design's choices.
//
// Timing: the first byte enters the FIFO about 5 cycles after toggle changes,
// a frame of 10 bytes in about 24 cycles, far below one frame time of the
// ASIC (85 master-clock cycles = 1062 FPGA cycles).
module read_ctrl
  import nrec_pkg::*;
(
  input  logic        clk,          // clk50M
  input  logic        rst,
  input  logic        toggle,       // clk4M domain
  output logic        rd_slot,
  output logic [3:0]  rd_addr,
  input  logic [7:0]  rd_data,      // registered read data of rd_slot
  output logic        fifo_wr,
  output logic [7:0]  fifo_din,
  input  logic        fifo_full,
  input  logic        fifo_room,     // FIFO can take FRAME_BYTES more bytes
  output logic [15:0] frames_read,   // frames moved to the FIFO (wraps)
  output logic [15:0] frames_dropped // frames skipped for lack of room (wraps)
);
  typedef enum logic [1:0] {S_IDLE, S_ADDR, S_DATA} state_e;
  state_e     state;
  logic [1:0] tsync;
  logic       seen;      // toggle value of the last frame taken

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      tsync       <= '0;
      seen        <= 1'b0;
      rd_slot     <= 1'b0;
      rd_addr     <= '0;
      fifo_wr     <= 1'b0;
      fifo_din    <= '0;
      frames_read <= '0;
      frames_dropped <= '0;
    end else begin
      tsync   <= {tsync[0], toggle};
      fifo_wr <= 1'b0;
      unique case (state)
        S_IDLE: if (tsync[1] != seen) begin
          seen    <= tsync[1];
          rd_slot <= ~tsync[1];   // the slot just completed
          rd_addr <= '0;
          if (fifo_room) state <= S_ADDR;
          else           frames_dropped <= frames_dropped + 16'd1;
        end
        S_ADDR: state <= S_DATA;  // read data registered in the slot
        S_DATA: if (!fifo_full) begin
          fifo_wr  <= 1'b1;
          fifo_din <= rd_data;
          if (rd_addr == 4'(FRAME_BYTES - 1)) begin
            frames_read <= frames_read + 16'd1;
            state       <= S_IDLE;
          end else begin
            rd_addr <= rd_addr + 4'd1;
            state   <= S_ADDR;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
