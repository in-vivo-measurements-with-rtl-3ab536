// cmd_controller: command controller of the logic control module, in the
// 50 MHz FPGA clock domain.
//
// On a write request (ws, the USB interface's one-cycle wr_req pulse) it
// flips load_tgl so that the PISO, in the master-clock domain, loads the
// command word. It waits until the PISO reports valid data, then raises
// en_pls, which the DFF sync turns into the ASIC's en_trf window, and holds
// it until the PISO has been emptied. busy is high from the request until
// the transfer has ended; the host must not write a new command meanwhile,
// and a ws that arrives while busy is ignored (and counted in dropped).
// Raising en_trf only once the PISO is valid, and keeping it for the whole
// dump, follows the original system; the state machine, the toggle hand-off and the
// busy/dropped outputs are this design's choices.
//
// valid crosses from clk4M through a two-flop synchroniser. A command takes
// about 30 master-clock cycles (load, synchronisation, 24 bits, hand-back).
module cmd_controller (
  input  logic       clk,       // clk50M
  input  logic       rst,
  input  logic       ws,        // write strobe (wr_req)
  input  logic       valid,     // PISO valid, clk4M domain
  output logic       load_tgl,  // to the PISO
  output logic       en_pls,    // to the DFF sync
  output logic       busy,
  output logic [7:0] dropped    // requests ignored while busy (saturating)
);
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_XFER} state_e;
  state_e     state;
  logic [1:0] valid_s;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      load_tgl <= 1'b0;
      valid_s  <= '0;
      dropped  <= '0;
    end else begin
      valid_s <= {valid_s[0], valid};
      unique case (state)
        S_IDLE: if (ws) begin
          load_tgl <= ~load_tgl;
          state    <= S_LOAD;
        end
        S_LOAD: if (valid_s[1]) state <= S_XFER;
        S_XFER: if (!valid_s[1]) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
      if (ws && state != S_IDLE && dropped != 8'hFF) dropped <= dropped + 8'd1;
    end
  end

  assign en_pls = (state == S_XFER);
  assign busy   = (state != S_IDLE);
endmodule
