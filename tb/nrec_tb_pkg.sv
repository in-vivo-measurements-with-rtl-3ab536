// nrec_tb_pkg: reference functions shared by the testbenches and by the
// behavioural ASIC model.
//
// crc5       CRC-5 with polynomial x^5 + x^2 + 1, initial value 5'b11111,
//            bits fed MSB first (the ASIC's polynomial is not known here;
//            this one is used by the model and checked by the testbenches).
// make_cmd   builds a 24-bit command: 5-bit preamble, 14-bit payload, CRC-5.
// sample_val deterministic 8-bit sample of channel ch in frame n with row id.
// make_info  builds the 72-bit information packet {mode, id, 8 samples}.
// Command payloads understood by the model (an encoding chosen for the
// tests): payload[13:12] = 0 bandpass, 1 gain calibration, 3 select and
// start; for select, payload[11] = 1 sweeps the 8 rows, 0 stays on row
// payload[2:0].
package nrec_tb_pkg;
  localparam logic [4:0] CMD_PREAMBLE = 5'b10110;
  localparam logic [1:0] MODE_TRACKING = 2'b01;

  function automatic logic [4:0] crc5(input logic [127:0] bits, input int unsigned n);
    logic [4:0] c = 5'b11111;
    for (int i = int'(n) - 1; i >= 0; i--) begin
      logic fb = c[4] ^ bits[i];
      c = {c[3:0], 1'b0};
      if (fb) c = c ^ 5'b00101;
    end
    return c;
  endfunction

  function automatic logic [23:0] make_cmd(input logic [13:0] payload);
    logic [18:0] head = {CMD_PREAMBLE, payload};
    return {head, crc5(128'(head), 19)};
  endfunction

  function automatic logic [7:0] sample_val(input int unsigned n, input int unsigned ch,
                                            input logic [5:0] id);
    return 8'((n * 37 + ch * 101 + 32'(id) * 13 + (n >> 3)) & 32'hFF);
  endfunction

  function automatic logic [71:0] make_info(input int unsigned n, input logic [5:0] id);
    logic [71:0] p;
    p[71:70] = MODE_TRACKING;
    p[69:64] = id;
    for (int ch = 0; ch < 8; ch++) p[63 - 8*ch -: 8] = sample_val(n, ch, id);
    return p;
  endfunction
endpackage
