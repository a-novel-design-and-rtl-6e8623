// dual_mux4: Dual MUX4 logic element, two MUX4s in one eight-input LE.
//
// The two multiplexers share the four data inputs d[3:0] and have dedicated
// select pairs: out_a = dA[s_a], out_b = dB[s_b], where each MUX applies its
// own optional inversion (inv_a, inv_b) to the shared data. Two independent
// functions can be mapped as long as their data-input needs agree on the
// shared pins. Giving each MUX its own inversion bits is this design's
// choice; the shared-data / dedicated-select wiring follows the architecture.
//
// Pins: in[3:0] = d, in[5:4] = s_a, in[7:6] = s_b. Combinational.
module dual_mux4
  import hyb_pkg::*;
(
  input  dmux4_cfg_t           cfg,
  input  logic [FR_BLE_IN-1:0] in,
  output logic                 out_a,
  output logic                 out_b
);
  mux4_le u_mux_a (.inv(cfg.inv_a), .d(in[3:0]), .s(in[5:4]), .out(out_a));
  mux4_le u_mux_b (.inv(cfg.inv_b), .d(in[3:0]), .s(in[7:6]), .out(out_b));
endmodule
