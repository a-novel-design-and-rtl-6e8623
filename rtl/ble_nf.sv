// ble_nf: nonfracturable basic logic element (BLE).
//
// One six-input logic element, a 6-LUT or a MUX4 chosen by the KIND
// parameter, followed by an optional register: a D flip-flop that samples
// the LE output on the rising clock edge when ce is high, and a bypass mux,
// controlled by one configuration bit, that makes the BLE output either the
// registered or the combinational LE output. The register resets to 0
// (asynchronous, active-low rst_n); the clock enable and reset are this
// design's choice, the LE-plus-optional-register structure is the
// architecture's.
//
// cfg layout: {reg_en, le_bits}; le_bits is the 64-bit truth table for a
// 6-LUT or the four inversion bits for a MUX4 (pins in[3:0] = data,
// in[5:4] = select). Output is combinational from in when reg_en = 0, and
// changes one clock after in when reg_en = 1.
module ble_nf
  import hyb_pkg::*;
#(
  parameter le_kind_e KIND = LE_LUT6
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          ce,
  input  logic [ble_cfg_w(KIND)-1:0]    cfg,
  input  logic [NF_BLE_IN-1:0]          in,
  output logic                          out
);
  localparam int unsigned LE_W = le_cfg_w(KIND);

  logic le_out;
  logic q;
  logic reg_en;

  assign reg_en = cfg[LE_W];

  if (KIND == LE_MUX4) begin : g_mux4
    mux4_le u_le (.inv(cfg[LE_W-1:0]), .d(in[3:0]), .s(in[5:4]), .out(le_out));
  end else begin : g_lut6
    lut6 u_le (.truth(cfg[LE_W-1:0]), .in(in), .out(le_out));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= 1'b0;
    else if (ce) q <= le_out;
  end

  assign out = reg_en ? q : le_out;

  initial begin
    assert (KIND == LE_LUT6 || KIND == LE_MUX4)
      else $error("ble_nf: KIND must be a nonfracturable LE");
  end
endmodule
