// ble_frac: fracturable basic logic element (BLE).
//
// One eight-input, two-output logic element, a fracturable 6-LUT or a Dual
// MUX4 chosen by KIND, and behind each of its two outputs an optional
// register with its own bypass bit. Registers sample on the rising edge when
// ce is high and reset to 0 on rst_n low (asynchronous); those two controls
// are this design's choice.
//
// cfg layout: {reg_en_b, reg_en_a, le_bits}; le_bits is an flut6_cfg_t or a
// dmux4_cfg_t. out[0] comes from the LE's A output, out[1] from its B output.
module ble_frac
  import hyb_pkg::*;
#(
  parameter le_kind_e KIND = LE_FLUT6
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          ce,
  input  logic [ble_cfg_w(KIND)-1:0]    cfg,
  input  logic [FR_BLE_IN-1:0]          in,
  output logic [FR_BLE_OUT-1:0]         out
);
  localparam int unsigned LE_W = le_cfg_w(KIND);

  logic [FR_BLE_OUT-1:0] le_out;
  logic [FR_BLE_OUT-1:0] q;
  logic [FR_BLE_OUT-1:0] reg_en;

  assign reg_en = cfg[LE_W +: FR_BLE_OUT];

  if (KIND == LE_DMUX4) begin : g_dmux4
    dual_mux4 u_le (.cfg(dmux4_cfg_t'(cfg[LE_W-1:0])), .in(in),
                    .out_a(le_out[0]), .out_b(le_out[1]));
  end else begin : g_flut6
    frac_lut6 u_le (.cfg(flut6_cfg_t'(cfg[LE_W-1:0])), .in(in),
                    .out_a(le_out[0]), .out_b(le_out[1]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (ce) q <= le_out;
  end

  for (genvar o = 0; o < FR_BLE_OUT; o++) begin : g_out
    assign out[o] = reg_en[o] ? q[o] : le_out[o];
  end

  initial begin
    assert (KIND == LE_FLUT6 || KIND == LE_DMUX4)
      else $error("ble_frac: KIND must be a fracturable LE");
  end
endmodule
