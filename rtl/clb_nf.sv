// clb_nf: nonfracturable hybrid complex logic block (CLB).
//
// N_IN CLB inputs and N_BLE basic logic elements with six inputs and one
// output each. The first N_MUX4 BLEs hold a MUX4 logic element, the rest a
// 6-LUT, so the default 3 MUX4 : 7 6-LUT block trades three of the ten 6-LUTs
// for elements about a tenth of their size. A 50%-depopulated crossbar
// (xbar_depop) feeds the N_BLE*6 BLE input pins from the CLB inputs and from
// all BLE outputs (local feedback); the BLE outputs are also the CLB outputs.
//
// Configuration: one serial chain (cfg_chain) of CFG_BITS cells, laid out as
//   cfg_q[XBAR_BITS-1:0]            crossbar select codes, pin p at p*SEL_W
//   cfg_q[XBAR_BITS + off(b) +: w]  BLE b's word ({reg_en, le_bits}),
// with off/w from hyb_pkg::ble_cfg_off/ble_cfg_w. Shift with cfg_en high
// for CFG_BITS cycles, sending bit CFG_BITS-1 first.
//
// Crossbar sources: src[i] = clb_in[i] for i < N_IN, src[N_IN+b] = clb_out[b].
// Feedback through an unregistered BLE closes a combinational path through
// the crossbar; a loop only forms if the configuration wires one, as in any
// FPGA fabric, so lint tools report the structural loop and it stands.
// While cfg_rst_n is low or cfg_en is high the feedback sources read 0, so
// the fabric only closes feedback paths in user mode.
module clb_nf
  import hyb_pkg::*;
#(
  parameter int unsigned N_IN   = 40,
  parameter int unsigned N_BLE  = 10,
  parameter int unsigned N_MUX4 = 3,
  parameter int unsigned DEPOP  = 2,
  localparam int unsigned N_SRC     = N_IN + N_BLE,
  localparam int unsigned N_PIN     = N_BLE * NF_BLE_IN,
  localparam int unsigned SEL_W     = xbar_sel_w(N_SRC / DEPOP),
  localparam int unsigned XBAR_BITS = N_PIN * SEL_W,
  localparam int unsigned BLE_BITS  = ble_cfg_off(1'b0, N_MUX4, N_BLE),
  localparam int unsigned CFG_BITS  = XBAR_BITS + BLE_BITS
) (
  input  logic             clk,
  input  logic             rst_n,     // clears the BLE registers
  input  logic             cfg_rst_n, // clears the configuration memory
  input  logic             ce,        // clock enable of the BLE registers
  input  logic             cfg_en,    // shift the configuration chain
  input  logic             cfg_in,
  output logic             cfg_out,
  input  logic [N_IN-1:0]  clb_in,
  output logic [N_BLE-1:0] clb_out
);
  logic [CFG_BITS-1:0] cfg_q;
  logic [N_SRC-1:0]    src;
  logic [N_PIN-1:0]    pin;

  cfg_chain #(.N(CFG_BITS)) u_cfg (
    .clk, .rst_n(cfg_rst_n), .en(cfg_en), .sin(cfg_in), .sout(cfg_out), .q(cfg_q)
  );

  // BLE feedback is held at 0 while the configuration memory is in reset or
  // a bitstream is shifting in, so that a cleared, random or half-loaded
  // configuration cannot close a combinational ring.
  logic user_mode;
  assign user_mode = cfg_rst_n && !cfg_en;
  assign src = {user_mode ? clb_out : '0, clb_in};

  xbar_depop #(.N_SRC(N_SRC), .N_PIN(N_PIN), .DEPOP(DEPOP)) u_xbar (
    .src, .sel(cfg_q[XBAR_BITS-1:0]), .pin
  );

  for (genvar b = 0; b < N_BLE; b++) begin : g_ble
    localparam le_kind_e    KIND = ble_kind(1'b0, N_MUX4, b);
    localparam int unsigned OFF  = XBAR_BITS + ble_cfg_off(1'b0, N_MUX4, b);
    ble_nf #(.KIND(KIND)) u_ble (
      .clk, .rst_n, .ce,
      .cfg (cfg_q[OFF +: ble_cfg_w(KIND)]),
      .in  (pin[b*NF_BLE_IN +: NF_BLE_IN]),
      .out (clb_out[b])
    );
  end

  initial begin
    assert (N_MUX4 <= N_BLE) else $error("clb_nf: N_MUX4 exceeds N_BLE");
  end
endmodule
