// frac_lut6: fracturable 6-LUT with eight inputs and two outputs.
//
// Built from two 32-bit 5-LUTs, A and B. Pin assignment:
//   in[1:0] shared by both halves, in[4:2] private to A, in[7:5] private to B.
// split=1 (fractured): out_a = A[{in[4:2],in[1:0]}], out_b = B[{in[7:5],in[1:0]}].
//   Two 5-input functions fit if they share in[1:0]; two 4-input functions with
//   no common input fit by letting A ignore in[1] and B ignore in[0].
// split=0 (6-LUT): B is addressed by A's five inputs and in[5] picks between
//   the halves, so out_a = {B,A}[{in[5],in[4:0]}] is one 6-input function
//   whose truth table is {lut_b, lut_a}; out_b then shows B's half.
// The pin split and the exact 6-LUT-mode wiring are this design's choice; the
// two-shared-input 5-LUT fracture itself follows the architecture.
//
// Ports: cfg (flut6_cfg_t), in[7:0], out_a, out_b. Combinational.
module frac_lut6
  import hyb_pkg::*;
(
  input  flut6_cfg_t            cfg,
  input  logic [FR_BLE_IN-1:0]  in,
  output logic                  out_a,
  output logic                  out_b
);
  logic [4:0] addr_a, addr_b;
  logic       lut_a_o, lut_b_o;

  assign addr_a  = in[4:0];
  assign addr_b  = cfg.split ? {in[7:5], in[1:0]} : in[4:0];
  assign lut_a_o = cfg.lut_a[addr_a];
  assign lut_b_o = cfg.lut_b[addr_b];

  assign out_a = (!cfg.split && in[5]) ? lut_b_o : lut_a_o;
  assign out_b = lut_b_o;
endmodule
