// mux4_le: MUX4 logic element, a 4-to-1 multiplexer with optional inversion
// on each data input.
//
// Six inputs, the same pin count as a 6-LUT: data d[3:0] and select s[1:0].
// Each data input passes through a 2-to-1 mux that chooses the input or its
// complement under one SRAM bit (inv[i]); a tree of three 2-to-1 muxes then
// selects d[s]. That is seven 2-to-1 muxes and four SRAM cells in all. The
// select inputs have no inversion: it would only permute the data inputs.
// Any 2- or 3-input function, some 4/5-input ones and the inverting 4:1 mux
// itself map to it; constants reach the data pins through routing.
//
// Ports: inv[3:0] configuration, d[3:0], s[1:0], out. Combinational.
module mux4_le
  import hyb_pkg::*;
(
  input  logic [MUX4_DATA-1:0] inv,
  input  logic [MUX4_DATA-1:0] d,
  input  logic [1:0]           s,
  output logic                 out
);
  logic [MUX4_DATA-1:0] dv;   // data after optional inversion
  logic                 m0, m1;

  assign dv  = d ^ inv;
  // first level of the tree on s[0], second on s[1]
  assign m0  = s[0] ? dv[1] : dv[0];
  assign m1  = s[0] ? dv[3] : dv[2];
  assign out = s[1] ? m1 : m0;
endmodule
