// lut6: 6-input lookup table.
//
// The 64 truth-table bits are configuration SRAM cells; the six inputs form
// the address (in[0] is the least significant address bit) and the output is
// the addressed bit, i.e. a 64-to-1 multiplexer over the SRAM. Purely
// combinational: the delay does not depend on the function stored.
//
// Ports: truth[63:0] configuration, in[5:0] logic inputs, out.
module lut6
  import hyb_pkg::*;
(
  input  logic [LUT_BITS-1:0] truth,
  input  logic [LUT_K-1:0]    in,
  output logic                out
);
  assign out = truth[in];
endmodule
