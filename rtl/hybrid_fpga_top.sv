// hybrid_fpga_top: the two hybrid CLB tiles side by side.
//
// The nonfracturable tile (clb_nf: 40 inputs, ten 6-input BLEs, default
// 3 MUX4 : 7 6-LUT) and the fracturable tile (clb_frac: 80 inputs, ten
// 8-input 2-output BLEs, default 3 Dual MUX4 : 7 fracturable 6-LUT) are two
// alternative logic-block families, so they are not connected to each other.
// Each has its own configuration chain (nf_cfg_*, fr_cfg_*) and its own user
// inputs and outputs; the global routing that would join tiles in a full
// array is outside this design, so the tile I/O is brought out as ports.
// clk, rst_n (asynchronous, active-low, clears the BLE registers),
// cfg_rst_n (clears both configuration memories) and ce (register clock
// enable) are shared. Outputs are meaningful once a bitstream is loaded.
// The BLE-output feedback inside each tile shows up in lint as a structural
// combinational loop on nf_out / fr_out; it is closed only by a bitstream
// that programs a loop, and is held open during configuration.
module hybrid_fpga_top
  import hyb_pkg::*;
#(
  parameter int unsigned NF_N_MUX4 = 3,
  parameter int unsigned FR_N_MUX4 = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_rst_n,
  input  logic        ce,
  // nonfracturable tile
  input  logic        nf_cfg_en,
  input  logic        nf_cfg_in,
  output logic        nf_cfg_out,
  input  logic [39:0] nf_in,
  output logic [9:0]  nf_out,
  // fracturable tile
  input  logic        fr_cfg_en,
  input  logic        fr_cfg_in,
  output logic        fr_cfg_out,
  input  logic [79:0] fr_in,
  output logic [19:0] fr_out
);
  clb_nf #(.N_IN(40), .N_BLE(10), .N_MUX4(NF_N_MUX4)) u_clb_nf (
    .clk, .rst_n, .cfg_rst_n, .ce,
    .cfg_en(nf_cfg_en), .cfg_in(nf_cfg_in), .cfg_out(nf_cfg_out),
    .clb_in(nf_in), .clb_out(nf_out)
  );

  clb_frac #(.N_IN(80), .N_BLE(10), .N_MUX4(FR_N_MUX4)) u_clb_frac (
    .clk, .rst_n, .cfg_rst_n, .ce,
    .cfg_en(fr_cfg_en), .cfg_in(fr_cfg_in), .cfg_out(fr_cfg_out),
    .clb_in(fr_in), .clb_out(fr_out)
  );
endmodule
