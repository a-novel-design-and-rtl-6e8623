// xbar_depop: depopulated intra-CLB crossbar.
//
// N_SRC sources (the CLB inputs followed by the BLE outputs fed back) drive
// N_PIN BLE input pins. The crossbar is depopulated by DEPOP (2 = 50%): pin p
// can reach only the sources whose index is congruent to p modulo DEPOP, i.e.
// N_SRC/DEPOP candidates. Because neighbouring pins of a BLE alternate
// between the residue classes, every BLE still reaches every source through
// some pin. The pin's select code c picks source c*DEPOP + (p mod DEPOP);
// code N_SRC/DEPOP (and any larger code) drives a constant 0, which the
// LE's optional inversion can turn into a 1. The 50% depopulation follows the
// architecture; the exact connection pattern and the constant code are this
// design's choice.
//
// sel holds N_PIN codes of SEL_W bits, pin p's code at sel[p*SEL_W +: SEL_W].
// Combinational.
module xbar_depop
  import hyb_pkg::*;
#(
  parameter int unsigned N_SRC = 50,
  parameter int unsigned N_PIN = 60,
  parameter int unsigned DEPOP = 2,
  localparam int unsigned N_CAND = N_SRC / DEPOP,
  localparam int unsigned SEL_W  = xbar_sel_w(N_CAND)
) (
  input  logic [N_SRC-1:0]       src,
  input  logic [N_PIN*SEL_W-1:0] sel,
  output logic [N_PIN-1:0]       pin
);
  for (genvar p = 0; p < N_PIN; p++) begin : g_pin
    logic [SEL_W-1:0]  code;
    logic [N_CAND-1:0] cand;   // the sources this pin is wired to

    assign code = sel[p*SEL_W +: SEL_W];
    for (genvar c = 0; c < N_CAND; c++) begin : g_cand
      assign cand[c] = src[c*DEPOP + (p % DEPOP)];
    end

    always_comb begin
      pin[p] = 1'b0;
      if (code < SEL_W'(N_CAND)) pin[p] = cand[code];
    end
  end

  initial begin
    assert (N_SRC % DEPOP == 0)
      else $error("xbar_depop: N_SRC must be a multiple of DEPOP");
  end
endmodule
