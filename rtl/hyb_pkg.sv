// hyb_pkg: constants, configuration layouts and helper functions shared by
// the hybrid MUX4 / 6-LUT logic-block RTL.
//
// The sizes follow the architecture: 6-input, 64-entry LUTs; a 10-BLE CLB
// with 40 inputs (nonfracturable) or 80 inputs and 8-input, 2-output BLEs
// (fracturable); a crossbar in which each BLE pin reaches half of the
// sources. Configuration-bit layouts (field order inside each BLE's word) are
// this design's own choice and are documented next to each struct.
package hyb_pkg;

  // ---- logic-element geometry -------------------------------------------
  localparam int unsigned LUT_K       = 6;            // 6-LUT inputs
  localparam int unsigned LUT_BITS    = 1 << LUT_K;   // 64 truth-table bits
  localparam int unsigned LUT5_BITS   = 32;           // one half of a fractured 6-LUT
  localparam int unsigned MUX4_DATA   = 4;            // data inputs of a MUX4
  localparam int unsigned NF_BLE_IN   = 6;            // nonfracturable BLE inputs
  localparam int unsigned FR_BLE_IN   = 8;            // fracturable BLE inputs
  localparam int unsigned FR_BLE_OUT  = 2;            // fracturable BLE outputs

  // ---- kind of logic element inside a BLE --------------------------------
  typedef enum logic [1:0] {
    LE_LUT6  = 2'd0,   // nonfracturable 6-LUT
    LE_MUX4  = 2'd1,   // nonfracturable MUX4
    LE_FLUT6 = 2'd2,   // fracturable 6-LUT (two 5-LUTs, two shared inputs)
    LE_DMUX4 = 2'd3    // Dual MUX4 (dedicated selects, shared data)
  } le_kind_e;

  // ---- configuration words -------------------------------------------------
  // Fracturable 6-LUT: split=1 gives two 5-LUT outputs, split=0 one 6-LUT.
  typedef struct packed {
    logic                 split;
    logic [LUT5_BITS-1:0] lut_b;
    logic [LUT5_BITS-1:0] lut_a;
  } flut6_cfg_t;

  // Dual MUX4: one inversion bit per data input for each of the two MUXes.
  typedef struct packed {
    logic [MUX4_DATA-1:0] inv_b;
    logic [MUX4_DATA-1:0] inv_a;
  } dmux4_cfg_t;

  // Bits of the LE itself (without the register-bypass bits).
  function automatic int unsigned le_cfg_w(le_kind_e k);
    case (k)
      LE_LUT6:  return LUT_BITS;            // 64
      LE_MUX4:  return MUX4_DATA;           // 4
      LE_FLUT6: return $bits(flut6_cfg_t);  // 65
      default:  return $bits(dmux4_cfg_t);  // 8
    endcase
  endfunction

  // Bits of a whole BLE: LE bits plus one register-enable bit per output.
  // Layout: {reg_en[n_out-1:0], le_bits}.
  function automatic int unsigned ble_cfg_w(le_kind_e k);
    if (k == LE_LUT6 || k == LE_MUX4) return le_cfg_w(k) + 1;
    return le_cfg_w(k) + FR_BLE_OUT;
  endfunction

  // Select-code width of one crossbar pin that can reach n_cand sources plus
  // the constant-0 code.
  function automatic int unsigned xbar_sel_w(int unsigned n_cand);
    return $clog2(n_cand + 1);
  endfunction

  // Kind of BLE b in a CLB: the first n_mux BLEs are MUX-based.
  function automatic le_kind_e ble_kind(bit fracturable, int unsigned n_mux, int unsigned b);
    if (fracturable) return (b < n_mux) ? LE_DMUX4 : LE_FLUT6;
    return (b < n_mux) ? LE_MUX4 : LE_LUT6;
  endfunction

  // Offset of BLE b's word in the CLB's BLE configuration field.
  function automatic int unsigned ble_cfg_off(bit fracturable, int unsigned n_mux, int unsigned b);
    int unsigned off = 0;
    for (int unsigned i = 0; i < b; i++) off += ble_cfg_w(ble_kind(fracturable, n_mux, i));
    return off;
  endfunction

endpackage
