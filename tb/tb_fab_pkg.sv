// tb_fab_pkg: test scenarios for the hybrid CLBs, shared by the CLB and
// top-level testbenches.
//
// Each scenario class builds a configuration bitstream for one CLB at its
// default size, from the bit layout written out here independently of the
// RTL's own offset functions, and holds a cycle-level reference model of the
// user circuit that bitstream programs. The testbench asks the model for the
// expected CLB outputs given the current inputs, and advances the model's
// registers at each enabled clock edge.
package tb_fab_pkg;

  // ---------------------------------------------------------------------
  // Nonfracturable CLB, 40 inputs, 10 BLEs (3 MUX4 then 7 6-LUT).
  // Crossbar: 60 pins x 5-bit codes at bits [299:0]; code c on pin p picks
  // source 2c + p%2 (sources: 40 inputs, then the 10 BLE outputs), code 25
  // is the constant 0. BLE b's word starts at 300 + 5b (MUX4, b < 3) or
  // 315 + 65(b-3) (6-LUT), laid out {reg_en, le_bits}.
  // ---------------------------------------------------------------------
  localparam int NF_BITS = 770;

  class nf_scn;
    logic [NF_BITS-1:0] bits;
    logic [3:0]  m0_inv;      // BLE0: inverting 4:1 mux of in[3:0], select in[5:4]
    logic [63:0] lut3;        // BLE3: random 6-input function of in[13:8]
    logic [63:0] lut4;        // BLE4: function of BLE0, BLE3 (feedback), in[14], in[15]
    logic        r1, r5;      // reference registers of BLE1 and BLE5
    int          n_fb_diff;   // vectors where the feedback input decided BLE4

    function new();
      m0_inv = 4'($urandom()) | 4'b0010;   // at least one inverted input
      lut3   = {$urandom(), $urandom()};
      lut4   = {$urandom(), $urandom()};
      r1 = 1'b0; r5 = 1'b0;
      n_fb_diff = 0;
      build();
    endfunction

    function void route(int p, int s);
      if ((p % 2) != (s % 2)) $fatal(1, "nf route: pin %0d cannot reach source %0d", p, s);
      bits[p*5 +: 5] = 5'(s / 2);
    endfunction

    function int ble_off(int b);
      return (b < 3) ? 300 + 5*b : 315 + 65*(b - 3);
    endfunction

    function void build();
      logic [63:0] t5;
      bits = '0;
      for (int p = 0; p < 60; p++) bits[p*5 +: 5] = 5'd25;     // all pins to 0
      // BLE0 (MUX4): data in[3:0], select in[5:4], combinational
      for (int j = 0; j < 6; j++) route(j, j);
      bits[ble_off(0) +: 5] = {1'b0, m0_inv};
      // BLE1 (MUX4): XOR of in[6], in[7] from constant data, registered
      route(10, 6); route(11, 7);
      bits[ble_off(1) +: 5] = {1'b1, 4'b0110};
      // BLE3 (6-LUT): in[13:8], combinational
      for (int j = 0; j < 6; j++) route(18 + j, 8 + j);
      bits[ble_off(3) +: 65] = {1'b0, lut3};
      // BLE4 (6-LUT): address {0, 0, in15, in14, BLE3, BLE0}
      route(24, 40); route(25, 43); route(26, 14); route(27, 15);
      bits[ble_off(4) +: 65] = {1'b0, lut4};
      // BLE5 (6-LUT): registered toggle, address bit 1 = own output
      route(31, 45);
      for (int a = 0; a < 64; a++) t5[a] = !a[1];
      bits[ble_off(5) +: 65] = {1'b1, t5};
    endfunction

    // expected CLB outputs for inputs x with the current register state
    function logic [9:0] outputs(logic [39:0] x);
      logic [9:0] o;
      int s;
      o = '0;
      s = int'({x[5], x[4]});
      o[0] = x[s] ^ m0_inv[s];
      o[1] = r1;
      o[3] = lut3[x[13:8]];
      o[4] = lut4[{2'b00, x[15], x[14], o[3], o[0]}];
      o[5] = r5;
      if (lut4[{2'b00, x[15], x[14], o[3], o[0]}] != lut4[{2'b00, x[15], x[14], o[3], !o[0]}])
        n_fb_diff++;
      return o;
    endfunction

    function void clock(logic [39:0] x);
      r1 = x[6] ^ x[7];
      r5 = !r5;
    endfunction

    function void reset();
      r1 = 1'b0; r5 = 1'b0;
    endfunction
  endclass

  // ---------------------------------------------------------------------
  // Fracturable CLB, 80 inputs, 10 BLEs (3 Dual MUX4 then 7 frac. 6-LUT).
  // Crossbar: 80 pins x 6-bit codes at bits [479:0]; code c on pin p picks
  // source 2c + p%2 (sources: 80 inputs, then the 20 BLE outputs, BLE b
  // output o at 80 + 2b + o), code 50 is the constant 0. BLE b's word starts
  // at 480 + 10b (Dual MUX4: {reg_en[1:0], inv_b, inv_a}) or 510 + 67(b-3)
  // (frac. 6-LUT: {reg_en[1:0], split, lut_b, lut_a}).
  // ---------------------------------------------------------------------
  localparam int FR_BITS = 979;

  class fr_scn;
    logic [FR_BITS-1:0] bits;
    logic [3:0]  d0_inv_a, d0_inv_b;   // BLE0: Dual MUX4 on in[7:0]
    logic        d1_inv_b0;            // BLE1 output B constant
    logic [31:0] l3a, l3b;             // BLE3: split, in[15:8], B registered
    logic [31:0] l4a, l4b;             // BLE4: 6-LUT mode on in[21:16]
    logic        r1a, r3b;             // reference registers
    int          n_split_diff, n_6lut_hi;

    function new();
      d0_inv_a = 4'($urandom()); d0_inv_b = 4'($urandom());
      d1_inv_b0 = 1'($urandom());
      l3a = $urandom(); l3b = $urandom();
      l4a = $urandom(); l4b = $urandom();
      r1a = 1'b0; r3b = 1'b0;
      n_split_diff = 0; n_6lut_hi = 0;
      build();
    endfunction

    function void route(int p, int s);
      if ((p % 2) != (s % 2)) $fatal(1, "fr route: pin %0d cannot reach source %0d", p, s);
      bits[p*6 +: 6] = 6'(s / 2);
    endfunction

    function int ble_off(int b);
      return (b < 3) ? 480 + 10*b : 510 + 67*(b - 3);
    endfunction

    function void build();
      logic [31:0] x3;
      bits = '0;
      for (int p = 0; p < 80; p++) bits[p*6 +: 6] = 6'd50;
      // BLE0 (Dual MUX4): data in[3:0], sel A in[5:4], sel B in[7:6]
      for (int j = 0; j < 8; j++) route(j, j);
      bits[ble_off(0) +: 10] = {2'b00, d0_inv_b, d0_inv_a};
      // BLE1 (Dual MUX4): A toggles through its register, select from own A output
      route(12, 82);
      bits[ble_off(1) +: 10] = {2'b01, 3'b000, d1_inv_b0, 4'b0001};
      // BLE3 (frac. 6-LUT, split): pins 24..31 from in[15:8], B registered
      for (int j = 0; j < 8; j++) route(24 + j, 8 + j);
      bits[ble_off(3) +: 67] = {2'b10, 1'b1, l3b, l3a};
      // BLE4 (frac. 6-LUT, 6-LUT mode): pins 32..39 from in[23:16]
      for (int j = 0; j < 8; j++) route(32 + j, 16 + j);
      bits[ble_off(4) +: 67] = {2'b00, 1'b0, l4b, l4a};
      // BLE5 (frac. 6-LUT, split): A = XOR of BLE0.A, BLE0.B, BLE3.A (feedback)
      route(40, 80); route(41, 81); route(42, 86);
      for (int a = 0; a < 32; a++) x3[a] = a[0] ^ a[1] ^ a[2];
      bits[ble_off(5) +: 67] = {2'b00, 1'b1, 32'h0, x3};
    endfunction

    function logic [19:0] outputs(logic [79:0] x);
      logic [19:0] o;
      int sa, sb;
      logic [63:0] t4;
      o = '0;
      sa = int'({x[5], x[4]});
      sb = int'({x[7], x[6]});
      o[0] = x[sa] ^ d0_inv_a[sa];
      o[1] = x[sb] ^ d0_inv_b[sb];
      o[2] = r1a;
      o[3] = d1_inv_b0;
      o[6] = l3a[{x[12:10], x[9:8]}];
      o[7] = r3b;
      t4 = {l4b, l4a};
      o[8] = t4[x[21:16]];
      o[9] = l4b[x[20:16]];
      o[10] = o[0] ^ o[1] ^ o[6];
      if (l3a[{x[12:10], x[9:8]}] != l3b[{x[15:13], x[9:8]}]) n_split_diff++;
      if (x[21]) n_6lut_hi++;
      return o;
    endfunction

    function void clock(logic [79:0] x);
      r1a = !r1a;
      r3b = l3b[{x[15:13], x[9:8]}];
    endfunction

    function void reset();
      r1a = 1'b0; r3b = 1'b0;
    endfunction
  endclass

endpackage
