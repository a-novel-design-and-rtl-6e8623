// tb_mux4_mapping: maps Boolean functions onto the nonfracturable hybrid CLB
// (default size) the way a MUX4-aware flow would, then verifies them in the
// hardware.
//
// For each function of six variables v0..v5 (a 64-bit truth table) the test
// looks for a MUX4 mapping: an ordered pair of variables on the two selects
// such that each of the four Shannon cofactors is 0, 1, some other variable
// or its complement. Constants come from the crossbar's constant code and
// complements from the MUX4's inversion bits. A function with such a mapping
// goes into MUX4 BLE0; any other function goes into 6-LUT BLE3. Each
// variable is driven onto two CLB inputs, 2j and 2j+1, so that pins of
// either crossbar parity can reach it. After loading the bitstream all 64
// variable assignments are applied and the chosen BLE's output must equal
// the truth table.
//
// Function sets: all 256 three-input functions (all must be MUX4-mappable),
// 300 random functions built to be MUX4-mappable with up to six inputs,
// 4:1 muxes with inverted data, and 6-input functions that are not
// (six-input XOR/AND), which must fall back to the 6-LUT.
module tb_mux4_mapping;
  localparam int NB = 770;
  logic          clk = 1'b0, rst_n = 1'b0, cfg_rst_n = 1'b0, ce = 1'b0;
  logic          cfg_en = 1'b0, cfg_in = 1'b0, cfg_out;
  logic [39:0]   clb_in = '0;
  logic [9:0]    clb_out;
  logic [NB-1:0] bits;
  int            checks = 0, failures = 0;
  int            n_mux4 = 0, n_lut = 0;

  clb_nf dut (.clk, .rst_n, .cfg_rst_n, .ce, .cfg_en, .cfg_in, .cfg_out, .clb_in, .clb_out);

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // value of f with variable i forced to bi and k forced to bk, as a table
  // over all 64 assignments (the forced variables become don't-cares)
  function automatic logic [63:0] cofactor(logic [63:0] f, int i, bit bi, int k, bit bk);
    logic [63:0] g;
    for (int a = 0; a < 64; a++) begin
      int b = a;
      b = bi ? (b | (1 << i)) : (b & ~(1 << i));
      b = bk ? (b | (1 << k)) : (b & ~(1 << k));
      g[a] = f[b];
    end
    return g;
  endfunction

  function automatic logic [63:0] var_table(int m);
    logic [63:0] t;
    for (int a = 0; a < 64; a++) t[a] = a[m];
    return t;
  endfunction

  // data-pin choice for one cofactor: src = -1 for constant 0, else variable
  typedef struct { int src; bit inv; } pinmap_t;

  function automatic bit match(logic [63:0] g, int i, int k, output pinmap_t pm);
    if (g == '0) begin pm.src = -1; pm.inv = 0; return 1; end
    if (g == '1) begin pm.src = -1; pm.inv = 1; return 1; end
    for (int m = 0; m < 6; m++) begin
      if (m == i || m == k) continue;
      if (g == var_table(m))  begin pm.src = m; pm.inv = 0; return 1; end
      if (g == ~var_table(m)) begin pm.src = m; pm.inv = 1; return 1; end
    end
    return 0;
  endfunction

  // search for a MUX4 mapping; returns select variables and data-pin choices
  function automatic bit find_mux4(logic [63:0] f, output int si, output int sk,
                                   output pinmap_t pm[4]);
    for (int i = 0; i < 6; i++)
      for (int k = 0; k < 6; k++) begin
        bit ok = (i != k);
        for (int c = 0; c < 4 && ok; c++)
          ok = match(cofactor(f, i, c[0], k, c[1]), i, k, pm[c]);
        if (ok) begin si = i; sk = k; return 1; end
      end
    return 0;
  endfunction

  // crossbar helpers (5-bit code c on pin p selects source 2c + p%2; 25 = 0)
  function automatic void route_var(int p, int v);
    bits[p*5 +: 5] = 5'(v);           // variable v sits on CLB inputs 2v and 2v+1
  endfunction

  task automatic load();
    for (int i = NB - 1; i >= 0; i--) begin
      @(negedge clk);
      cfg_en = 1'b1; cfg_in = bits[i];
    end
    @(negedge clk);
    cfg_en = 1'b0;
  endtask

  task automatic map_and_check(logic [63:0] f, bit must_mux4, string what);
    int si, sk;
    pinmap_t pm[4];
    int ble;
    bits = '0;
    for (int p = 0; p < 60; p++) bits[p*5 +: 5] = 5'd25;
    if (find_mux4(f, si, sk, pm)) begin
      logic [3:0] inv;
      ble = 0;
      n_mux4++;
      for (int c = 0; c < 4; c++) begin
        if (pm[c].src >= 0) route_var(c, pm[c].src);
        inv[c] = pm[c].inv;
      end
      route_var(4, si); route_var(5, sk);
      bits[300 +: 5] = {1'b0, inv};      // BLE0 word: {reg_en, inv}
    end else begin
      ble = 3;
      n_lut++;
      if (must_mux4) begin
        failures++;
        $display("%s: no MUX4 mapping found for %h", what, f);
      end
      for (int j = 0; j < 6; j++) route_var(18 + j, j);
      bits[315 +: 65] = {1'b0, f};       // BLE3 word: {reg_en, truth}
    end
    load();
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      for (int v = 0; v < 6; v++) begin
        clb_in[2*v]     = a[v];
        clb_in[2*v + 1] = a[v];
      end
      #1;
      checks++;
      if (clb_out[ble] !== f[a]) begin
        failures++;
        if (failures < 10) $display("%s f=%h ble%0d a=%0d got %b", what, f, ble, a, clb_out[ble]);
      end
    end
  endtask

  initial begin
    logic [63:0] f;
    repeat (2) @(negedge clk);
    rst_n = 1'b1; cfg_rst_n = 1'b1;
    // every 2- and 3-input function (of v0, v1, v2)
    for (int t = 0; t < 256; t++) begin
      for (int a = 0; a < 64; a++) f[a] = t[a % 8];
      map_and_check(f, 1'b1, "3-input");
    end
    // random MUX4-mappable functions of up to six inputs
    for (int t = 0; t < 300; t++) begin
      automatic int i = int'($urandom() % 6);
      automatic int k;
      automatic int dv[4];
      automatic bit di[4];
      do k = $urandom() % 6; while (k == i);
      for (int c = 0; c < 4; c++) begin
        do dv[c] = int'($urandom() % 7) - 1; while (dv[c] == i || dv[c] == k);
        di[c] = 1'($urandom());
      end
      for (int a = 0; a < 64; a++) begin
        automatic int c = int'(a[i]) + 2 * int'(a[k]);
        f[a] = ((dv[c] < 0) ? 1'b0 : a[dv[c]]) ^ di[c];
      end
      map_and_check(f, 1'b1, "random mappable");
    end
    // the 4:1 mux itself, with and without data inversion
    for (int t = 0; t < 16; t++) begin
      for (int a = 0; a < 64; a++) f[a] = a[int'(a[5:4])] ^ t[int'(a[5:4])];
      map_and_check(f, 1'b1, "mux4 itself");
    end
    // six-input XOR and AND cannot be MUX4-mapped: they go to the 6-LUT
    for (int a = 0; a < 64; a++) f[a] = ^a[5:0];
    map_and_check(f, 1'b0, "xor6");
    for (int a = 0; a < 64; a++) f[a] = &a[5:0];
    map_and_check(f, 1'b0, "and6");
    $display("functions in MUX4: %0d, in 6-LUT: %0d", n_mux4, n_lut);
    checks++;
    if (n_lut != 2) begin
      failures++;
      $display("expected exactly the two 6-input functions in the 6-LUT");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
