// tb_ratio_sweep: both hybrid CLB families at every MUX:LUT ratio of the
// 1:9 ... 5:5 sweep, simulated together.
//
// For each ratio r, a clb_nf and a clb_frac with N_MUX4 = r are built. Their
// bitstreams come from the layout rule (crossbar codes first, then r MUX-type
// BLE words, then 10-r LUT-type words), computed here for each r. Every BLE is
// given work. Nonfracturable: each MUX4 is an inverting 4:1 mux with random
// inversion and each 6-LUT a random function. Fracturable: each Dual MUX4
// has two random inversion sets and each fracturable 6-LUT is split with two
// random 5-LUT halves. Nonfracturable BLE b reads CLB inputs (6b+j) mod 40.
// Fracturable BLE b reads CLB inputs (8b+j) mod 80. All outputs of all ten
// CLBs are compared with reference expressions for random inputs.
module tb_ratio_sweep;
  localparam int NR = 5;
  logic        clk = 1'b0, rst_n = 1'b0, cfg_rst_n = 1'b0, ce = 1'b0;
  logic [NR-1:0] nf_en = '0, nf_di = '0, nf_do, fr_en = '0, fr_di = '0, fr_do;
  logic [39:0] nf_in = '0;
  logic [79:0] fr_in = '0;
  logic [9:0]  nf_out [NR];
  logic [19:0] fr_out [NR];
  int          checks = 0, failures = 0;

  // per-ratio configuration and its contents
  logic [1199:0] nf_bits [NR], fr_bits [NR];
  int            nf_len [NR], fr_len [NR];
  logic [63:0]   nf_le [NR][10];   // MUX4: inv in [3:0]; 6-LUT: truth table
  logic [63:0]   fr_le [NR][10];   // Dual MUX4: {inv_b, inv_a}; frac LUT: {lut_b, lut_a}

  for (genvar r = 0; r < NR; r++) begin : g_r
    clb_nf #(.N_MUX4(r + 1)) u_nf (
      .clk, .rst_n, .cfg_rst_n, .ce, .cfg_en(nf_en[r]), .cfg_in(nf_di[r]), .cfg_out(nf_do[r]),
      .clb_in(nf_in), .clb_out(nf_out[r]));
    clb_frac #(.N_MUX4(r + 1)) u_fr (
      .clk, .rst_n, .cfg_rst_n, .ce, .cfg_en(fr_en[r]), .cfg_in(fr_di[r]), .cfg_out(fr_do[r]),
      .clb_in(fr_in), .clb_out(fr_out[r]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic build(int r);
    int m = r + 1;          // number of MUX-type BLEs
    int off;
    nf_bits[r] = '0;
    fr_bits[r] = '0;
    // nonfracturable: pin p = 6b+j -> input (6b+j) mod 40, code = input/2
    for (int p = 0; p < 60; p++) nf_bits[r][p*5 +: 5] = 5'((p % 40) / 2);
    off = 300;
    for (int b = 0; b < 10; b++) begin
      if (b < m) begin
        nf_le[r][b] = 64'($urandom() % 16);
        nf_bits[r][off +: 5] = {1'b0, nf_le[r][b][3:0]};
        off += 5;
      end else begin
        nf_le[r][b] = {$urandom(), $urandom()};
        nf_bits[r][off +: 65] = {1'b0, nf_le[r][b]};
        off += 65;
      end
    end
    nf_len[r] = off;
    // fracturable: pin p = 8b+j -> input (8b+j) mod 80, code = input/2
    for (int p = 0; p < 80; p++) fr_bits[r][p*6 +: 6] = 6'((p % 80) / 2);
    off = 480;
    for (int b = 0; b < 10; b++) begin
      if (b < m) begin
        fr_le[r][b] = 64'($urandom() % 256);
        fr_bits[r][off +: 10] = {2'b00, fr_le[r][b][7:0]};
        off += 10;
      end else begin
        fr_le[r][b] = {$urandom(), $urandom()};
        fr_bits[r][off +: 67] = {2'b00, 1'b1, fr_le[r][b]};
        off += 67;
      end
    end
    fr_len[r] = off;
  endtask

  function automatic logic [9:0] nf_expect(int r, logic [39:0] x);
    logic [9:0] o;
    for (int b = 0; b < 10; b++) begin
      logic [5:0] a;
      for (int j = 0; j < 6; j++) a[j] = x[(6*b + j) % 40];
      if (b <= r) o[b] = a[int'(a[5:4])] ^ nf_le[r][b][int'(a[5:4])];
      else        o[b] = nf_le[r][b][a];
    end
    return o;
  endfunction

  function automatic logic [19:0] fr_expect(int r, logic [79:0] x);
    logic [19:0] o;
    for (int b = 0; b < 10; b++) begin
      logic [7:0] a;
      for (int j = 0; j < 8; j++) a[j] = x[(8*b + j) % 80];
      if (b <= r) begin
        o[2*b]     = a[int'(a[5:4])] ^ fr_le[r][b][int'(a[5:4])];
        o[2*b + 1] = a[int'(a[7:6])] ^ fr_le[r][b][4 + int'(a[7:6])];
      end else begin
        o[2*b]     = fr_le[r][b][int'({a[4:2], a[1:0]})];
        o[2*b + 1] = fr_le[r][b][32 + int'({a[7:5], a[1:0]})];
      end
    end
    return o;
  endfunction

  initial begin
    for (int r = 0; r < NR; r++) build(r);
    repeat (2) @(negedge clk);
    rst_n = 1'b1; cfg_rst_n = 1'b1;
    // load all ten chains together, each finishing on the same cycle
    for (int c = 1199; c >= 0; c--) begin
      @(negedge clk);
      for (int r = 0; r < NR; r++) begin
        nf_en[r] = (c < nf_len[r]);
        nf_di[r] = (c < nf_len[r]) ? nf_bits[r][c] : 1'b0;
        fr_en[r] = (c < fr_len[r]);
        fr_di[r] = (c < fr_len[r]) ? fr_bits[r][c] : 1'b0;
      end
    end
    @(negedge clk);
    nf_en = '0; fr_en = '0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      nf_in = {8'($urandom()), $urandom()};
      fr_in = {16'($urandom()), $urandom(), $urandom()};
      #1;
      for (int r = 0; r < NR; r++) begin
        automatic logic [9:0]  en = nf_expect(r, nf_in);
        automatic logic [19:0] ef = fr_expect(r, fr_in);
        checks += 2;
        if (nf_out[r] !== en) begin
          failures++;
          if (failures < 10) $display("nf %0d:%0d got %b exp %b", r + 1, 9 - r, nf_out[r], en);
        end
        if (fr_out[r] !== ef) begin
          failures++;
          if (failures < 10) $display("fr %0d:%0d got %b exp %b", r + 1, 9 - r, fr_out[r], ef);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
