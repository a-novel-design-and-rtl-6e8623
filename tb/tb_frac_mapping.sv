// tb_frac_mapping: packs pairs of functions into the fracturable hybrid CLB
// (default size) and verifies them in the hardware.
//
// Eight variables v0..v7 are each driven onto CLB inputs 2j and 2j+1, so any
// crossbar pin parity can reach them. Three packings are exercised:
//  * Dual MUX4 (BLE0): every pair of 2-input functions, A of (v0,v1) and B
//    of (v2,v3), with no shared input. Both data pins carry the crossbar's
//    constant 0 and each MUX's own inversion bits hold its truth table.
//  * Fracturable 6-LUT (BLE3), split: two 5-input functions sharing v0, v1
//    (A of v0..v4, B of v0,v1,v5,v6,v7), and two 4-input functions with no
//    common input (A of v0,v2,v3,v4 and B of v1,v5,v6,v7).
//  * Fracturable 6-LUT (BLE3), unsplit: one 6-input function of v0..v5.
// After each bitstream load all 256 assignments of v0..v7 are applied and
// both BLE outputs are compared with the functions.
module tb_frac_mapping;
  localparam int NB = 979;
  logic          clk = 1'b0, rst_n = 1'b0, cfg_rst_n = 1'b0, ce = 1'b0;
  logic          cfg_en = 1'b0, cfg_in = 1'b0, cfg_out;
  logic [79:0]   clb_in = '0;
  logic [19:0]   clb_out;
  logic [NB-1:0] bits;
  int            checks = 0, failures = 0;
  int            n_dmux_pairs = 0, n_5in_pairs = 0, n_4in_pairs = 0, n_6in = 0;

  clb_frac dut (.clk, .rst_n, .cfg_rst_n, .ce, .cfg_en, .cfg_in, .cfg_out, .clb_in, .clb_out);

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 6-bit code c on pin p selects source 2c + p%2; code 50 is constant 0.
  function automatic void clear_bits();
    bits = '0;
    for (int p = 0; p < 80; p++) bits[p*6 +: 6] = 6'd50;
  endfunction
  function automatic void route_var(int p, int v);
    bits[p*6 +: 6] = 6'(v);
  endfunction

  task automatic load();
    for (int i = NB - 1; i >= 0; i--) begin
      @(negedge clk);
      cfg_en = 1'b1; cfg_in = bits[i];
    end
    @(negedge clk);
    cfg_en = 1'b0;
  endtask

  // apply all 256 assignments; fa/fb are the expected outputs per assignment
  task automatic run(int ble, logic [255:0] fa, logic [255:0] fb, bit check_b, string what);
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      for (int v = 0; v < 8; v++) begin
        clb_in[2*v]     = a[v];
        clb_in[2*v + 1] = a[v];
      end
      #1;
      checks++;
      if (clb_out[2*ble] !== fa[a] || (check_b && clb_out[2*ble + 1] !== fb[a])) begin
        failures++;
        if (failures < 10) $display("%s a=%0d got %b%b exp %b%b", what, a,
                                    clb_out[2*ble+1], clb_out[2*ble], fb[a], fa[a]);
      end
    end
  endtask

  initial begin
    logic [255:0] fa, fb;
    repeat (2) @(negedge clk);
    rst_n = 1'b1; cfg_rst_n = 1'b1;

    // Dual MUX4: all pairs of independent 2-input functions
    for (int ta = 0; ta < 16; ta++)
      for (int tb = 0; tb < 16; tb++) begin
        clear_bits();
        route_var(4, 0); route_var(5, 1);    // select A = (v1, v0)
        route_var(6, 2); route_var(7, 3);    // select B = (v3, v2)
        bits[480 +: 10] = {2'b00, 4'(tb), 4'(ta)};
        for (int a = 0; a < 256; a++) begin
          fa[a] = ta[int'(a[1:0])];
          fb[a] = tb[int'(a[3:2])];
        end
        load();
        run(0, fa, fb, 1'b1, "dual mux4");
        n_dmux_pairs++;
      end

    // fracturable 6-LUT, split: two 5-input functions sharing v0, v1
    for (int t = 0; t < 20; t++) begin
      logic [31:0] la, lb;
      la = $urandom(); lb = $urandom();
      clear_bits();
      route_var(24, 0); route_var(25, 1);
      for (int j = 0; j < 3; j++) begin
        route_var(26 + j, 2 + j);
        route_var(29 + j, 5 + j);
      end
      bits[510 +: 67] = {2'b00, 1'b1, lb, la};
      for (int a = 0; a < 256; a++) begin
        fa[a] = la[a[4:0]];
        fb[a] = lb[{a[7:5], a[1:0]}];
      end
      load();
      run(3, fa, fb, 1'b1, "two 5-input");
      n_5in_pairs++;
    end

    // split: two 4-input functions with no common input
    for (int t = 0; t < 20; t++) begin
      logic [15:0] ga, gb;
      logic [31:0] la, lb;
      ga = 16'($urandom()); gb = 16'($urandom());
      for (int x = 0; x < 32; x++) begin
        la[x] = ga[{x[4:2], x[0]}];          // A ignores shared pin 1
        lb[x] = gb[{x[4:2], x[1]}];          // B ignores shared pin 0
      end
      clear_bits();
      route_var(24, 0); route_var(25, 1);
      for (int j = 0; j < 3; j++) begin
        route_var(26 + j, 2 + j);
        route_var(29 + j, 5 + j);
      end
      bits[510 +: 67] = {2'b00, 1'b1, lb, la};
      for (int a = 0; a < 256; a++) begin
        fa[a] = ga[{a[4:2], a[0]}];
        fb[a] = gb[{a[7:5], a[1]}];
      end
      load();
      run(3, fa, fb, 1'b1, "two 4-input");
      n_4in_pairs++;
    end

    // unsplit: one 6-input function of v0..v5
    for (int t = 0; t < 20; t++) begin
      logic [63:0] f6;
      f6 = {$urandom(), $urandom()};
      clear_bits();
      for (int j = 0; j < 6; j++) route_var(24 + j, j);
      bits[510 +: 67] = {2'b00, 1'b0, f6[63:32], f6[31:0]};
      for (int a = 0; a < 256; a++) begin
        fa[a] = f6[a[5:0]];
        fb[a] = 1'b0;
      end
      load();
      run(3, fa, fb, 1'b0, "6-input");
      n_6in++;
    end

    $display("Dual MUX4 pairs %0d, 5-input pairs %0d, 4-input pairs %0d, 6-input %0d",
             n_dmux_pairs, n_5in_pairs, n_4in_pairs, n_6in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
