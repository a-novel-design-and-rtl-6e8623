// tb_dual_mux4: self-checking test of the Dual MUX4 element.
// For random inversion settings, all 256 input patterns are applied; each
// output must be the shared data bit picked by its own select pair, XOR that
// MUX's own inversion bit.
module tb_dual_mux4;
  import hyb_pkg::*;
  dmux4_cfg_t cfg;
  logic [7:0] in;
  logic       out_a, out_b;
  logic       clk = 1'b0;
  int         checks = 0, failures = 0;

  dual_mux4 dut (.cfg, .in, .out_a, .out_b);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 24; t++) begin
      logic [3:0] ia, ib;
      ia = 4'($urandom()); ib = 4'($urandom());
      if (t == 0) begin ia = 4'b0000; ib = 4'b1111; end
      cfg.inv_a = ia; cfg.inv_b = ib;
      for (int v = 0; v < 256; v++) begin
        int sa, sb;
        logic ea, eb;
        in = 8'(v);
        sa = (v >> 4) & 3;
        sb = (v >> 6) & 3;
        ea = ((v >> sa) & 1) != ((int'(ia) >> sa) & 1);
        eb = ((v >> sb) & 1) != ((int'(ib) >> sb) & 1);
        @(posedge clk);
        checks += 2;
        if (out_a !== ea || out_b !== eb) begin
          failures++;
          if (failures < 10) $display("dual mux4 mismatch in=%h a=%b/%b b=%b/%b", in, out_a, ea, out_b, eb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
