// tb_frac_lut6: self-checking test of the fracturable 6-LUT.
// For random truth-table halves, all 256 input patterns are applied in both
// modes. Split mode: out_a must be lut_a at {in[4:2],in[1:0]} and out_b lut_b at
// {in[7:5],in[1:0]}. 6-LUT mode: out_a must be the 64-bit table {lut_b,lut_a}
// at in[5:0], whatever in[7:6] hold.
module tb_frac_lut6;
  import hyb_pkg::*;
  flut6_cfg_t cfg;
  logic [7:0] in;
  logic       out_a, out_b;
  logic       clk = 1'b0;
  int         checks = 0, failures = 0;

  frac_lut6 dut (.cfg, .in, .out_a, .out_b);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20; t++) begin
      logic [31:0] la, lb;
      logic [63:0] full;
      la = $urandom(); lb = $urandom();
      full = {lb, la};
      for (int mode = 0; mode < 2; mode++) begin
        cfg.split = mode[0];
        cfg.lut_a = la;
        cfg.lut_b = lb;
        for (int v = 0; v < 256; v++) begin
          int ia, ib, i6;
          in = 8'(v);
          ia = (((v >> 2) & 7) << 2) | (v & 3);
          ib = (((v >> 5) & 7) << 2) | (v & 3);
          i6 = v & 63;
          @(posedge clk);
          if (mode == 1) begin
            checks += 2;
            if (out_a !== la[ia] || out_b !== lb[ib]) begin
              failures++;
              if (failures < 10) $display("split mismatch in=%h a=%b b=%b", in, out_a, out_b);
            end
          end else begin
            checks++;
            if (out_a !== full[i6]) begin
              failures++;
              if (failures < 10) $display("6-LUT mismatch in=%h a=%b", in, out_a);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
