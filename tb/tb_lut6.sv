// tb_lut6: self-checking test of the 6-input lookup table.
// For a set of truth tables (all-zero, all-one, alternating and random) every
// one of the 64 input combinations is applied and the output is compared with
// the truth-table bit selected by the input value. A watchdog ends the run.
module tb_lut6;
  logic [63:0] truth;
  logic [5:0]  in;
  logic        out;
  logic        clk = 1'b0;
  int          checks = 0, failures = 0;

  lut6 dut (.truth, .in, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 40; t++) begin
      case (t)
        0: truth = '0;
        1: truth = '1;
        2: truth = 64'hAAAA_AAAA_AAAA_AAAA;
        3: truth = 64'h8000_0000_0000_0001;
        default: truth = {$urandom(), $urandom()};
      endcase
      for (int a = 0; a < 64; a++) begin
        in = 6'(a);
        @(posedge clk);
        checks++;
        if (out !== truth[a]) begin
          failures++;
          if (failures < 10) $display("lut6 mismatch truth=%h in=%0d out=%b", truth, a, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
