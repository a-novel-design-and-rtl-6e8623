// tb_mux4_le: exhaustive self-checking test of the MUX4 logic element.
// All 16 inversion settings x 16 data patterns x 4 selects are applied; the
// expected output is the selected data bit XOR its inversion bit. A second
// part checks that the element realises 2-input functions from constant data:
// with d = 0 the inversion bits act as a truth table over the selects.
module tb_mux4_le;
  logic [3:0] inv, d;
  logic [1:0] s;
  logic       out;
  logic       clk = 1'b0;
  int         checks = 0, failures = 0;

  mux4_le dut (.inv, .d, .s, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic ref_mux(logic [3:0] iv, logic [3:0] dd, logic [1:0] ss);
    case (ss)
      2'd0: return dd[0] ^ iv[0];
      2'd1: return dd[1] ^ iv[1];
      2'd2: return dd[2] ^ iv[2];
      default: return dd[3] ^ iv[3];
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        for (int k = 0; k < 4; k++) begin
          inv = 4'(i); d = 4'(j); s = 2'(k);
          @(posedge clk);
          checks++;
          if (out !== ref_mux(inv, d, s)) begin
            failures++;
            if (failures < 10) $display("mux4 mismatch inv=%b d=%b s=%0d out=%b", inv, d, s, out);
          end
        end
    // 2-input functions of (s1, s0) from constant-0 data: XOR, AND, OR, NAND
    d = 4'b0000;
    for (int f = 0; f < 4; f++) begin
      logic [3:0] tt;
      tt = (f == 0) ? 4'b0110 : (f == 1) ? 4'b1000 : (f == 2) ? 4'b1110 : 4'b0111;
      inv = tt;
      for (int k = 0; k < 4; k++) begin
        logic a, b, exp_o;
        s = 2'(k); a = s[0]; b = s[1];
        exp_o = (f == 0) ? (a ^ b) : (f == 1) ? (a & b) : (f == 2) ? (a | b) : !(a & b);
        @(posedge clk);
        checks++;
        if (out !== exp_o) begin
          failures++;
          $display("mux4 function %0d mismatch s=%b out=%b", f, s, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
