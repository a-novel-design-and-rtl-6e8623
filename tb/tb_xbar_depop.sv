// tb_xbar_depop: self-checking test of the 50%-depopulated crossbar at the
// nonfracturable CLB's size (50 sources, 60 pins, 5-bit codes).
// Random source values and random select codes (including the constant code
// and out-of-range codes) are applied; pin p must show source
// 2*code + (p mod 2), or 0 for codes of 25 and above. A coverage part then
// routes every source to some pin of every BLE-sized group of six pins.
module tb_xbar_depop;
  localparam int NS = 50, NP = 60, SW = 5, NC = 25;
  logic [NS-1:0]    src;
  logic [NP*SW-1:0] sel;
  logic [NP-1:0]    pin;
  logic             clk = 1'b0;
  int               checks = 0, failures = 0;

  xbar_depop #(.N_SRC(NS), .N_PIN(NP), .DEPOP(2)) dut (.src, .sel, .pin);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      src = {18'($urandom()), $urandom()};
      for (int p = 0; p < NP; p++) sel[p*SW +: SW] = 5'($urandom() % 32);
      @(posedge clk);
      for (int p = 0; p < NP; p++) begin
        int   code;
        logic e;
        code = int'(sel[p*SW +: SW]);
        e = (code < NC) ? src[2*code + (p % 2)] : 1'b0;
        checks++;
        if (pin[p] !== e) begin
          failures++;
          if (failures < 10) $display("pin %0d code %0d got %b exp %b", p, code, pin[p], e);
        end
      end
    end
    // reachability: every source reaches every group of 6 pins through one pin
    for (int s = 0; s < NS; s++) begin
      src = '0;
      src[s] = 1'b1;
      for (int p = 0; p < NP; p++)
        sel[p*SW +: SW] = ((p % 2) == (s % 2)) ? 5'(s / 2) : 5'(NC);
      @(posedge clk);
      for (int g = 0; g < NP / 6; g++) begin
        checks++;
        if (pin[g*6 +: 6] != ((s % 2) != 0 ? 6'b101010 : 6'b010101)) begin
          failures++;
          $display("source %0d not routed to group %0d: %b", s, g, pin[g*6 +: 6]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
