// tb_ble_frac: self-checking test of the fracturable BLE, both kinds.
// A fracturable-6-LUT BLE and a Dual MUX4 BLE get random inputs, random clock
// enable and, phase by phase, random configurations (split or 6-LUT mode,
// each output registered or not). Before each rising edge both outputs of
// both BLEs are compared with a reference model of the LE, taken through a
// one-cycle register where the output's register is enabled.
module tb_ble_frac;
  import hyb_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  logic [66:0] cfg_l;          // {reg_en[1:0], split, lut_b, lut_a}
  logic [9:0]  cfg_m;          // {reg_en[1:0], inv_b, inv_a}
  logic [7:0]  in;
  logic [1:0]  out_l, out_m;
  logic [1:0]  q_l, q_m;
  int          checks = 0, failures = 0;

  ble_frac #(.KIND(LE_FLUT6)) u_lut (.clk, .rst_n, .ce, .cfg(cfg_l), .in, .out(out_l));
  ble_frac #(.KIND(LE_DMUX4)) u_mux (.clk, .rst_n, .ce, .cfg(cfg_m), .in, .out(out_m));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] f_lut(logic [66:0] c, logic [7:0] a);
    logic [31:0] la = c[31:0], lb = c[63:32];
    logic        split = c[64];
    logic [4:0]  ia = {a[4:2], a[1:0]};
    logic [4:0]  ib = split ? {a[7:5], a[1:0]} : ia;
    logic        oa = (!split && a[5]) ? lb[ia] : la[ia];
    return {lb[ib], oa};
  endfunction
  function automatic logic [1:0] f_mux(logic [9:0] c, logic [7:0] a);
    int sa = int'(a[5:4]), sb = int'(a[7:6]);
    return {a[sb] ^ c[4 + sb], a[sa] ^ c[sa]};
  endfunction

  task automatic check(string what, logic [1:0] got, logic [1:0] exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("%s mismatch at %0t: got %b exp %b", what, $time, got, exp_v);
    end
  endtask

  initial begin
    cfg_l = {2'b11, 1'b1, $urandom(), $urandom()};
    cfg_m = {2'b11, 8'($urandom())};
    in = '0;
    q_l = '0; q_m = '0;
    repeat (2) @(negedge clk);
    check("reset lut", out_l, 2'b00);
    check("reset mux", out_m, 2'b00);
    rst_n = 1'b1;
    for (int phase = 0; phase < 16; phase++) begin
      for (int c = 0; c < 200; c++) begin
        logic [1:0] cl, cm;
        @(negedge clk);
        if (c == 0) begin
          cfg_l = {2'(phase), 1'(phase >> 2), $urandom(), $urandom()};
          cfg_m = {2'(phase >> 1), 8'($urandom())};
        end
        in = 8'($urandom());
        ce = ($urandom() % 4) != 0;
        #1;
        cl = f_lut(cfg_l, in);
        cm = f_mux(cfg_m, in);
        check("flut6", out_l, {cfg_l[66] ? q_l[1] : cl[1], cfg_l[65] ? q_l[0] : cl[0]});
        check("dmux4", out_m, {cfg_m[9]  ? q_m[1] : cm[1], cfg_m[8]  ? q_m[0] : cm[0]});
        @(posedge clk);
        if (ce) begin
          q_l = cl;
          q_m = cm;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
