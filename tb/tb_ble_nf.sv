// tb_ble_nf: self-checking test of the nonfracturable BLE, both kinds.
// A 6-LUT BLE and a MUX4 BLE are driven with random inputs and a random clock
// enable. Inputs change on the falling edge; just before each rising edge the
// outputs are compared with a reference: the LE function itself when the
// register is bypassed, or the value captured at the last enabled rising edge
// (one cycle of latency) when it is used. Reset must clear the registers.
module tb_ble_nf;
  import hyb_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  logic [64:0] cfg_l;
  logic [4:0]  cfg_m;
  logic [5:0]  in;
  logic        out_l, out_m;
  logic        q_l, q_m;       // reference registers
  int          checks = 0, failures = 0;
  int          n_reg = 0, n_hold = 0;

  ble_nf #(.KIND(LE_LUT6)) u_lut (.clk, .rst_n, .ce, .cfg(cfg_l), .in, .out(out_l));
  ble_nf #(.KIND(LE_MUX4)) u_mux (.clk, .rst_n, .ce, .cfg(cfg_m), .in, .out(out_m));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic f_lut(logic [63:0] t, logic [5:0] a);
    return t[a];
  endfunction
  function automatic logic f_mux(logic [3:0] iv, logic [5:0] a);
    int s = int'(a[5:4]);
    return a[s] ^ iv[s];
  endfunction

  task automatic check(string what, logic got, logic exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("%s mismatch at %0t: got %b exp %b", what, $time, got, exp_v);
    end
  endtask

  initial begin
    cfg_l = {1'b1, $urandom(), $urandom()};
    cfg_m = {1'b1, 4'($urandom())};
    in = '0;
    q_l = 1'b0; q_m = 1'b0;
    repeat (2) @(negedge clk);
    check("reset lut", out_l, 1'b0);
    check("reset mux", out_m, 1'b0);
    rst_n = 1'b1;
    for (int phase = 0; phase < 8; phase++) begin
      for (int c = 0; c < 200; c++) begin
        @(negedge clk);
        if (c == 0) begin
          cfg_l = {phase[0], $urandom(), $urandom()};
          cfg_m = {phase[1], 4'($urandom())};
        end
        in = 6'($urandom());
        ce = ($urandom() % 4) != 0;
        #1;
        check("lut", out_l, cfg_l[64] ? q_l : f_lut(cfg_l[63:0], in));
        check("mux", out_m, cfg_m[4]  ? q_m : f_mux(cfg_m[3:0], in));
        @(posedge clk);
        if (ce) begin
          if (cfg_l[64]) n_reg++;
          q_l = f_lut(cfg_l[63:0], in);
          q_m = f_mux(cfg_m[3:0], in);
        end else n_hold++;
      end
    end
    if (n_reg == 0 || n_hold == 0) begin
      failures++;
      $display("register path not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
