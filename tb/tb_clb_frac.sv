// tb_clb_frac: self-checking test of the fracturable hybrid CLB at its
// default size (80 inputs, 10 eight-input two-output BLEs, 3 Dual MUX4 :
// 7 fracturable 6-LUT).
// A bitstream from tb_fab_pkg::fr_scn is shifted in (979 cycles, checked);
// it programs a Dual MUX4 with two independent outputs, a registered Dual
// MUX4 toggle, a fracturable 6-LUT split into two 5-LUTs (one output
// registered), one in 6-LUT mode, and a 5-LUT fed back from three other BLE
// outputs. Random inputs and clock enables follow; all twenty outputs are
// compared with the scenario's model before each rising edge, with a user
// reset mid-run.
module tb_clb_frac;
  import tb_fab_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0, cfg_rst_n = 1'b0, ce = 1'b0;
  logic        cfg_en = 1'b0, cfg_in = 1'b0, cfg_out;
  logic [79:0] clb_in = '0;
  logic [19:0] clb_out;
  int          checks = 0, failures = 0, load_cycles = 0;
  fr_scn       scn;

  clb_frac dut (.clk, .rst_n, .cfg_rst_n, .ce, .cfg_en, .cfg_in, .cfg_out, .clb_in, .clb_out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out(string what);
    logic [19:0] e = scn.outputs(clb_in);
    checks++;
    if (clb_out !== e) begin
      failures++;
      if (failures < 10) $display("%s at %0t: in=%h got %b exp %b", what, $time, clb_in, clb_out, e);
    end
  endtask

  initial begin
    scn = new();
    repeat (2) @(negedge clk);
    rst_n = 1'b1; cfg_rst_n = 1'b1;
    // load, most significant bit first
    for (int i = FR_BITS - 1; i >= 0; i--) begin
      @(negedge clk);
      cfg_en = 1'b1; cfg_in = scn.bits[i];
      @(posedge clk);
      load_cycles++;
    end
    @(negedge clk);
    cfg_en = 1'b0;
    checks++;
    if (load_cycles != FR_BITS || cfg_out !== scn.bits[FR_BITS-1]) begin
      failures++;
      $display("load: %0d cycles, cfg_out %b", load_cycles, cfg_out);
    end
    // registers still hold what they captured while loading: clear them
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    scn.reset();
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      clb_in = {16'($urandom()), $urandom(), $urandom()};
      ce = ($urandom() % 5) != 0;
      if (c == 1500) begin          // user reset: registers clear, config stays
        rst_n = 1'b0;
        #1;
        rst_n = 1'b1;
        scn.reset();
      end
      #1;
      check_out("clb_frac");
      @(posedge clk);
      if (ce) scn.clock(clb_in);
    end
    checks++;
    if (scn.n_split_diff == 0 || scn.n_6lut_hi == 0) begin
      failures++;
      $display("split halves never differed or 6-LUT upper half never used");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
