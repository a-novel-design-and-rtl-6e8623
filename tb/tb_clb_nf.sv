// tb_clb_nf: self-checking test of the nonfracturable hybrid CLB at its
// default size (40 inputs, 10 BLEs, 3 MUX4 : 7 6-LUT).
// A bitstream from tb_fab_pkg::nf_scn is shifted in (770 cycles, checked);
// it programs an inverting 4:1 mux in a MUX4, an XOR from constant data in a
// registered MUX4, a random 6-LUT, a 6-LUT fed back from two other BLEs, and
// a registered 6-LUT toggle. Random inputs and clock enables are then
// applied and all ten outputs are compared with the scenario's model before
// each rising edge. A user reset mid-run must clear the registers but keep
// the configuration.
module tb_clb_nf;
  import tb_fab_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0, cfg_rst_n = 1'b0, ce = 1'b0;
  logic        cfg_en = 1'b0, cfg_in = 1'b0, cfg_out;
  logic [39:0] clb_in = '0;
  logic [9:0]  clb_out;
  int          checks = 0, failures = 0, load_cycles = 0;
  nf_scn       scn;

  clb_nf dut (.clk, .rst_n, .cfg_rst_n, .ce, .cfg_en, .cfg_in, .cfg_out, .clb_in, .clb_out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out(string what);
    logic [9:0] e = scn.outputs(clb_in);
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
    for (int i = NF_BITS - 1; i >= 0; i--) begin
      @(negedge clk);
      cfg_en = 1'b1; cfg_in = scn.bits[i];
      @(posedge clk);
      load_cycles++;
    end
    @(negedge clk);
    cfg_en = 1'b0;
    checks++;
    if (load_cycles != NF_BITS || cfg_out !== scn.bits[NF_BITS-1]) begin
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
      clb_in = {8'($urandom()), $urandom()};
      ce = ($urandom() % 5) != 0;
      if (c == 1500) begin          // user reset: registers clear, config stays
        rst_n = 1'b0;
        #1;
        rst_n = 1'b1;
        scn.reset();
      end
      #1;
      check_out("clb_nf");
      @(posedge clk);
      if (ce) scn.clock(clb_in);
    end
    checks++;
    if (scn.n_fb_diff == 0) begin failures++; $display("feedback never mattered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
