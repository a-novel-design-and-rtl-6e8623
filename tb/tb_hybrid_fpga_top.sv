// tb_hybrid_fpga_top: end-to-end test of both hybrid CLB tiles at the
// default parameters.
// Both configuration chains are loaded at the same time (770 and 979 bits;
// the load lengths are checked), then both tiles run their programmed
// circuits from tb_fab_pkg under random inputs and a random clock enable,
// with a user reset in the middle. Every output of both tiles is compared
// with the reference models before each rising edge. Each mechanism of the
// architecture is counted, and one that never happened counts as a failure:
// serial configuration, MUX4 data inversion, constant data from the
// crossbar, registered and bypassed BLE outputs, clock-enable hold, local
// feedback in each tile, the two independent Dual MUX4 outputs, the 6-LUT
// split into two 5-LUTs, the unsplit 6-LUT's upper half, and user reset.
module tb_hybrid_fpga_top;
  import tb_fab_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0, cfg_rst_n = 1'b0, ce = 1'b0;
  logic        nf_cfg_en = 1'b0, nf_cfg_in = 1'b0, nf_cfg_out;
  logic        fr_cfg_en = 1'b0, fr_cfg_in = 1'b0, fr_cfg_out;
  logic [39:0] nf_in = '0;
  logic [9:0]  nf_out;
  logic [79:0] fr_in = '0;
  logic [19:0] fr_out;
  int          checks = 0, failures = 0;
  int          nf_load = 0, fr_load = 0;
  nf_scn       nfs;
  fr_scn       frs;

  // mechanism counters
  int n_cfg_load, n_inversion, n_const_one, n_reg_toggle, n_bypass, n_ce_hold;
  int n_dual_indep, n_user_reset;

  hybrid_fpga_top dut (
    .clk, .rst_n, .cfg_rst_n, .ce,
    .nf_cfg_en, .nf_cfg_in, .nf_cfg_out, .nf_in, .nf_out,
    .fr_cfg_en, .fr_cfg_in, .fr_cfg_out, .fr_in, .fr_out
  );

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    logic prev_r1;
    nfs = new();
    frs = new();
    {n_cfg_load, n_inversion, n_const_one, n_reg_toggle, n_bypass, n_ce_hold} = '0;
    {n_dual_indep, n_user_reset} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1; cfg_rst_n = 1'b1;
    // both chains together; the shorter one starts later so both end together
    for (int c = FR_BITS - 1; c >= 0; c--) begin
      @(negedge clk);
      fr_cfg_en = 1'b1; fr_cfg_in = frs.bits[c];
      nf_cfg_en = (c < NF_BITS);
      nf_cfg_in = (c < NF_BITS) ? nfs.bits[c] : 1'b0;
      @(posedge clk);
      fr_load++;
      if (nf_cfg_en) nf_load++;
    end
    @(negedge clk);
    nf_cfg_en = 1'b0; fr_cfg_en = 1'b0;
    checks++;
    if (nf_load != NF_BITS || fr_load != FR_BITS) begin
      failures++;
      $display("load lengths %0d %0d", nf_load, fr_load);
    end else n_cfg_load++;
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    nfs.reset(); frs.reset();
    for (int c = 0; c < 4000; c++) begin
      logic [9:0]  en;
      logic [19:0] ef;
      int s;
      @(negedge clk);
      nf_in = {8'($urandom()), $urandom()};
      fr_in = {16'($urandom()), $urandom(), $urandom()};
      ce = ($urandom() % 5) != 0;
      if (c == 2000) begin
        rst_n = 1'b0;
        #1;
        rst_n = 1'b1;
        nfs.reset(); frs.reset();
        n_user_reset++;
      end
      #1;
      en = nfs.outputs(nf_in);
      ef = frs.outputs(fr_in);
      checks += 2;
      if (nf_out !== en) begin
        failures++;
        if (failures < 10) $display("nf tile at %0t: got %b exp %b", $time, nf_out, en);
      end
      if (fr_out !== ef) begin
        failures++;
        if (failures < 10) $display("fr tile at %0t: got %b exp %b", $time, fr_out, ef);
      end
      s = int'({nf_in[5], nf_in[4]});
      if (nf_in[s] != en[0]) n_inversion++;
      if (nfs.r1) n_const_one++;
      if (nf_out[3] === en[3]) n_bypass++;
      if (ef[0] != ef[1]) n_dual_indep++;
      prev_r1 = nfs.r1;
      @(posedge clk);
      if (ce) begin
        nfs.clock(nf_in);
        frs.clock(fr_in);
        if (nfs.r1 != prev_r1) n_reg_toggle++;
      end else n_ce_hold++;
    end
    $display("mechanism counts:");
    need("serial configuration load", n_cfg_load);
    need("MUX4 data inversion", n_inversion);
    need("constant data (XOR = 1)", n_const_one);
    need("registered BLE output change", n_reg_toggle);
    need("bypassed BLE output", n_bypass);
    need("clock-enable hold", n_ce_hold);
    need("nf local feedback decisive", nfs.n_fb_diff);
    need("Dual MUX4 outputs differ", n_dual_indep);
    need("split 5-LUT halves differ", frs.n_split_diff);
    need("6-LUT mode upper half", frs.n_6lut_hi);
    need("user reset", n_user_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
