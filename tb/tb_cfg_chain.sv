// tb_cfg_chain: self-checking test of the serial configuration memory at its
// default length (770 cells, one nonfracturable CLB).
// A random word is shifted in most significant bit first; after exactly N
// enabled cycles q must equal the word, with idle cycles (en low) inserted
// that must not move anything. Then shifting on shows the old bits leaving at
// sout in order, and reset clears all cells.
module tb_cfg_chain;
  localparam int N = 770;
  logic         clk = 1'b0, rst_n = 1'b0, en = 1'b0, sin = 1'b0, sout;
  logic [N-1:0] q, word;
  int           checks = 0, failures = 0, shifts = 0;

  cfg_chain dut (.clk, .rst_n, .en, .sin, .sout, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) word[i] = 1'($urandom());
    repeat (2) @(negedge clk);
    checks++;
    if (q != '0) begin failures++; $display("reset did not clear"); end
    rst_n = 1'b1;
    for (int i = N - 1; i >= 0; i--) begin
      @(negedge clk);
      en = 1'b1; sin = word[i];
      @(posedge clk);
      shifts++;
      if (i % 97 == 0) begin          // idle cycle: nothing may move
        @(negedge clk);
        en = 1'b0; sin = ~sin;
        @(posedge clk);
      end
    end
    @(negedge clk);
    en = 1'b0;
    checks++;
    if (shifts != N) begin failures++; $display("load took %0d shifts", shifts); end
    checks++;
    if (q !== word) begin failures++; $display("loaded word differs"); end
    // shift out: sout shows word[N-1], word[N-2], ...
    for (int i = N - 1; i >= N - 64; i--) begin
      checks++;
      if (sout !== word[i]) begin
        failures++;
        if (failures < 10) $display("sout bit %0d got %b", i, sout);
      end
      en = 1'b1; sin = 1'b0;
      @(posedge clk);
      @(negedge clk);
    end
    en = 1'b0;
    rst_n = 1'b0;
    #1;
    checks++;
    if (q != '0) begin failures++; $display("async reset did not clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
