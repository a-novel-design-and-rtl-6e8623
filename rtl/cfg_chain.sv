// cfg_chain: configuration memory of one CLB, loaded as a serial chain.
//
// N configuration cells (the SRAM cells of the truth tables, inversion bits,
// register-bypass bits and crossbar selects) are written through a shift
// register: while en is high, every rising clock edge shifts sin into q[0]
// and moves each bit one place up; sout is q[N-1], so chains of several
// CLBs can be cascaded. Loading a full word takes exactly N enabled cycles,
// and the bit shifted in first ends at q[N-1]. rst_n (asynchronous,
// active-low) clears every cell. The document names only SRAM configuration
// cells; the serial load and the reset are this design's choice.
module cfg_chain #(
  parameter int unsigned N = 770
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         sin,
  output logic         sout,
  output logic [N-1:0] q
);
  if (N == 1) begin : g_one
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  q <= '0;
      else if (en) q <= sin;
    end
  end else begin : g_many
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  q <= '0;
      else if (en) q <= {q[N-2:0], sin};
    end
  end

  assign sout = q[N-1];
endmodule
