// csa_3to2: one layer of W full adders (CSA2) that turns three operands
// into a save vector s and a carry vector c with s + c = a + b + d
// (modulo 2^W). The caller chooses W so that the true sum fits.
//
// Timing: with PIPE = 1 both outputs are registered (latency 1 cycle);
// with PIPE = 0 the layer is combinational. The output register is this
// design's choice.
module csa_3to2 #(
  parameter int W    = 39,
  parameter bit PIPE = 1'b1
) (
  input  logic         clk,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] d,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);

  logic [W-1:0] s_n, c_n;
  always_comb begin
    s_n = a ^ b ^ d;
    c_n = ((a & b) | (a & d) | (b & d)) << 1;
  end

  if (PIPE) begin : g_reg
    always_ff @(posedge clk) begin
      s <= s_n;
      c <= c_n;
    end
  end else begin : g_wire
    assign s = s_n;
    assign c = c_n;
  end

endmodule
