// csa_add_const: carry-save addition of a constant K to a number held as
// a save/carry pair (CSA3). In the converter K = 2^b - M, so that the
// later carry-propagate sum equals S - M + 2^b, the two's complement
// subtraction of M.
//
// With one input fixed, each full adder degenerates: where K has a 0 the
// position is a half adder (s = a^b, carry = a&b); where K has a 1 it gives
// s = ~(a^b), carry = a|b. The result satisfies s + c = a + b + K
// (modulo 2^W).
//
// Timing: with PIPE = 1 both outputs are registered (latency 1 cycle);
// with PIPE = 0 the block is combinational. Adding 2^b - M in carry-save
// form follows the method; the simplified cells and the register are this
// design's choices.
module csa_add_const #(
  parameter int           W    = 39,
  parameter logic [W-1:0] K    = W'(64'd130618613344),
  parameter bit           PIPE = 1'b1
) (
  input  logic         clk,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);

  logic [W-1:0] s_n, g_n;
  for (genvar i = 0; i < W; i++) begin : g_bit
    if (K[i]) begin : g_one
      assign s_n[i] = ~(a[i] ^ b[i]);
      assign g_n[i] = a[i] | b[i];
    end else begin : g_zero
      assign s_n[i] = a[i] ^ b[i];
      assign g_n[i] = a[i] & b[i];
    end
  end

  logic [W-1:0] c_n;
  assign c_n = g_n << 1;

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
