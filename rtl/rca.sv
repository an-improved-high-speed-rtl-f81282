// rca: W-bit ripple-carry adder (CPA1), used to add the high-order
// segments of the Wallace tree's carry and save vectors, s = a + b.
// cout is the carry out of bit W-1; in the converter the operands are sized
// so that it is always 0.
//
// Stage k is the full adder of bit k. With PIPE = 1 a register follows every
// full adder (bit-level pipelining): the operand bits still to be added and
// the sum bits already formed travel with the carry, so the adder takes
// W cycles of latency and accepts a new pair of operands every cycle.
// With PIPE = 0 it is an ordinary combinational ripple chain.
// The ripple-carry form is the intended one; the bit-level pipelining is
// this design's way of meeting the full-adder-level pipelining goal.
module rca #(
  parameter int W    = 5,
  parameter bit PIPE = 1'b1
) (
  input  logic         clk,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s,
  output logic         cout
);

  for (genvar k = 0; k < W; k++) begin : g_bit
    logic [W-1:0] a_i, b_i, s_i, a_o, b_o, s_o, s_n;
    logic         c_i, c_o, c_n;

    if (k == 0) begin : g_first
      assign a_i = a;
      assign b_i = b;
      assign s_i = '0;
      assign c_i = 1'b0;
    end else begin : g_next
      assign a_i = g_bit[k-1].a_o;
      assign b_i = g_bit[k-1].b_o;
      assign s_i = g_bit[k-1].s_o;
      assign c_i = g_bit[k-1].c_o;
    end

    // Full adder of bit k.
    always_comb begin
      s_n    = s_i;
      s_n[k] = a_i[k] ^ b_i[k] ^ c_i;
      c_n    = (a_i[k] & b_i[k]) | (a_i[k] & c_i) | (b_i[k] & c_i);
    end

    if (PIPE) begin : g_reg
      always_ff @(posedge clk) begin
        a_o <= a_i;
        b_o <= b_i;
        s_o <= s_n;
        c_o <= c_n;
      end
    end else begin : g_wire
      assign a_o = a_i;
      assign b_o = b_i;
      assign s_o = s_n;
      assign c_o = c_n;
    end
  end

  assign s    = g_bit[W-1].s_o;
  assign cout = g_bit[W-1].c_o;

endmodule
