// cpa_prefix: W-bit carry-propagate adder with logarithmic depth (CPA2 and
// CPA3), s = a + b, cout = carry out of bit W-1.
//
// A Kogge-Stone parallel-prefix network is used: bit generate and
// propagate signals are combined over distances 1, 2, 4, ... in
// ceil(log2 W) levels, giving every carry after that many levels; the sum is
// the bit propagate XOR the incoming carry. This gives the log2-depth,
// W*log2(W)-size adder the converter calls for; the specific prefix network
// is this design's choice.
//
// Timing: with PIPE = 1 a register follows every prefix level (latency
// ceil(log2 W) cycles, one addition per cycle); the final XOR is
// combinational after the last register. With PIPE = 0 the adder is
// combinational.
module cpa_prefix
  import crt_pkg::*;
#(
  parameter int W    = 38,
  parameter bit PIPE = 1'b1
) (
  input  logic         clk,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s,
  output logic         cout
);

  localparam int LV = prefix_levels(W);

  for (genvar l = 0; l < LV; l++) begin : g_lvl
    localparam int D = 1 << l;
    logic [W-1:0] g_i, p_i, h_i;   // group generate, group propagate, bit propagate (a^b)
    logic [W-1:0] g_n, p_n;
    logic [W-1:0] g_o, p_o, h_o;

    if (l == 0) begin : g_first
      assign g_i = a & b;
      assign p_i = a ^ b;
      assign h_i = a ^ b;
    end else begin : g_next
      assign g_i = g_lvl[l-1].g_o;
      assign p_i = g_lvl[l-1].p_o;
      assign h_i = g_lvl[l-1].h_o;
    end

    always_comb begin
      for (int i = 0; i < W; i++) begin
        if (i >= D) begin
          g_n[i] = g_i[i] | (p_i[i] & g_i[i-D]);
          p_n[i] = p_i[i] & p_i[i-D];
        end else begin
          g_n[i] = g_i[i];
          p_n[i] = p_i[i];
        end
      end
    end

    if (PIPE) begin : g_reg
      always_ff @(posedge clk) begin
        g_o <= g_n;
        p_o <= p_n;
        h_o <= h_i;
      end
    end else begin : g_wire
      assign g_o = g_n;
      assign p_o = p_n;
      assign h_o = h_i;
    end
  end

  // Carry into bit i is the group generate of bits i-1..0.
  logic [W-1:0] g_f, h_f;
  if (LV == 0) begin : g_one_bit
    assign g_f = a & b;
    assign h_f = a ^ b;
  end else begin : g_tail
    assign g_f = g_lvl[LV-1].g_o;
    assign h_f = g_lvl[LV-1].h_o;
  end

  assign s    = h_f ^ {g_f[W-2:0], 1'b0};
  assign cout = g_f[W-1];

endmodule
