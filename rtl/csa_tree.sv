// csa_tree: N-operand Wallace tree (CSA1). Layers of 3:2 full-adder
// compressors reduce the N operands to a save vector s and a carry vector c
// with s + c equal to the sum of the operands. Each layer groups its
// operands in threes; one or two left-over operands pass to the next layer
// unchanged. N = 8 needs 4 layers (8 -> 6 -> 4 -> 3 -> 2).
//
// W must be wide enough for the full sum: since all vectors are
// non-negative and add up to less than 2^W, no carry out of bit W-1 is ever
// dropped. N must be at least 3.
//
// Timing: with PIPE = 1 a register follows every layer, so the latency is
// csa_tree_levels(N) cycles (one full-adder delay per stage) and a new
// operand set is accepted every cycle. With PIPE = 0 the tree is
// combinational. The Wallace tree and its layer count follow the method;
// the order in which operands are grouped is this design's choice.
module csa_tree
  import crt_pkg::*;
#(
  parameter int N    = N_DEFAULT,
  parameter int W    = 41,
  parameter bit PIPE = 1'b1
) (
  input  logic         clk,
  input  logic [W-1:0] op [N],
  output logic [W-1:0] s,
  output logic [W-1:0] c
);

  localparam int LV = csa_tree_levels(N);

  for (genvar l = 0; l < LV; l++) begin : g_lvl
    localparam int CNT = csa_tree_count(N, l);
    localparam int G   = CNT / 3;
    localparam int NXT = csa_tree_count(N, l + 1);

    logic [W-1:0] din  [CNT];
    logic [W-1:0] nxt  [NXT];
    logic [W-1:0] dout [NXT];

    if (l == 0) begin : g_first
      assign din = op;
    end else begin : g_next
      assign din = g_lvl[l-1].dout;
    end

    for (genvar g = 0; g < G; g++) begin : g_fa
      assign nxt[2*g]   = din[3*g] ^ din[3*g+1] ^ din[3*g+2];
      assign nxt[2*g+1] = ((din[3*g] & din[3*g+1]) | (din[3*g] & din[3*g+2]) |
                           (din[3*g+1] & din[3*g+2])) << 1;
    end
    for (genvar r = 3 * G; r < CNT; r++) begin : g_pass
      assign nxt[2*G + r - 3*G] = din[r];
    end

    if (PIPE) begin : g_reg
      always_ff @(posedge clk) dout <= nxt;
    end else begin : g_wire
      assign dout = nxt;
    end
  end

  assign s = g_lvl[LV-1].dout[0];
  assign c = g_lvl[LV-1].dout[1];

endmodule
