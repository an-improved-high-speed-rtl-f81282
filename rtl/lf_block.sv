// lf_block: a block of L logic functions of the same Q input variables
// (the "LF(q)" block of the converter), used to realise look-up tables
// without memory.
//
// Each function is split by Shannon expansion on the two most significant
// variables into four functions of the Q-2 low variables. Those are formed
// from one implicant generator (a decoder of the Q-2 low variables into all
// their minterms) shared by every function of the block: a function of the
// low variables is the OR of the minterms where its truth table holds a 1.
// Two levels of 2:1 multiplexers, controlled by x[Q-2] and then x[Q-1], pick
// the final value. For Q = 5 this is the arrangement of two multiplexed
// 4-variable functions, each made of two multiplexed 3-variable functions.
//
// TABLE holds the truth table: entry x occupies bits [x*L +: L]. Its
// default is the lowest output group of the projection table for modulus 32
// of the default base; the converter always passes its own tables.
// With PIPE = 1 a register follows the low-variable functions (the register
// placed inside the block, as the block is about two full-adder delays deep)
// and another follows the multiplexers: latency 2 cycles, one result per
// cycle. With PIPE = 0 the block is combinational and clk is unused.
// The minterm-decoder form of the implicant generator is this design's
// choice; only its role (shared by all functions of a block) is given.
module lf_block
  import crt_pkg::*;
#(
  parameter int                    Q     = 5,
  parameter int                    L     = 5,
  parameter logic [(2**Q)*L-1:0]   TABLE = ((2**Q)*L)'(default_lf_table()),
  parameter bit                    PIPE  = 1'b1
) (
  input  logic         clk,
  input  logic [Q-1:0] x,
  output logic [L-1:0] f
);

  localparam int R = Q - 2;   // variables handled by the implicant generator

  // Minterm mask of cofactor c (value of the two top variables) for output l.
  function automatic logic [2**R-1:0] cof_mask(input int c, input int l);
    logic [2**R-1:0] m;
    for (int i = 0; i < 2**R; i++) m[i] = TABLE[((c << R) + i) * L + l];
    return m;
  endfunction

  // Shared implicant generator.
  logic [2**R-1:0] minterm;
  always_comb
    for (int i = 0; i < 2**R; i++) minterm[i] = (x[R-1:0] == R'(i));

  // Four (Q-2)-variable functions per output.
  logic [L-1:0] g [4];
  for (genvar c = 0; c < 4; c++) begin : g_cof
    for (genvar l = 0; l < L; l++) begin : g_out
      localparam logic [2**R-1:0] MASK = cof_mask(c, l);
      assign g[c][l] = |(minterm & MASK);
    end
  end

  // Optional register between the function level and the multiplexer level.
  logic [L-1:0] g_s [4];
  logic [1:0]   xh_s;
  if (PIPE) begin : g_pipe1
    always_ff @(posedge clk) begin
      g_s  <= g;
      xh_s <= x[Q-1:Q-2];
    end
  end else begin : g_comb1
    assign g_s  = g;
    assign xh_s = x[Q-1:Q-2];
  end

  // Two multiplexer levels: x[Q-2] selects among 3-variable pairs, x[Q-1] among 4-variable pairs.
  logic [L-1:0] lo, hi, fm;
  always_comb begin
    lo = xh_s[0] ? g_s[1] : g_s[0];
    hi = xh_s[0] ? g_s[3] : g_s[2];
    fm = xh_s[1] ? hi : lo;
  end

  if (PIPE) begin : g_pipe2
    always_ff @(posedge clk) f <= fm;
  end else begin : g_comb2
    assign f = fm;
  end

endmodule
