// lt_projection: look-up table LT_j that maps one residue digit x_j to its
// orthogonal projection of the Chinese Remainder Theorem,
//     X_j = | x_j * N_j |_m * M_j ,   M_j = M / m,  N_j = M_j^-1 mod m,
// a B-bit number smaller than M.
//
// No memory is used: the B output bits are split into ceil(B/A) groups of A
// bits and each group is one lf_block of A functions of the A residue bits
// (for the default base, 8 blocks of five 5-variable functions). The
// truth tables are computed at elaboration from MOD and M, so the block is
// fully defined by its modulus and the system range. A residue input that is
// not below MOD is reduced modulo MOD (such input is not a valid digit).
// The last group's unused high outputs are constant 0.
//
// Timing: the latency of lf_block, 2 cycles with PIPE = 1, 0 with PIPE = 0.
// The split into A-output groups of A-variable functions is the published
// structure; computing the tables at elaboration is this design's choice.
module lt_projection
  import crt_pkg::*;
#(
  parameter int unsigned     MOD  = 32,
  parameter longint unsigned M    = M_DEFAULT,
  parameter int              A    = A_DEFAULT,
  parameter int              B    = B_DEFAULT,
  parameter bit              PIPE = 1'b1
) (
  input  logic         clk,
  input  logic [A-1:0] x,
  output logic [B-1:0] xp
);

  localparam longint unsigned ML = 64'(MOD);
  localparam longint unsigned MJ = M / ML;
  localparam longint unsigned NJ = mod_inverse(MJ % ML, ML);
  localparam int              NB = (B + A - 1) / A;

  // Truth table of output group k: bits [k*A +: A] of the projection of every input value.
  function automatic logic [(2**A)*A-1:0] group_table(input int k);
    logic [(2**A)*A-1:0] t;
    longint unsigned     v;
    for (int i = 0; i < 2**A; i++) begin
      v = ((longint'(i) % ML) * NJ % ML) * MJ;
      t[i*A +: A] = A'(v >> (k * A));
    end
    return t;
  endfunction

  logic [NB*A-1:0] full;
  for (genvar k = 0; k < NB; k++) begin : g_lf
    lf_block #(.Q(A), .L(A), .TABLE(group_table(k)), .PIPE(PIPE)) u_lf (
      .clk (clk),
      .x   (x),
      .f   (full[k*A +: A])
    );
  end

  assign xp = full[B-1:0];

endmodule
