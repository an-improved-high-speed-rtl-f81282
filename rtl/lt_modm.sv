// lt_modm: modulo-M generator LT_{N+1}. Its input is the IW-bit sum of the
// high-order segments of the Wallace tree's carry and save vectors, whose
// bits have weights 2^SHIFT .. 2^(SHIFT+IW-1). It returns
//     | v * 2^SHIFT |_M ,
// a B-bit number smaller than M.
//
// Like the projection tables it is built without memory, from
// ceil(B/A) lf_block groups of A output functions of the IW input bits
// (for the default base: IW = 5, so 5-variable functions again). The table
// is computed at elaboration from M and SHIFT. IW must be at least 3.
//
// Timing: the latency of lf_block, 2 cycles with PIPE = 1, 0 with PIPE = 0.
// Reducing only the short high-segment sum by a table is the method's key
// step; building it from the same LF blocks as the projections is the
// published intent, the grouping of outputs is this design's choice.
module lt_modm
  import crt_pkg::*;
#(
  parameter longint unsigned M     = M_DEFAULT,
  parameter int              B     = B_DEFAULT,
  parameter int              IW    = 5,
  parameter int              SHIFT = B_DEFAULT - 2,
  parameter int              A     = A_DEFAULT,
  parameter bit              PIPE  = 1'b1
) (
  input  logic          clk,
  input  logic [IW-1:0] v,
  output logic [B-1:0]  r
);

  localparam int NB = (B + A - 1) / A;

  function automatic logic [(2**IW)*A-1:0] group_table(input int k);
    logic [(2**IW)*A-1:0] t;
    longint unsigned      y;
    for (int i = 0; i < 2**IW; i++) begin
      y = (longint'(i) << SHIFT) % M;
      t[i*A +: A] = A'(y >> (k * A));
    end
    return t;
  endfunction

  logic [NB*A-1:0] full;
  for (genvar k = 0; k < NB; k++) begin : g_lf
    lf_block #(.Q(IW), .L(A), .TABLE(group_table(k)), .PIPE(PIPE)) u_lf (
      .clk (clk),
      .x   (v),
      .f   (full[k*A +: A])
    );
  end

  assign r = full[B-1:0];

endmodule
