// crt_r2b_converter: residue-to-binary converter based on the Chinese
// Remainder Theorem for a base of N pairwise co-prime moduli of at most A
// bits (default: {32,31,29,27,25,23,19,17}, M = 144259293600, B = 38).
//
// Given the digits x_j = |X|_{m_j} it returns X = | sum_j X_j |_M, where
// X_j = | x_j * N_j |_{m_j} * M_j is the orthogonal projection of x_j.
//   1. LT_1..LT_N   (lt_projection) form the projections, memoryless.
//   2. CSA1         (csa_tree) adds them into a carry-save pair C, S of
//                   W = ceil(log2(N*M)) bits.
//   3. Both vectors are split at bit B-2: the low parts C_L, S_L (B-2 bits
//      each) add up to less than 2^(B-1) < M.
//   4. CPA1         (rca) adds the high parts C_H + S_H into IW = W-B+2 bits
//                   (IW = l_CPA + 1 = 5 for the default base).
//   5. LT_{N+1}     (lt_modm) maps that sum, weighted by 2^(B-2), to its
//                   residue modulo M, S3 < M.
//   6. CSA2         (csa_3to2) forms S4 + C4 = S3 + C_L + S_L < 2M.
//   7. CSA3         (csa_add_const) adds 2^B - M.
//   8. CPA3         (cpa_prefix, B+1 bits) gives S6 = S4 + C4 + 2^B - M and
//      CPA2         (cpa_prefix, B bits) gives S7 = S4 + C4 in parallel.
//                   Bit B of S6 (the carry of the subtraction) is set exactly
//                   when S4 + C4 >= M.
//   9. MUX1         (mux2) returns the low B bits of S6 if that bit is set,
//                   else S7.
//
// Interface: in_valid/residue in, out_valid/x out; no back-pressure.
// With PIPE = 1 (default) registers sit after every full-adder-deep step:
// inside each look-up block, after every Wallace layer, after every bit of
// CPA1, after CSA2, CSA3, every prefix level of CPA2/CPA3 and the
// multiplexer. The converter then accepts one residue word per cycle and
// its latency is LATENCY cycles (22 for the default base). Signals that
// bypass a block (C_L, S_L, CPA2's result) are delayed to stay aligned.
// With PIPE = 0 the datapath is combinational and out_valid equals
// in_valid. rst_n (synchronous, active low) clears only the valid pipeline.
//
// A and B are derived quantities (A = ceil(log2 max m), B = ceil(log2 M))
// given as parameters because the port widths depend on them; elaboration
// stops with an error if they do not match MODULI.
//
// The algorithm, the block structure, the split at bit B-2 and the default
// base follow the published converter. The register placement, the valid
// flag, the alignment delays, the B+1-bit final stages and the choice of
// adder architectures are this design's own.
module crt_r2b_converter
  import crt_pkg::*;
#(
  parameter int          N            = N_DEFAULT,
  parameter int unsigned MODULI [N]   = MODULI_DEFAULT,
  parameter int          A            = A_DEFAULT,
  parameter int          B            = B_DEFAULT,
  parameter bit          PIPE         = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [A-1:0] residue [N],   // residue[j] = |X| mod MODULI[j]
  output logic         out_valid,
  output logic [B-1:0] x
);

  function automatic longint unsigned range_m();
    longint unsigned p = 1;
    for (int j = 0; j < N; j++) p = p * MODULI[j];
    return p;
  endfunction

  function automatic int max_width();
    int w = 0;
    for (int j = 0; j < N; j++) if ($clog2(MODULI[j]) > w) w = $clog2(MODULI[j]);
    return w;
  endfunction

  localparam longint unsigned M   = range_m();
  localparam int              W   = $clog2(longint'(N) * M);     // Wallace tree width
  localparam int              IW  = W - (B - 2);                 // CPA1 width, l_CPA + 1
  localparam logic [B:0]      KSUB = (B+1)'((64'd1 << B) - M);   // 2^B - M

  if (B != $clog2(M) || A != max_width()) begin : g_bad_width
    $error("crt_r2b_converter: A must be ceil(log2 max m) and B ceil(log2 M)");
  end

  localparam int LAT_LT   = lf_latency(PIPE);
  localparam int LAT_CSA1 = csa_tree_latency(N, PIPE);
  localparam int LAT_CPA1 = rca_latency(IW, PIPE);
  localparam int LAT_CSA  = csa_latency(PIPE);
  localparam int LAT_CPA3 = cpa_latency(B + 1, PIPE);
  localparam int LAT_CPA2 = cpa_latency(B, PIPE);
  localparam int LAT_MUX  = PIPE ? 1 : 0;
  localparam int LAT_SEL  = LAT_LT + LAT_CSA1 + LAT_CPA1 + LAT_LT + 2 * LAT_CSA + LAT_CPA3;
  localparam int LATENCY  = LAT_SEL + LAT_MUX;

  // ---- Step 1: orthogonal projections -------------------------------------
  logic [W-1:0] proj [N];
  for (genvar j = 0; j < N; j++) begin : g_lt
    logic [B-1:0] xp;
    lt_projection #(.MOD(MODULI[j]), .M(M), .A(A), .B(B), .PIPE(PIPE)) u_lt (
      .clk (clk),
      .x   (residue[j]),
      .xp  (xp)
    );
    assign proj[j] = W'(xp);
  end

  // ---- Step 2: Wallace tree -------------------------------------------------
  logic [W-1:0] s1, c1;
  csa_tree #(.N(N), .W(W), .PIPE(PIPE)) u_csa1 (
    .clk (clk),
    .op  (proj),
    .s   (s1),
    .c   (c1)
  );

  // ---- Step 3: partition ----------------------------------------------------
  logic [IW-1:0]  s_h, c_h;
  logic [B-3:0]   s_l, c_l;
  assign s_h = s1[W-1:B-2];
  assign c_h = c1[W-1:B-2];
  assign s_l = s1[B-3:0];
  assign c_l = c1[B-3:0];

  // ---- Step 4: CPA1 on the high segments -------------------------------------
  logic [IW-1:0] s2;
  logic          s2_cout;   // always 0: C_H + S_H < 2^IW because C + S < 2^W (asserted)
  rca #(.W(IW), .PIPE(PIPE)) u_cpa1 (
    .clk  (clk),
    .a    (c_h),
    .b    (s_h),
    .s    (s2),
    .cout (s2_cout)
  );

  // ---- Step 5: modulo-M generator --------------------------------------------
  logic [B-1:0] s3;
  lt_modm #(.M(M), .B(B), .IW(IW), .SHIFT(B - 2), .A(A), .PIPE(PIPE)) u_lt_modm (
    .clk (clk),
    .v   (s2),
    .r   (s3)
  );

  // Low segments wait for CPA1 and LT_{N+1}.
  logic [B-3:0] s_l_d, c_l_d;
  delay_line #(.W(2 * (B - 2)), .D(LAT_CPA1 + LAT_LT)) u_dly_low (
    .clk   (clk),
    .rst_n (1'b1),
    .d     ({c_l, s_l}),
    .q     ({c_l_d, s_l_d})
  );

  // ---- Step 6: CSA2 --------------------------------------------------------
  logic [B:0] s4, c4;
  csa_3to2 #(.W(B + 1), .PIPE(PIPE)) u_csa2 (
    .clk (clk),
    .a   ((B+1)'(s3)),
    .b   ((B+1)'(c_l_d)),
    .d   ((B+1)'(s_l_d)),
    .s   (s4),
    .c   (c4)
  );

  // ---- Step 7: CSA3, add 2^B - M ---------------------------------------------
  logic [B:0] s5, c5;
  csa_add_const #(.W(B + 1), .K(KSUB), .PIPE(PIPE)) u_csa3 (
    .clk (clk),
    .a   (s4),
    .b   (c4),
    .s   (s5),
    .c   (c5)
  );

  // ---- Step 8: CPA3 and CPA2 -------------------------------------------------
  logic [B:0] s6;
  logic       s6_cout;   // carry out of bit B: unused, S6 < 2^(B+1)
  cpa_prefix #(.W(B + 1), .PIPE(PIPE)) u_cpa3 (
    .clk  (clk),
    .a    (s5),
    .b    (c5),
    .s    (s6),
    .cout (s6_cout)
  );

  logic [B-1:0] s7, s7_d;
  logic         s7_cout;   // unused: S7 is only chosen when S4 + C4 < M < 2^B
  cpa_prefix #(.W(B), .PIPE(PIPE)) u_cpa2 (
    .clk  (clk),
    .a    (s4[B-1:0]),
    .b    (c4[B-1:0]),
    .s    (s7),
    .cout (s7_cout)
  );
  delay_line #(.W(B), .D(LAT_CSA + LAT_CPA3 - LAT_CPA2)) u_dly_cpa2 (
    .clk   (clk),
    .rst_n (1'b1),
    .d     (s7),
    .q     (s7_d)
  );

  // ---- Step 9: MUX1 ---------------------------------------------------------
  logic sel;
  assign sel = s6[B];
  mux2 #(.W(B), .PIPE(PIPE)) u_mux1 (
    .clk (clk),
    .sel (sel),
    .d0  (s7_d),
    .d1  (s6[B-1:0]),
    .y   (x)
  );

  // ---- Valid pipeline --------------------------------------------------------
  // CPA1 must never carry out of its IW bits (C_H + S_H < 2^IW).
  logic cpa1_valid;   // in step with CPA1's result
  delay_line #(.W(1), .D(LAT_LT + LAT_CSA1 + LAT_CPA1)) u_dly_valid_cpa1 (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (in_valid),
    .q     (cpa1_valid)
  );
  always_ff @(posedge clk)
    if (rst_n && cpa1_valid)
      assert (!s2_cout) else $error("crt_r2b_converter: CPA1 carried out of %0d bits", IW);

  logic sel_valid;   // in step with sel
  delay_line #(.W(1), .D(LAT_SEL)) u_dly_valid_sel (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (in_valid),
    .q     (sel_valid)
  );
  delay_line #(.W(1), .D(LAT_MUX)) u_dly_valid_out (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (sel_valid),
    .q     (out_valid)
  );

endmodule
