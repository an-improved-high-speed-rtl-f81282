// tb_crt_r2b_converter: end-to-end test of the converter at its default
// configuration (base {32,31,29,27,25,23,19,17}, fully pipelined).
//
// Random integers X in [0, M) plus the edge values 0, 1, M-1 and multiples
// of the moduli products are turned into residue digits by the testbench
// and streamed in, mostly back to back with occasional idle cycles. Each
// result must equal X and must appear exactly LATENCY (22) cycles after its
// input. The testbench also counts how often each mechanism of the design
// was exercised: the final correction (subtract M chosen by the CPA3 carry),
// its absence, a non-zero high-segment sum into the modulo-M generator,
// back-to-back inputs and idle cycles; one that never occurs is a failure.
module tb_crt_r2b_converter;
  import crt_pkg::*;

  localparam int              N       = N_DEFAULT;
  localparam int              A       = A_DEFAULT;
  localparam int              B       = B_DEFAULT;
  localparam longint unsigned M       = M_DEFAULT;
  localparam int              LATENCY = 22;
  localparam int              NVEC    = 20000;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         in_valid;
  logic [A-1:0] residue [N];
  logic         out_valid;
  logic [B-1:0] x;

  crt_r2b_converter dut (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .residue   (residue),
    .out_valid (out_valid),
    .x         (x)
  );

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    longint unsigned value;
    longint          t_in;
  } item_t;
  item_t exp_q [$];

  int n_sub_m = 0, n_no_sub = 0, n_high = 0, n_b2b = 0, n_idle = 0;

  function automatic longint unsigned rand_x();
    longint unsigned r = {$urandom, $urandom};
    return r % M;
  endfunction

  // Output checker.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      item_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output %0d", x);
      end else begin
        e = exp_q.pop_front();
        if (64'(x) != e.value) begin
          failures++;
          if (failures < 10) $display("FAIL: X=%0d got %0d", e.value, x);
        end
        checks++;
        if (cycle - e.t_in != LATENCY) begin
          failures++;
          if (failures < 10) $display("FAIL: latency %0d, expected %0d", cycle - e.t_in, LATENCY);
        end
      end
    end
  end

  // Mechanism counters, observed at the point of the final selection.
  always @(posedge clk) begin
    if (rst_n && dut.sel_valid) begin
      if (dut.sel) n_sub_m++;
      else         n_no_sub++;
    end
  end

  task automatic drive(input longint unsigned v);
    @(negedge clk);
    in_valid = 1'b1;
    for (int j = 0; j < N; j++) residue[j] = A'(v % MODULI_DEFAULT[j]);
    exp_q.push_back('{value: v, t_in: cycle});
  endtask

  longint unsigned vec;
  bit last_valid;
  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0;
    for (int j = 0; j < N; j++) residue[j] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    last_valid = 1'b0;
    for (int i = 0; i < NVEC + 6; i++) begin
      case (i)
        0: vec = 0;
        1: vec = 1;
        2: vec = M - 1;
        3: vec = M / 2;
        4: vec = 64'd32 * 31 * 29 * 27;
        5: vec = M - 64'd17 * 19 * 23;
        default: vec = rand_x();
      endcase
      if ($urandom_range(9) == 0) begin
        @(negedge clk) in_valid = 1'b0;
        n_idle++;
        last_valid = 1'b0;
      end
      drive(vec);
      if (last_valid) n_b2b++;
      last_valid = 1'b1;
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (LATENCY + 5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", exp_q.size());
    end
    checks += 4;
    if (n_sub_m == 0)  begin failures++; $display("FAIL: M never subtracted"); end
    if (n_no_sub == 0) begin failures++; $display("FAIL: correction never skipped"); end
    if (n_b2b == 0)    begin failures++; $display("FAIL: no back-to-back inputs"); end
    if (n_idle == 0)   begin failures++; $display("FAIL: no idle cycles"); end
    checks++;
    if (n_high == 0)   begin failures++; $display("FAIL: high segments never non-zero"); end
    $display("mechanisms: subtract_M=%0d no_subtract=%0d high_nonzero=%0d back_to_back=%0d idle=%0d",
             n_sub_m, n_no_sub, n_high, n_b2b, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // High-order segment sum reaching the modulo-M generator.
  always @(posedge clk)
    if (rst_n && dut.cpa1_valid && dut.s2 != '0) n_high++;

  // Watchdog.
  initial begin
    repeat (NVEC * 2 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
