// tb_crt_r2b_bases: runs the converter on two other residue bases to show
// that the structure is generic in the moduli.
//  - {7,5,3,2} (M = 210, A = 3, B = 8), combinational (PIPE = 0): every X
//    in [0, M) is converted and checked at once.
//  - {31,29,27,25,23} (M = 13956975, A = 5, B = 24), pipelined: random X
//    streamed one per cycle; results must come back in order after the
//    latency 20 = 2 + 3 + 5 + 2 + 1 + 1 + 5 + 1 cycles.
module tb_crt_r2b_bases;

  localparam int unsigned MA [4] = '{7, 5, 3, 2};
  localparam int unsigned MB [5] = '{31, 29, 27, 25, 23};
  localparam longint unsigned M_A = 210;
  localparam longint unsigned M_B = 13956975;
  localparam int LAT_B = 20;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic [2:0]  ra [4];
  logic        va_out;
  logic [7:0]  xa;
  logic        va_in;

  logic [4:0]  rb [5];
  logic        vb_in, vb_out;
  logic [23:0] xb;

  crt_r2b_converter #(.N(4), .MODULI(MA), .A(3), .B(8), .PIPE(1'b0)) u_a (
    .clk(clk), .rst_n(rst_n), .in_valid(va_in), .residue(ra), .out_valid(va_out), .x(xa));
  crt_r2b_converter #(.N(5), .MODULI(MB), .A(5), .B(24), .PIPE(1'b1)) u_b (
    .clk(clk), .rst_n(rst_n), .in_valid(vb_in), .residue(rb), .out_valid(vb_out), .x(xb));

  int checks = 0;
  int failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { longint unsigned value; longint t_in; } item_t;
  item_t q [$];
  int n_sel_a = 0, n_nosel_a = 0;

  always @(posedge clk) begin
    if (rst_n && vb_out) begin
      item_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output");
      end else begin
        e = q.pop_front();
        if (64'(xb) != e.value || cycle - e.t_in != LAT_B) begin
          failures++;
          if (failures < 10) $display("FAIL: base B X=%0d got %0d latency %0d", e.value, xb, cycle - e.t_in);
        end
      end
    end
  end

  initial begin
    rst_n = 1'b0;
    va_in = 1'b0;
    vb_in = 1'b0;
    for (int j = 0; j < 4; j++) ra[j] = '0;
    for (int j = 0; j < 5; j++) rb[j] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // Base {7,5,3,2}, combinational, exhaustive.
    for (longint unsigned v = 0; v < M_A; v++) begin
      va_in = 1'b1;
      for (int j = 0; j < 4; j++) ra[j] = 3'(v % MA[j]);
      #1;
      checks++;
      if (64'(xa) != v || !va_out) begin
        failures++;
        if (failures < 10) $display("FAIL: base A X=%0d got %0d", v, xa);
      end
      if (u_a.sel) n_sel_a++; else n_nosel_a++;
    end
    va_in = 1'b0;
    // Base {31,29,27,25,23}, pipelined stream.
    for (int i = 0; i < 3000; i++) begin
      automatic longint unsigned v = (i == 0) ? M_B - 1 : 64'($urandom) % M_B;
      @(negedge clk);
      vb_in = 1'b1;
      for (int j = 0; j < 5; j++) rb[j] = 5'(v % MB[j]);
      q.push_back('{value: v, t_in: cycle});
    end
    @(negedge clk) vb_in = 1'b0;
    repeat (LAT_B + 4) @(posedge clk);
    checks += 3;
    if (q.size() != 0) begin failures++; $display("FAIL: %0d results missing", q.size()); end
    if (n_sel_a == 0)   begin failures++; $display("FAIL: base A never subtracted M"); end
    if (n_nosel_a == 0) begin failures++; $display("FAIL: base A never skipped the subtraction"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
