// tb_csa_3to2: checks the 3:2 carry-save layer at its default width
// (39 bits, registered, latency 1) with random operands. The save vector
// must be the bitwise XOR of the inputs and save + carry must equal the
// sum of the three operands modulo 2^39.
module tb_csa_3to2;

  localparam int W = 39;
  localparam longint unsigned MASK = (64'd1 << W) - 1;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] a, b, d, s, c;
  csa_3to2 u_dut (.clk(clk), .a(a), .b(b), .d(d), .s(s), .c(c));

  int checks = 0;
  int failures = 0;
  typedef struct { longint unsigned sum; logic [W-1:0] x; } exp_t;
  exp_t hist [$];

  initial begin
    a = '0; b = '0; d = '0;
    for (int i = 0; i < 3001; i++) begin
      @(negedge clk);
      if (hist.size() == 1) begin
        automatic exp_t e = hist.pop_front();
        checks += 2;
        if (((64'(s) + 64'(c)) & MASK) != e.sum) begin
          failures++;
          if (failures < 10) $display("FAIL: s+c=%0d exp %0d", (64'(s) + 64'(c)) & MASK, e.sum);
        end
        if (s != e.x) begin
          failures++;
          if (failures < 10) $display("FAIL: save vector %h exp %h", s, e.x);
        end
      end
      a = W'({$urandom, $urandom});
      b = W'({$urandom, $urandom});
      d = (i % 3 == 0) ? '1 : W'({$urandom, $urandom});
      hist.push_back('{sum: (64'(a) + 64'(b) + 64'(d)) & MASK, x: a ^ b ^ d});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
