// tb_csa_add_const: checks the constant carry-save adder at its default
// (39 bits, K = 2^38 - M of the default base, registered, latency 1) and an
// unpipelined 10-bit instance with K = 0x2B5. Save + carry must equal
// a + b + K modulo 2^W.
module tb_csa_add_const;
  import crt_pkg::*;

  localparam int W = 39;
  localparam longint unsigned MASK = (64'd1 << W) - 1;
  localparam longint unsigned K    = (64'd1 << 38) - M_DEFAULT;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] a, b, s, c;
  logic [9:0]   a10, b10, s10, c10;
  csa_add_const u_dut (.clk(clk), .a(a), .b(b), .s(s), .c(c));
  csa_add_const #(.W(10), .K(10'h2B5), .PIPE(1'b0)) u_c10 (.clk(clk), .a(a10), .b(b10), .s(s10), .c(c10));

  int checks = 0;
  int failures = 0;
  longint unsigned hist [$];

  initial begin
    a = '0; b = '0; a10 = '0; b10 = '0;
    for (int i = 0; i < 3001; i++) begin
      @(negedge clk);
      if (hist.size() == 1) begin
        automatic longint unsigned e = hist.pop_front();
        checks++;
        if (((64'(s) + 64'(c)) & MASK) != e) begin
          failures++;
          if (failures < 10) $display("FAIL: s+c=%0d exp %0d", (64'(s) + 64'(c)) & MASK, e);
        end
      end
      a = W'({$urandom, $urandom});
      b = (i % 4 == 0) ? '0 : W'({$urandom, $urandom});
      hist.push_back((64'(a) + 64'(b) + K) & MASK);
      a10 = 10'($urandom);
      b10 = 10'($urandom);
      #1;
      checks++;
      if (10'(s10 + c10) != 10'(a10 + b10 + 10'h2B5)) begin
        failures++;
        if (failures < 10) $display("FAIL: 10-bit s+c=%0d", 10'(s10 + c10));
      end
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
