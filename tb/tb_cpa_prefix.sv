// tb_cpa_prefix: checks the parallel-prefix adder. The default instance
// (38 bits, pipelined, latency 6 = ceil(log2 38)) and a 39-bit one
// (latency 6) receive streams of random operands plus carry-chain extremes
// (all ones + 1, all ones + all ones); an unpipelined 7-bit instance is
// checked exhaustively. Sum and carry out must equal the integer sum.
module tb_cpa_prefix;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [37:0] a, b, s;
  logic        co;
  logic [38:0] a39, b39, s39;
  logic        co39;
  logic [6:0]  a7, b7, s7;
  logic        co7;

  cpa_prefix u_dut (.clk(clk), .a(a), .b(b), .s(s), .cout(co));
  cpa_prefix #(.W(39)) u_39 (.clk(clk), .a(a39), .b(b39), .s(s39), .cout(co39));
  cpa_prefix #(.W(7), .PIPE(1'b0)) u_7 (.clk(clk), .a(a7), .b(b7), .s(s7), .cout(co7));

  int checks = 0;
  int failures = 0;
  typedef struct { longint unsigned e38; longint unsigned e39; } exp_t;
  exp_t hist [$];

  initial begin
    a = '0; b = '0; a39 = '0; b39 = '0; a7 = '0; b7 = '0;
    for (int i = 0; i < 16384 + 6; i++) begin
      @(negedge clk);
      if (hist.size() == 6) begin
        automatic exp_t e = hist.pop_front();
        checks += 2;
        if (64'({co, s}) != e.e38) begin
          failures++;
          if (failures < 10) $display("FAIL: 38-bit got %0d exp %0d", {co, s}, e.e38);
        end
        if (64'({co39, s39}) != e.e39) begin
          failures++;
          if (failures < 10) $display("FAIL: 39-bit got %0d exp %0d", {co39, s39}, e.e39);
        end
      end
      case (i % 8)
        0: begin a = '1; b = 38'd1; a39 = '1; b39 = 39'd1; end
        1: begin a = '1; b = '1;    a39 = '1; b39 = '1;    end
        default: begin
          a = 38'({$urandom, $urandom});  b = 38'({$urandom, $urandom});
          a39 = 39'({$urandom, $urandom}); b39 = 39'({$urandom, $urandom});
        end
      endcase
      hist.push_back('{e38: 64'(a) + 64'(b), e39: 64'(a39) + 64'(b39)});
      a7 = 7'(i);
      b7 = 7'(i >> 7);
      #1;
      checks++;
      if ({co7, s7} != 8'(a7) + 8'(b7)) begin
        failures++;
        if (failures < 10) $display("FAIL: 7-bit %0d+%0d got %0d", a7, b7, {co7, s7});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
