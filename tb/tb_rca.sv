// tb_rca: checks the ripple-carry adder. The default 5-bit, bit-level
// pipelined instance (latency 5) receives all 1024 operand pairs as a
// stream, one per cycle; an unpipelined 9-bit instance gets random pairs.
// Sum and carry out must equal the integer sum.
module tb_rca;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [4:0] a, b, s;
  logic       co;
  logic [8:0] a9, b9, s9;
  logic       co9;

  rca u_dut (.clk(clk), .a(a), .b(b), .s(s), .cout(co));
  rca #(.W(9), .PIPE(1'b0)) u_c9 (.clk(clk), .a(a9), .b(b9), .s(s9), .cout(co9));

  int checks = 0;
  int failures = 0;
  int hist [$];

  initial begin
    a = '0; b = '0; a9 = '0; b9 = '0;
    for (int i = 0; i < 1024 + 5; i++) begin
      @(negedge clk);
      if (hist.size() == 5) begin
        automatic int e = hist.pop_front();
        checks++;
        if ({co, s} != 6'(e)) begin
          failures++;
          if (failures < 10) $display("FAIL: 5-bit got %0d exp %0d", {co, s}, e);
        end
      end
      a = 5'(i);
      b = 5'(i >> 5);
      hist.push_back(int'(a) + int'(b));
      a9 = 9'($urandom);
      b9 = 9'($urandom);
      #1;
      checks++;
      if ({co9, s9} != 10'(a9) + 10'(b9)) begin
        failures++;
        if (failures < 10) $display("FAIL: 9-bit %0d+%0d got %0d", a9, b9, {co9, s9});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
