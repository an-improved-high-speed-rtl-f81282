// tb_csa_tree: checks the Wallace tree. The default instance (8 operands of
// 41 bits, pipelined, latency 4) gets a stream of random operand sets below
// M, one per cycle; an unpipelined 5-operand, 12-bit instance gets random
// full-range operands. In both, save + carry must equal the operand sum.
module tb_csa_tree;
  import crt_pkg::*;

  localparam int              N = 8;
  localparam int              W = 41;
  localparam longint unsigned M = M_DEFAULT;
  localparam int              NVEC = 2000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] op [N];
  logic [W-1:0] s, c;
  logic [11:0]  op5 [5];
  logic [11:0]  s5, c5;

  csa_tree u_dut (.clk(clk), .op(op), .s(s), .c(c));
  csa_tree #(.N(5), .W(12), .PIPE(1'b0)) u_small (.clk(clk), .op(op5), .s(s5), .c(c5));

  int checks = 0;
  int failures = 0;
  longint unsigned hist [$];

  initial begin
    for (int j = 0; j < N; j++) op[j] = '0;
    for (int j = 0; j < 5; j++) op5[j] = '0;
    for (int i = 0; i < NVEC + 4; i++) begin
      automatic longint unsigned sum;
      automatic int unsigned     sum5;
      @(negedge clk);
      if (hist.size() == 4) begin
        automatic longint unsigned e = hist.pop_front();
        checks++;
        if (64'(s) + 64'(c) != e) begin
          failures++;
          if (failures < 10) $display("FAIL: 8-operand s+c=%0d exp %0d", 64'(s) + 64'(c), e);
        end
      end
      sum = 0;
      for (int j = 0; j < N; j++) begin
        automatic longint unsigned v = {$urandom, $urandom};
        v = (i == 0) ? M - 1 : v % M;   // first set: all operands at their maximum
        op[j] = W'(v);
        sum += v;
      end
      hist.push_back(sum);
      sum5 = 0;
      for (int j = 0; j < 5; j++) begin
        op5[j] = 12'($urandom);
        sum5 += op5[j];
      end
      #1;
      checks++;
      if (((s5 + c5) & 12'hFFF) != 12'(sum5)) begin
        failures++;
        if (failures < 10) $display("FAIL: 5-operand s+c=%0d exp %0d", 12'(s5 + c5), 12'(sum5));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NVEC + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
