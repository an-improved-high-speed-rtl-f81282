// tb_lf_block: checks the logic-function block against its truth table.
// Three instances: Q=5/L=5 pipelined (latency 2), the same table
// unpipelined, and Q=3/L=2 pipelined. Every input value is applied, in a
// stream of one per cycle for the pipelined ones, and each output is
// compared with the table entry the testbench generated.
module tb_lf_block;

  localparam int Q = 5;
  localparam int L = 5;

  // Pseudo-random truth table (linear congruential sequence).
  function automatic logic [(2**Q)*L-1:0] make_table(input int seed);
    logic [(2**Q)*L-1:0] t;
    int unsigned s = seed;
    for (int i = 0; i < (2**Q)*L; i++) begin
      s = s * 1103515245 + 12345;
      t[i] = s[16];
    end
    return t;
  endfunction

  localparam logic [(2**Q)*L-1:0] T5 = make_table(7);
  localparam logic [(2**3)*2-1:0] T3 = 16'hA5C3;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [Q-1:0] x5;
  logic [2:0]   x3;
  logic [L-1:0] f5p, f5c;
  logic [1:0]   f3p;

  lf_block #(.Q(Q), .L(L), .TABLE(T5), .PIPE(1'b1)) u_p5 (.clk(clk), .x(x5), .f(f5p));
  lf_block #(.Q(Q), .L(L), .TABLE(T5), .PIPE(1'b0)) u_c5 (.clk(clk), .x(x5), .f(f5c));
  lf_block #(.Q(3), .L(2), .TABLE(T3), .PIPE(1'b1)) u_p3 (.clk(clk), .x(x3), .f(f3p));

  int checks = 0;
  int failures = 0;

  logic [Q-1:0] hist5 [$];
  logic [2:0]   hist3 [$];

  initial begin
    x5 = '0;
    x3 = '0;
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < 2**Q; i++) begin
        @(negedge clk);
        // Pipelined outputs belong to the input applied two cycles ago.
        if (hist5.size() == 2) begin
          automatic logic [Q-1:0] o5 = hist5.pop_front();
          automatic logic [2:0]   o3 = hist3.pop_front();
          checks += 2;
          if (f5p !== T5[o5*L +: L]) begin
            failures++;
            $display("FAIL: Q=5 pipelined x=%0d f=%b exp=%b", o5, f5p, T5[o5*L +: L]);
          end
          if (f3p !== T3[o3*2 +: 2]) begin
            failures++;
            $display("FAIL: Q=3 pipelined x=%0d f=%b exp=%b", o3, f3p, T3[o3*2 +: 2]);
          end
        end
        x5 = (r == 1) ? Q'($urandom) : Q'(i);
        x3 = 3'(i + r);
        hist5.push_back(x5);
        hist3.push_back(x3);
        #1;
        checks++;
        if (f5c !== T5[x5*L +: L]) begin
          failures++;
          $display("FAIL: Q=5 combinational x=%0d f=%b exp=%b", x5, f5c, T5[x5*L +: L]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
