// tb_lt_projection: checks the orthogonal-projection tables. The default
// instance (m = 32, pipelined, latency 2) and unpipelined instances for
// m = 27 and m = 17 of the default base receive every residue value. The
// expected projection is found without a modular inverse: it is the
// multiple t*M_j (0 <= t < m) that leaves remainder x modulo m.
module tb_lt_projection;
  import crt_pkg::*;

  localparam int              A = A_DEFAULT;
  localparam int              B = B_DEFAULT;
  localparam longint unsigned M = M_DEFAULT;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [A-1:0] x;
  logic [B-1:0] p32, p27, p17;

  lt_projection u_m32 (.clk(clk), .x(x), .xp(p32));
  lt_projection #(.MOD(27), .PIPE(1'b0)) u_m27 (.clk(clk), .x(x), .xp(p27));
  lt_projection #(.MOD(17), .PIPE(1'b0)) u_m17 (.clk(clk), .x(x), .xp(p17));

  function automatic longint unsigned ref_proj(input longint unsigned m, input longint unsigned r);
    longint unsigned mj = M / m;
    for (longint unsigned t = 0; t < m; t++)
      if ((t * mj) % m == r) return t * mj;
    return 64'hFFFF_FFFF_FFFF_FFFF;
  endfunction

  int checks = 0;
  int failures = 0;
  logic [A-1:0] hist [$];

  task automatic check(input string name, input longint unsigned m, input logic [A-1:0] xv,
                       input logic [B-1:0] got);
    longint unsigned e = ref_proj(m, 64'(xv));
    checks++;
    if (64'(got) != e) begin
      failures++;
      $display("FAIL: %s x=%0d got %0d exp %0d", name, xv, got, e);
    end
  endtask

  initial begin
    x = '0;
    for (int i = 0; i < 32 + 2; i++) begin
      @(negedge clk);
      if (hist.size() == 2) check("m=32", 32, hist.pop_front(), p32);
      x = A'(i);
      hist.push_back(x);
      #1;
      if (i < 27) check("m=27", 27, x, p27);
      if (i < 17) check("m=17", 17, x, p17);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
