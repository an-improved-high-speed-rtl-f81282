// tb_lt_modm: checks the modulo-M generator at its defaults (5-bit input of
// weight 2^36, M of the default base, pipelined, latency 2) for every input
// value. The expected value is found by repeated subtraction of M.
module tb_lt_modm;
  import crt_pkg::*;

  localparam int              B = B_DEFAULT;
  localparam longint unsigned M = M_DEFAULT;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [4:0]   v;
  logic [B-1:0] r;

  lt_modm u_dut (.clk(clk), .v(v), .r(r));

  function automatic longint unsigned ref_mod(input longint unsigned y);
    while (y >= M) y -= M;
    return y;
  endfunction

  int checks = 0;
  int failures = 0;
  logic [4:0] hist [$];

  initial begin
    v = '0;
    for (int i = 0; i < 32 + 2; i++) begin
      @(negedge clk);
      if (hist.size() == 2) begin
        automatic logic [4:0]      o = hist.pop_front();
        automatic longint unsigned e = ref_mod(64'(o) << (B - 2));
        checks++;
        if (64'(r) != e) begin
          failures++;
          $display("FAIL: v=%0d got %0d exp %0d", o, r, e);
        end
      end
      v = 5'(i);
      hist.push_back(v);
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
