// tb_mux2: checks the result multiplexer, registered (default, latency 1)
// and unpipelined, with random data and both select values.
module tb_mux2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        sel;
  logic [37:0] d0, d1, y, yc;

  mux2 u_dut (.clk(clk), .sel(sel), .d0(d0), .d1(d1), .y(y));
  mux2 #(.PIPE(1'b0)) u_c (.clk(clk), .sel(sel), .d0(d0), .d1(d1), .y(yc));

  int checks = 0;
  int failures = 0;
  logic [37:0] hist [$];

  initial begin
    sel = 1'b0; d0 = '0; d1 = '0;
    for (int i = 0; i < 501; i++) begin
      @(negedge clk);
      if (hist.size() == 1) begin
        automatic logic [37:0] e = hist.pop_front();
        checks++;
        if (y != e) begin
          failures++;
          if (failures < 10) $display("FAIL: registered y=%h exp %h", y, e);
        end
      end
      sel = 1'($urandom);
      d0 = 38'({$urandom, $urandom});
      d1 = 38'({$urandom, $urandom});
      hist.push_back(sel ? d1 : d0);
      #1;
      checks++;
      if (yc != (sel ? d1 : d0)) begin
        failures++;
        if (failures < 10) $display("FAIL: combinational y=%h", yc);
      end
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
