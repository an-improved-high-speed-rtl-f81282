// delay_line: D-cycle delay of a W-bit signal, used to keep signals that
// bypass a pipelined block in step with it and to carry the valid flag
// along the converter. D = 0 is a plain connection. All stages are cleared
// by the synchronous active-low rst_n (tie it high for data paths).
module delay_line #(
  parameter int W = 1,
  parameter int D = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (D == 0) begin : g_wire
    assign q = d;
  end else begin : g_reg
    logic [W-1:0] sr [D];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < D; i++) sr[i] <= '0;
      end else begin
        sr[0] <= d;
        for (int i = 1; i < D; i++) sr[i] <= sr[i-1];
      end
    end
    assign q = sr[D-1];
  end

endmodule
