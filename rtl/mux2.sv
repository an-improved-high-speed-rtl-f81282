// mux2: W-bit 2:1 result multiplexer (MUX1). y = sel ? d1 : d0.
// In the converter sel is the carry of CPA3: it picks the sum with M
// subtracted (d1) when that sum did not go negative, otherwise the plain
// sum (d0).
//
// Timing: with PIPE = 1 the output is registered (latency 1 cycle), so the
// converter's result leaves from a register; with PIPE = 0 it is
// combinational. Selection by the CPA3 carry follows the method; the
// output register is this design's choice.
module mux2 #(
  parameter int W    = 38,
  parameter bit PIPE = 1'b1
) (
  input  logic         clk,
  input  logic         sel,
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  output logic [W-1:0] y
);

  logic [W-1:0] y_n;
  assign y_n = sel ? d1 : d0;

  if (PIPE) begin : g_reg
    always_ff @(posedge clk) y <= y_n;
  end else begin : g_wire
    assign y = y_n;
  end

endmodule
