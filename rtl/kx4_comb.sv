// kx4_comb: computes y = k * x^4 with four multipliers in a chain and no
// registers between them.
//
// Registers only at the input (x, with a valid bit) and output (y). One
// result per clock with one clock of latency, at the price of a clock period
// long enough for four multiplications in series. Arithmetic is modulo 2^W.
// The four-multiplier chain is from the source; the valid bits and the width
// are this design's choices.
module kx4_comb #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] k,
  input  logic         in_valid,
  input  logic [W-1:0] x,
  output logic         out_valid,
  output logic [W-1:0] y
);

  logic [W-1:0] xr, m1, m2, m3, m4;
  logic         vr;

  assign m1 = k * xr;
  assign m2 = m1 * xr;
  assign m3 = m2 * xr;
  assign m4 = m3 * xr;

  always_ff @(posedge clk) begin
    if (rst) begin
      xr <= '0; vr <= 1'b0; y <= '0; out_valid <= 1'b0;
    end else begin
      vr <= in_valid;
      if (in_valid) xr <= x;
      out_valid <= vr;
      if (vr) y <= m4;
    end
  end

endmodule
