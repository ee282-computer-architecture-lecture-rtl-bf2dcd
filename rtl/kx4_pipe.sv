// kx4_pipe: computes y = k * x^4 with four multipliers separated by pipeline
// registers.
//
// Stage s (s = 1..4) multiplies the previous product by x; a register after
// each multiplier holds the product, and beside it one register per x copy
// still needed further down (three after stage 1, two after stage 2, one
// after stage 3), so every signal moving forward is latched at every stage.
// Timing: x enters the input register at an edge; y appears four edges later
// with out_valid; a new x may enter every clock (one result per clock, four
// clocks of latency). Arithmetic is modulo 2^W. The structure is from the
// source; valid bits and the width are this design's choices.
module kx4_pipe #(
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

  logic [W-1:0] xr;
  logic [W-1:0] p1, p2, p3;
  logic [W-1:0] x1 [3];   // x copies after stage 1 (for multipliers 2,3,4)
  logic [W-1:0] x2 [2];   // after stage 2 (for multipliers 3,4)
  logic [W-1:0] x3;       // after stage 3 (for multiplier 4)
  logic [4:0]   v;        // valid of input register and stages 1..4

  always_ff @(posedge clk) begin
    if (rst) begin
      xr <= '0; p1 <= '0; p2 <= '0; p3 <= '0; y <= '0; v <= '0;
      x1 <= '{default: '0}; x2 <= '{default: '0}; x3 <= '0;
    end else begin
      v  <= {v[3:0], in_valid};
      xr <= x;
      p1 <= k * xr;
      x1 <= '{xr, xr, xr};
      p2 <= p1 * x1[0];
      x2 <= '{x1[1], x1[2]};
      p3 <= p2 * x2[0];
      x3 <= x2[1];
      y  <= p3 * x3;
    end
  end

  assign out_valid = v[4];

endmodule
