// kx4_seq: computes y = k * x^4 with a single multiplier under a small
// control FSM.
//
// An input register holds x; the multiplier's other operand is k in the
// first step and the product register P afterwards, so four multiply steps
// give k*x, k*x^2, k*x^3, k*x^4. The output register then takes P. Timing:
// x is accepted at a rising edge when in_valid and in_ready are high; the
// four products follow on the next four edges and y with out_valid on the
// fifth. A new x can be accepted during the fourth step, so results come
// once every 4 clocks. Arithmetic is modulo 2^W.
//
// The one-multiplier organisation, the four clocks and the one result per
// four clocks are from the source; the handshake, the k select and the width
// are this design's choices.
module kx4_seq #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] k,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] x,
  output logic         out_valid,
  output logic [W-1:0] y
);

  logic [W-1:0] xr, p, prod;
  logic [1:0]   step;
  logic         busy, pdone;

  assign prod     = ((busy && step == 2'd0) ? k : p) * xr;
  assign in_ready = !busy || (step == 2'd3);

  always_ff @(posedge clk) begin
    if (rst) begin
      xr <= '0; p <= '0; y <= '0;
      step <= '0; busy <= 1'b0; pdone <= 1'b0; out_valid <= 1'b0;
    end else begin
      pdone     <= busy && (step == 2'd3);
      out_valid <= pdone;
      if (pdone) y <= p;
      if (busy) begin
        p    <= prod;
        step <= step + 2'd1;
      end
      if (in_valid && in_ready) begin
        xr   <= x;
        busy <= 1'b1;
        step <= 2'd0;
      end else if (busy && step == 2'd3) begin
        busy <= 1'b0;
      end
    end
  end

endmodule
