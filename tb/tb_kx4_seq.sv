// tb_kx4_seq: feeds the one-multiplier k*x^4 unit a stream of random x,
// compares every y with k*x*x*x*x computed here, and checks the timing: y is
// loaded at the fifth edge after the one that accepts x (seen one clock later
// here, 6), one input accepted every four clocks
// (in_ready low in between) while in_valid stays high.
module tb_kx4_seq;
  localparam int W = 32;
  localparam int N = 40;
  logic clk = 0, rst = 1;
  logic [W-1:0] k, x, y;
  logic in_valid, in_ready, out_valid;
  int checks = 0, failures = 0;

  kx4_seq #(.W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] xs [N];
  int t_in [N];
  int n_in = 0, n_out = 0, cyc = 0, n_blocked = 0;

  initial begin
    k = 32'd3; in_valid = 0; x = '0;
    foreach (xs[i]) xs[i] = (i < 4) ? W'(i) : W'($urandom);
    repeat (2) @(negedge clk);
    rst = 0;
    while (n_out < N) begin
      in_valid = (n_in < N);
      x = (n_in < N) ? xs[n_in] : '0;
      #1;
      if (out_valid) begin
        logic [W-1:0] e;
        e = k * xs[n_out] * xs[n_out] * xs[n_out] * xs[n_out];
        checks++;
        if (y !== e) begin failures++; $display("FAIL y[%0d]=%h expected %h", n_out, y, e); end
        checks++;
        if (cyc - t_in[n_out] != 6) begin
          failures++; $display("FAIL latency of %0d: %0d", n_out, cyc - t_in[n_out]);
        end
        n_out++;
      end
      if (in_valid && in_ready) begin
        if (n_in > 0) begin
          checks++;
          if (cyc - t_in[n_in - 1] != 4) begin
            failures++; $display("FAIL input interval %0d", cyc - t_in[n_in - 1]);
          end
        end
        t_in[n_in] = cyc;
        n_in++;
      end else if (in_valid) n_blocked++;
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (n_blocked < 3 * (N - 1)) begin failures++; $display("FAIL in_ready never held off input"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
