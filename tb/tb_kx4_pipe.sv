// tb_kx4_pipe: streams random x into the pipelined multipliers, one per
// clock, and checks each y against k*x^4 computed here, arriving four
// clocks after x enters the input register, with a new result every clock.
module tb_kx4_pipe;
  localparam int W = 32;
  localparam int N = 100;
  logic clk = 0, rst = 1;
  logic [W-1:0] k, x, y;
  logic in_valid, out_valid;
  int checks = 0, failures = 0;

  kx4_pipe #(.W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] xs [N];
  int t_in [N];
  int n_out = 0, cyc = 0;

  initial begin
    k = 32'h0001_0003; in_valid = 0; x = '0;
    foreach (xs[i]) xs[i] = W'($urandom);
    repeat (2) @(negedge clk);
    rst = 0;
    while (n_out < N && cyc < 10 * N) begin
      in_valid = (cyc < N);
      x = (cyc < N) ? xs[cyc] : '0;
      if (cyc < N) t_in[cyc] = cyc;
      #1;
      if (out_valid) begin
        logic [W-1:0] e;
        e = k * xs[n_out] * xs[n_out] * xs[n_out] * xs[n_out];
        checks++;
        if (y !== e || cyc - t_in[n_out] != 5) begin
          failures++; $display("FAIL y[%0d]=%h expected %h at clock %0d", n_out, y, e, cyc);
        end
        n_out++;
      end
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (n_out != N) begin failures++; $display("FAIL %0d results", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
