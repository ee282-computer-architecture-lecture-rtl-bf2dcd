// tb_dlx_regfile: random writes and reads against a reference array; checks
// that R0 stays 0 and that a write shows only after the clock edge.
module tb_dlx_regfile;
  import dlx_pkg::*;
  logic clk = 0, rst = 1;
  reg_idx_t ra1, ra2, wa;
  word_t rd1, rd2, wd;
  logic rw;
  int checks = 0, failures = 0;
  word_t model [32];

  dlx_regfile dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input word_t got, input word_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    rw = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    for (int i = 0; i < 32; i++) begin
      ra1 = i[4:0]; ra2 = 5'(31 - i); #1;
      chk(rd1, 0, "reset value port 1");
      chk(rd2, 0, "reset value port 2");
    end
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      rw = ($urandom_range(0, 3) != 0);
      wa = 5'($urandom);
      wd = $urandom;
      ra1 = (n % 4 == 0) ? wa : 5'($urandom);
      ra2 = 5'($urandom);
      #1;
      // before the edge the old value is read even when writing the same register
      chk(rd1, model[ra1], "port 1 read");
      chk(rd2, model[ra2], "port 2 read");
      @(posedge clk);
      if (rw && wa != 0) model[wa] = wd;
    end
    @(negedge clk);
    rw = 1; wa = 0; wd = 32'hdeadbeef;
    @(negedge clk);
    rw = 0; ra1 = 0; #1;
    chk(rd1, 0, "R0 ignores writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
