// tb_dlx_mem: host-port loads, clocked core writes with random byte enables
// and combinational reads checked against a reference array; the host port
// wins a collision.
module tb_dlx_mem;
  import dlx_pkg::*;
  localparam int WORDS = 64;
  logic clk = 0;
  word_t a, dout, din, ld_addr, ld_data;
  logic mw, ld_we;
  logic [3:0] be;
  int checks = 0, failures = 0;
  word_t model [WORDS];

  dlx_mem #(.WORDS(WORDS)) dut (.*);

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
    mw = 0; be = 0; ld_we = 0; a = 0; din = 0; ld_addr = 0; ld_data = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      ld_we = 1; ld_addr = i * 4; ld_data = 32'h1000 + i;
      model[i] = ld_data;
    end
    @(negedge clk);
    ld_we = 0;
    for (int i = 0; i < WORDS; i++) begin
      a = i * 4 + (i % 4); #1;   // low address bits are ignored
      chk(dout, model[i], "read after load");
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      a = $urandom_range(0, WORDS - 1) * 4;
      mw = $urandom_range(0, 1);
      din = $urandom;
      be = 4'($urandom);
      ld_we = ($urandom_range(0, 7) == 0);
      ld_addr = $urandom_range(0, WORDS - 1) * 4;
      ld_data = $urandom;
      #1;
      chk(dout, model[a[7:2]], "read before edge");
      @(posedge clk);
      if (ld_we) model[ld_addr[7:2]] = ld_data;
      else if (mw) begin
        if (be[0]) model[a[7:2]][7:0]   = din[7:0];
        if (be[1]) model[a[7:2]][15:8]  = din[15:8];
        if (be[2]) model[a[7:2]][23:16] = din[23:16];
        if (be[3]) model[a[7:2]][31:24] = din[31:24];
      end
      #1;
      chk(dout, model[a[7:2]], "read after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
