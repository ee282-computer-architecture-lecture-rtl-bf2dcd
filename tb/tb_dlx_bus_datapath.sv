// tb_dlx_bus_datapath: drives the datapath's control points directly, step by
// step, through register-load, ADD, SW, LW and J sequences, with a memory
// modelled here, and checks the bus, IP, Z, the memory port and the register
// file contents after each sequence.
// A second phase applies random control words (at most one bus driver) for
// many clocks and compares the bus, the memory port, Z, the IR fields and IP
// in every clock with a register-level model of the datapath kept here; the
// register file is compared at the end.
module tb_dlx_bus_datapath;
  import dlx_pkg::*;
  logic clk = 0, rst = 1;
  ctrl_t ctrl;
  word_t mem_a, mem_di, mem_do, ip_o, bus_o;
  logic mem_w, z;
  logic [5:0] opcode;
  logic [10:0] func;
  int checks = 0, failures = 0;
  word_t tmem [64];

  dlx_bus_datapath dut (.*);

  assign mem_do = tmem[mem_a[7:2]];
  always_ff @(posedge clk) if (mem_w) tmem[mem_a[7:2]] <= mem_di;

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
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

  function automatic ctrl_t c_f1();
    ctrl_t c = '0; c.eip = 1; c.lir = 1; c.la = 1; c.as = 1; return c;
  endfunction
  function automatic ctrl_t c_d1();
    ctrl_t c = '0; c.ea = 1; c.lip = 1; c.af = ALU_INC4; c.la = 1; c.lb = 1; return c;
  endfunction
  function automatic ctrl_t c_alu(alu_op_e f, logic rw, logic la, logic lip);
    ctrl_t c = '0; c.ea = 1; c.af = f; c.rw = rw; c.la = la; c.as = la; c.lip = lip; return c;
  endfunction
  function automatic ctrl_t c_const(logic c26, logic rw);
    ctrl_t c = '0; c.ei = 1; c.ei26 = c26; c.rw = rw; c.lb = !rw; c.bs = !rw; return c;
  endfunction

  // ---------------------------------------------------------------- model
  localparam int NRAND = 4000;    // random clocks
  word_t m_ip, m_ir, m_a, m_b;
  word_t m_rf [32];

  function automatic word_t m_alu(input alu_op_e f, input word_t x, input word_t y);
    case (f)
      ALU_ADD:  return x + y;
      ALU_SUB:  return x - y;
      ALU_AND:  return x & y;
      ALU_OR:   return x | y;
      ALU_XOR:  return x ^ y;
      ALU_INC4: return x + 4;
      default:  return x + y;
    endcase
  endfunction

  task automatic random_run();
    ctrl_t c;
    word_t m_bus, m_memd, m_addr;
    alu_op_e fs [6] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_INC4};
    int wa;
    // memory words: a quarter of them R-type, so both RD positions are used
    foreach (tmem[i]) begin
      tmem[i] = word_t'($urandom);
      if ($urandom_range(0, 3) == 0) tmem[i][31:26] = OP_SPECIAL;
    end
    @(negedge clk);
    rst = 1; ctrl = '0;
    @(negedge clk);
    rst = 0;
    m_ip = '0; m_ir = '0; m_a = '0; m_b = '0;
    foreach (m_rf[i]) m_rf[i] = '0;
    repeat (NRAND) begin
      c = '0;
      case ($urandom_range(0, 4))
        0: c.eip = 1;
        1: c.em  = 1;
        2: begin c.ei = 1; c.ei26 = 1'($urandom); end
        3: c.ea  = 1;
        default: ;
      endcase
      c.af  = fs[$urandom_range(0, 5)];
      c.mas = 1'($urandom);
      c.mw  = ($urandom_range(0, 7) == 0);
      c.lip = ($urandom_range(0, 3) == 0);
      c.lir = ($urandom_range(0, 3) == 0);
      c.rw  = 1'($urandom);
      c.la  = 1'($urandom); c.as = 1'($urandom);
      c.lb  = 1'($urandom); c.bs = 1'($urandom);
      @(negedge clk);
      ctrl = c;
      // model, before the clock edge
      m_addr = c.mas ? m_a : m_ip;
      m_memd = tmem[m_addr[7:2]];
      if (c.eip)     m_bus = m_ip;
      else if (c.em) m_bus = m_memd;
      else if (c.ei) m_bus = c.ei26 ? {{6{m_ir[25]}}, m_ir[25:0]} : {{16{m_ir[15]}}, m_ir[15:0]};
      else if (c.ea) m_bus = m_alu(c.af, m_a, m_b);
      else           m_bus = '0;
      #1;
      chk(bus_o, m_bus, "random: bus");
      chk(mem_a, m_addr, "random: memory address");
      chk(mem_di, m_b, "random: memory write data");
      chk(ip_o, m_ip, "random: IP");
      chk({26'b0, opcode}, {26'b0, m_ir[31:26]}, "random: opcode");
      chk({21'b0, func}, {21'b0, m_ir[10:0]}, "random: func");
      chk({31'b0, z}, {31'b0, m_a == 0}, "random: Z");
      @(posedge clk);
      // model, at the clock edge (register reads use the old IR)
      wa = (m_ir[31:26] == OP_SPECIAL) ? m_ir[15:11] : m_ir[20:16];
      if (c.la)  m_a = c.as ? m_bus : m_rf[m_ir[25:21]];
      if (c.lb)  m_b = c.bs ? m_bus : m_rf[m_ir[20:16]];
      if (c.lip) m_ip = m_bus;
      if (c.lir) m_ir = m_memd;
      if (c.rw && wa != 0) m_rf[wa] = m_bus;
    end
    @(negedge clk);
    ctrl = '0;
    for (int r = 1; r < 32; r++) chk(dut.u_rf.regs[r], m_rf[r], $sformatf("random: R%0d", r));
  endtask

  // apply one control word for one clock; return the bus value seen
  task automatic step(input ctrl_t c, output word_t seen);
    @(negedge clk);
    ctrl = c;
    #1 seen = bus_o;
    @(posedge clk);
    #1;
  endtask

  initial begin
    word_t seen;
    ctrl_t c;
    ctrl = '0;
    foreach (tmem[i]) tmem[i] = '0;
    tmem[0] = enc_i(OP_LW, 5'd1, 5'd0, 16'd7);        // used as "R1 <- 7"
    tmem[1] = enc_i(OP_LW, 5'd2, 5'd0, 16'd3);        // used as "R2 <- 3"
    tmem[2] = enc_r(FN_ADD, 5'd3, 5'd1, 5'd2);        // ADD R3, R1, R2
    tmem[3] = enc_i(OP_SW, 5'd3, 5'd1, 16'h00f9);     // SW R3, 0xF9(R1)
    tmem[4] = enc_i(OP_LW, 5'd4, 5'd1, 16'h00f9);     // LW R4, 0xF9(R1)
    tmem[5] = enc_j(OP_J, 26'h3fffff8);               // J -8
    repeat (2) @(posedge clk);
    rst <= 0;

    // constant loads
    for (int i = 0; i < 2; i++) begin
      step(c_f1(), seen);  chk(seen, i * 4, "F1 bus carries IP");
      step(c_d1(), seen);  chk(seen, i * 4 + 4, "D1 bus carries IP+4");
      step(c_const(0, 1), seen);
    end
    chk(dut.u_rf.regs[1], 7, "R1 loaded");
    chk(dut.u_rf.regs[2], 3, "R2 loaded");
    chk(ip_o, 8, "IP after two instructions");

    // ADD R3, R1, R2
    step(c_f1(), seen);
    #1 chk({26'b0, opcode}, {26'b0, OP_SPECIAL}, "opcode from IR");
    chk({21'b0, func}, {21'b0, FN_ADD}, "func from IR");
    step(c_d1(), seen);
    step(c_alu(ALU_ADD, 1, 0, 0), seen); chk(seen, 10, "A1 bus carries A+B");
    chk(dut.u_rf.regs[3], 10, "R3 = R1 + R2");

    // SW R3, 0xF9(R1): address 7 + 0xF9 = 0x100 -> word 64 is outside tmem,
    // so the model wraps; check the port instead of the array.
    step(c_f1(), seen);
    step(c_d1(), seen);
    #1 checks++;
    if (z !== 1'b0) begin failures++; $display("FAIL Z with R1 != 0 in A"); end
    step(c_const(0, 0), seen);  chk(seen, 32'h00f9, "C16 on bus");
    c = c_alu(ALU_ADD, 0, 1, 0); c.lb = 1; c.bs = 0;    // A <- A+B, B <- R[RD]
    step(c, seen); chk(seen, 32'h100, "effective address");
    c = '0; c.mas = 1; c.mw = 1;
    @(negedge clk); ctrl = c; #1;
    chk(mem_a, 32'h100, "store address from A");
    chk(mem_di, 10, "store data from B");
    chk({31'b0, mem_w}, 1, "memory write");
    @(posedge clk);

    // LW R4, 0xF9(R1) reads word 0x100 = tmem[0] after wrap: now 10
    step(c_f1(), seen);
    step(c_d1(), seen);
    step(c_const(0, 0), seen);
    step(c_alu(ALU_ADD, 0, 1, 0), seen);
    c = '0; c.em = 1; c.mas = 1; c.rw = 1;
    step(c, seen); chk(seen, 10, "memory data on bus");
    chk(dut.u_rf.regs[4], 10, "R4 loaded from memory");

    // J -8: IP = (0x14 + 4) - 8 = 0x10
    step(c_f1(), seen);
    step(c_d1(), seen);
    c = '0; c.eip = 1; c.la = 1; c.as = 1;
    step(c, seen); chk(seen, 32'h18, "J1 bus carries IP");
    step(c_const(1, 0), seen); chk(seen, 32'hfffffff8, "C26 sign-extended on bus");
    step(c_alu(ALU_ADD, 0, 0, 1), seen);
    chk(ip_o, 32'h10, "jump target in IP");

    // Z flag: A = R0
    tmem[4] = enc_i(OP_BEQZ, 5'd0, 5'd0, 16'd0);
    step(c_f1(), seen);
    step(c_d1(), seen);
    #1 checks++;
    if (z !== 1'b1) begin failures++; $display("FAIL Z with R0 in A"); end
    random_run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
