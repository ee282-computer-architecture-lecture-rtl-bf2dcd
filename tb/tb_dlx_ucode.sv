// tb_dlx_ucode: runs a program on the microcoded single-bus DLX. It loads
// two words, applies every ALU function, stores, takes and falls through a
// BEQZ, jumps over two instructions and loads back the stored word. It checks
// the registers and memory afterwards, and the number of clocks each
// instruction took (3 for ALU ops and an untaken BEQZ, 5 for the rest).
// A second phase runs random programs (ALU ops, LW, SW, forward J and BEQZ,
// and opcodes without microcode) on this machine and on a copy built with
// hardwired control. An instruction-by-instruction model kept here predicts
// every fetch address and the clocks of every instruction (2 for an opcode
// without microcode: F1 and D1); registers and memory are compared at the
// end.
module tb_dlx_ucode;
  import dlx_pkg::*;
  logic clk = 0, rst = 1;
  logic ld_we;
  word_t ld_addr, ld_data, ip, bus;
  uaddr_e uip;
  logic fetch;
  int checks = 0, failures = 0;

  dlx_ucode #(.MEM_WORDS(256)) dut (.*);

  word_t ip_hw, bus_hw;
  uaddr_e uip_hw;
  logic fetch_hw;
  dlx_ucode #(.MEM_WORDS(256), .HARDWIRED(1'b1)) dut_hw (
    .clk(clk), .rst(rst), .ld_we(ld_we), .ld_addr(ld_addr), .ld_data(ld_data),
    .ip(ip_hw), .uip(uip_hw), .bus(bus_hw), .fetch(fetch_hw)
  );

  always #5 clk = ~clk;
  initial begin
    repeat (60000) @(posedge clk);
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

  task automatic load(input int unsigned byte_addr, input word_t w);
    @(negedge clk);
    ld_we = 1; ld_addr = byte_addr; ld_data = w;
  endtask

  // ---------------------------------------------------------------- model
  localparam int NPROG = 30;      // random programs
  localparam int NINS  = 60;      // instructions per program, then a halt loop
  word_t m_regs [32];
  word_t m_mem [256];
  word_t rprog [NINS + 1];

  function automatic word_t rnd_instr();
    logic [4:0] rd = 5'($urandom_range(1, 7));
    logic [4:0] ra = 5'($urandom_range(0, 7));
    logic [4:0] rb = 5'($urandom_range(0, 7));
    logic [15:0] ea = 16'(16'h200 + 4 * $urandom_range(0, 127));
    logic [10:0] fns [5] = '{FN_ADD, FN_SUB, FN_AND, FN_OR, FN_XOR};
    case ($urandom_range(0, 9))
      0, 1, 2: return enc_r(fns[$urandom_range(0, 4)], rd, ra, rb);
      3, 4:    return enc_i(OP_LW, rd, 5'd0, ea);
      5:       return enc_i(OP_SW, ra, 5'd0, ea);
      6, 7:    return enc_i(OP_BEQZ, 5'd0, ra, 16'(4 * $urandom_range(0, 3)));
      8:       return enc_j(OP_J, 26'(4 * $urandom_range(0, 3)));
      default: return enc_i(OP_ADDI, rd, ra, 16'd1);   // no microcode: no-op
    endcase
  endfunction

  // Executes the instruction at pc in the model; returns the next pc and the
  // clocks the machine needs for it.
  task automatic m_step(input word_t pc, output word_t npc, output int cpi);
    word_t ir = rprog[pc[7:2]];
    word_t a = m_regs[ir[25:21]];
    word_t b = m_regs[ir[20:16]];
    word_t c16 = {{16{ir[15]}}, ir[15:0]};
    word_t c26 = {{6{ir[25]}}, ir[25:0]};
    word_t v;
    npc = pc + 4;
    case (ir[31:26])
      OP_SPECIAL: begin
        case (ir[10:0])
          FN_ADD: v = a + b;
          FN_SUB: v = a - b;
          FN_AND: v = a & b;
          FN_OR:  v = a | b;
          FN_XOR: v = a ^ b;
          default: v = a + b;
        endcase
        if (ir[15:11] != 0) m_regs[ir[15:11]] = v;
        cpi = 3;
      end
      OP_LW:   begin if (ir[20:16] != 0) m_regs[ir[20:16]] = m_mem[c16[9:2]]; cpi = 5; end
      OP_SW:   begin m_mem[c16[9:2]] = b; cpi = 5; end
      OP_BEQZ: begin
        if (a == 0) begin npc = pc + 4 + c16; cpi = 5; end
        else cpi = 3;
      end
      OP_J:    begin npc = pc + 4 + c26; cpi = 5; end
      default: cpi = 2;
    endcase
  endtask

  task automatic random_runs();
    word_t pcs [$];
    int cpis [$];
    word_t pc, npc;
    int cpi, cyc, i_uc, i_hw, t_uc, t_hw;
    word_t mem0 [256];
    for (int n = 0; n < NPROG; n++) begin
      foreach (rprog[i]) rprog[i] = (i < NINS) ? rnd_instr() : enc_j(OP_J, 26'h3fffffc);
      foreach (m_mem[i]) m_mem[i] = (i < NINS + 1) ? rprog[i] : (i >= 'h80) ? word_t'($urandom) : '0;
      mem0 = m_mem;
      foreach (m_regs[i]) m_regs[i] = '0;
      pcs.delete(); cpis.delete();
      pc = 0;
      while (pc < 4 * NINS) begin
        pcs.push_back(pc);
        m_step(pc, npc, cpi);
        cpis.push_back(cpi);
        pc = npc;
      end
      pcs.push_back(pc);   // the halt loop
      @(negedge clk);
      rst = 1;
      for (int i = 0; i < 256; i++) load(i * 4, mem0[i]);
      @(negedge clk);
      ld_we = 0;
      rst = 0;
      cyc = 0; i_uc = 0; i_hw = 0; t_uc = 0; t_hw = 0;
      while ((i_uc < pcs.size() || i_hw < pcs.size()) && cyc < 6 * pcs.size()) begin
        #1;
        cyc++;
        if (fetch && i_uc < pcs.size()) begin
          chk(ip, pcs[i_uc], $sformatf("program %0d microcoded fetch %0d", n, i_uc));
          if (i_uc > 0) chk(cyc - t_uc, cpis[i_uc - 1], $sformatf("program %0d microcoded clocks of %0d", n, i_uc - 1));
          t_uc = cyc; i_uc++;
        end
        if (fetch_hw && i_hw < pcs.size()) begin
          chk(ip_hw, pcs[i_hw], $sformatf("program %0d hardwired fetch %0d", n, i_hw));
          if (i_hw > 0) chk(cyc - t_hw, cpis[i_hw - 1], $sformatf("program %0d hardwired clocks of %0d", n, i_hw - 1));
          t_hw = cyc; i_hw++;
        end
        @(negedge clk);
      end
      chk(i_uc, pcs.size(), $sformatf("program %0d microcoded instructions", n));
      chk(i_hw, pcs.size(), $sformatf("program %0d hardwired instructions", n));
      for (int r = 1; r < 32; r++) begin
        chk(dut.u_dp.u_rf.regs[r], m_regs[r], $sformatf("program %0d microcoded R%0d", n, r));
        chk(dut_hw.u_dp.u_rf.regs[r], m_regs[r], $sformatf("program %0d hardwired R%0d", n, r));
      end
      for (int i = 0; i < 256; i++) begin
        chk(dut.u_mem.mem[i], m_mem[i], $sformatf("program %0d microcoded memory word %0d", n, i));
        chk(dut_hw.u_mem.mem[i], m_mem[i], $sformatf("program %0d hardwired memory word %0d", n, i));
      end
    end
  endtask

  word_t prog [$];
  // clocks per instruction, in execution order
  int exp_cpi [$] = '{5, 5, 3, 3, 3, 3, 3, 5, 5, 3, 5, 5, 5};
  word_t exp_ip [$] = '{'h00, 'h04, 'h08, 'h0c, 'h10, 'h14, 'h18, 'h1c, 'h20, 'h2c, 'h30, 'h3c, 'h40, 'h44};

  initial begin
    int t_prev, cyc;
    int idx;
    ld_we = 0; ld_addr = 0; ld_data = 0;
    prog = '{
      enc_i(OP_LW, 5'd1, 5'd0, 16'h0200),     // 00 LW  R1, 0x200(R0)   R1 = 7
      enc_i(OP_LW, 5'd2, 5'd0, 16'h0204),     // 04 LW  R2, 0x204(R0)   R2 = 3
      enc_r(FN_ADD, 5'd3, 5'd1, 5'd2),        // 08 ADD R3, R1, R2      10
      enc_r(FN_SUB, 5'd4, 5'd1, 5'd2),        // 0c SUB R4, R1, R2      4
      enc_r(FN_AND, 5'd5, 5'd1, 5'd2),        // 10 AND                 3
      enc_r(FN_OR,  5'd6, 5'd1, 5'd2),        // 14 OR                  7
      enc_r(FN_XOR, 5'd7, 5'd1, 5'd2),        // 18 XOR                 4
      enc_i(OP_SW, 5'd3, 5'd0, 16'h0208),     // 1c SW  R3, 0x208(R0)
      enc_i(OP_BEQZ, 5'd0, 5'd0, 16'd8),      // 20 BEQZ R0, +8 -> 2c (taken)
      enc_r(FN_ADD, 5'd8, 5'd1, 5'd1),        // 24 skipped
      enc_r(FN_ADD, 5'd8, 5'd1, 5'd1),        // 28 skipped
      enc_i(OP_BEQZ, 5'd0, 5'd1, 16'd8),      // 2c BEQZ R1, +8 (not taken)
      enc_j(OP_J, 26'd8),                     // 30 J +8 -> 3c
      enc_r(FN_ADD, 5'd9, 5'd1, 5'd1),        // 34 skipped
      enc_r(FN_ADD, 5'd9, 5'd1, 5'd1),        // 38 skipped
      enc_i(OP_SW, 5'd7, 5'd2, 16'h0209),     // 3c SW  R7, 0x209(R2) -> 0x20c
      enc_i(OP_LW, 5'd10, 5'd0, 16'h0208),    // 40 LW  R10, 0x208(R0)  10
      enc_j(OP_J, 26'h3fffffc)                // 44 J -4 -> 44 (halt loop)
    };
    for (int i = 0; i < 256; i++) load(i * 4, '0);
    foreach (prog[i]) load(i * 4, prog[i]);
    load('h200, 7);
    load('h204, 3);
    @(negedge clk);
    ld_we = 0;
    rst = 0;
    cyc = 0; t_prev = 0; idx = 0;
    // follow the fetches
    // sample in the middle of each clock, starting with the first one
    while (idx < exp_ip.size()) begin
      #1;
      cyc++;
      if (fetch) begin
        chk(ip, exp_ip[idx], $sformatf("IP of instruction %0d", idx));
        if (idx > 0) chk(cyc - t_prev, exp_cpi[idx - 1], $sformatf("clocks of instruction %0d", idx - 1));
        t_prev = cyc;
        idx++;
      end
      @(negedge clk);
    end
    repeat (20) @(posedge clk);
    @(posedge fetch);
    #1;
    chk(dut.u_dp.u_rf.regs[1], 7, "R1");
    chk(dut.u_dp.u_rf.regs[2], 3, "R2");
    chk(dut.u_dp.u_rf.regs[3], 10, "R3 ADD");
    chk(dut.u_dp.u_rf.regs[4], 4, "R4 SUB");
    chk(dut.u_dp.u_rf.regs[5], 3, "R5 AND");
    chk(dut.u_dp.u_rf.regs[6], 7, "R6 OR");
    chk(dut.u_dp.u_rf.regs[7], 4, "R7 XOR");
    chk(dut.u_dp.u_rf.regs[8], 0, "R8 skipped by branch");
    chk(dut.u_dp.u_rf.regs[9], 0, "R9 skipped by jump");
    chk(dut.u_dp.u_rf.regs[10], 10, "R10 load of stored word");
    chk(dut.u_mem.mem['h208 / 4], 10, "stored R3");
    chk(dut.u_mem.mem['h20c / 4], 4, "stored R7");
    chk(ip, 'h44, "halt loop");
    random_runs();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
