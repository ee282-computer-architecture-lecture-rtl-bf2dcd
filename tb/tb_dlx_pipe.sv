// tb_dlx_pipe: runs a program on the pipelined DLX and checks
//  * one instruction per clock: the register write of the n-th instruction
//    of a straight-line run happens exactly n+4 clocks after the first fetch;
//  * correct results where producer and consumer are four or more
//    instructions apart, and the stale read (RAW hazard) where they are not;
//  * SW followed directly by LW of the same word; LB, LBU, LH, LHU, SB, SH
//    (big-endian byte lanes);
//  * J, JAL, JR, taken BEQZ and untaken BEQZ, each with its two delay slots
//    executed and the instructions after them skipped.
// A second phase runs random programs (ALU ops, ADDI, all loads and stores,
// forward J/JAL/BEQZ/BNEZ, with no jump inside another jump's delay slots)
// against a model of the software-visible timing: two delay slots, and a
// register result visible only from the fourth instruction after its
// producer. Every fetch address, the order and values of all register writes
// and the final data memory are compared.
module tb_dlx_pipe;
  import dlx_pkg::*;
  localparam word_t NOP = '0;
  logic clk = 0, rst = 1;
  logic imem_ld_we, dmem_ld_we;
  word_t imem_ld_addr, imem_ld_data, dmem_ld_addr, dmem_ld_data, ip, wb_data;
  logic wb_en, redirect;
  reg_idx_t wb_rd;
  int checks = 0, failures = 0;
  int n_redirect = 0;

  dlx_pipe #(.IMEM_WORDS(256), .DMEM_WORDS(256)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
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

  word_t prog [$];
  word_t regs [32];

  // ---------------------------------------------------------------- model
  localparam int NPROG = 24;      // random programs
  localparam int NINS  = 120;     // instructions per program, then halt loops
  word_t        m_regs [32];
  logic [7:0]   m_mem [1024];     // data memory, bytes, big-endian words
  word_t        rprog [256];

  function automatic word_t sx8(input logic [7:0] b);   return {{24{b[7]}}, b}; endfunction
  function automatic word_t sx16(input logic [15:0] h); return {{16{h[15]}}, h}; endfunction

  function automatic word_t rnd_instr(input bit ctl_ok);
    logic [4:0] rd = 5'($urandom_range(1, 7));
    logic [4:0] ra = 5'($urandom_range(0, 7));
    logic [4:0] rb = 5'($urandom_range(0, 7));
    logic [15:0] ea = 16'(16'h100 + $urandom_range(0, 255));
    logic [10:0] fns [5] = '{FN_ADD, FN_SUB, FN_AND, FN_OR, FN_XOR};
    case ($urandom_range(0, ctl_ok ? 11 : 9))
      0, 1, 2: return enc_r(fns[$urandom_range(0, 4)], rd, ra, rb);
      3:       return enc_i(OP_ADDI, rd, ra, 16'($urandom_range(0, 65535)));
      4:       return enc_i(OP_LW,  rd, 5'd0, ea & 16'hfffc);
      5:       return enc_i($urandom_range(0, 1) ? OP_LH : OP_LHU, rd, 5'd0, ea & 16'hfffe);
      6:       return enc_i($urandom_range(0, 1) ? OP_LB : OP_LBU, rd, 5'd0, ea);
      7:       return enc_i(OP_SW, ra, 5'd0, ea & 16'hfffc);
      8:       return enc_i(OP_SH, ra, 5'd0, ea & 16'hfffe);
      9:       return enc_i(OP_SB, ra, 5'd0, ea);
      10:      return enc_i($urandom_range(0, 1) ? OP_BEQZ : OP_BNEZ, 5'd0, ra,
                            16'(4 * $urandom_range(0, 4)));
      default: return enc_j($urandom_range(0, 1) ? OP_J : OP_JAL, 26'(4 * $urandom_range(0, 4)));
    endcase
  endfunction

  function automatic bit is_ctl(input word_t ir);
    return ir[31:26] inside {OP_J, OP_JAL, OP_BEQZ, OP_BNEZ, OP_JR};
  endfunction

  // Executes the instruction at pc in the model with the register values it
  // can see; returns whether it jumps and where, and the register it writes
  // (0 = none) with its value.
  task automatic m_exec(input word_t pc, output bit jump, output word_t tgt,
                        output int wr, output word_t wv);
    word_t ir = rprog[pc[9:2]];
    logic [5:0] op = ir[31:26];
    word_t a = m_regs[ir[25:21]];
    word_t b = m_regs[ir[20:16]];
    word_t c16 = sx16(ir[15:0]);
    word_t c26 = {{6{ir[25]}}, ir[25:0]};
    int ad = int'(c16[9:0]);      // data addresses use base R0
    int rdi = ir[20:16];
    jump = 0; tgt = '0; wr = 0; wv = '0;
    case (op)
      OP_SPECIAL: begin
        case (ir[10:0])
          FN_ADD: wv = a + b;
          FN_SUB: wv = a - b;
          FN_AND: wv = a & b;
          FN_OR:  wv = a | b;
          FN_XOR: wv = a ^ b;
          default: wv = a + b;
        endcase
        wr = ir[15:11];
      end
      OP_ADDI: begin wv = a + c16; wr = rdi; end
      OP_LW:   begin wv = {m_mem[ad], m_mem[ad+1], m_mem[ad+2], m_mem[ad+3]}; wr = rdi; end
      OP_LH:   begin wv = sx16({m_mem[ad], m_mem[ad+1]}); wr = rdi; end
      OP_LHU:  begin wv = {16'h0, m_mem[ad], m_mem[ad+1]}; wr = rdi; end
      OP_LB:   begin wv = sx8(m_mem[ad]); wr = rdi; end
      OP_LBU:  begin wv = {24'h0, m_mem[ad]}; wr = rdi; end
      OP_SW:   {m_mem[ad], m_mem[ad+1], m_mem[ad+2], m_mem[ad+3]} = b;
      OP_SH:   {m_mem[ad], m_mem[ad+1]} = b[15:0];
      OP_SB:   m_mem[ad] = b[7:0];
      OP_BEQZ: begin jump = (a == 0); tgt = pc + 4 + c16; end
      OP_BNEZ: begin jump = (a != 0); tgt = pc + 4 + c16; end
      OP_J:    begin jump = 1; tgt = pc + 4 + c26; end
      OP_JAL:  begin jump = 1; tgt = pc + 4 + c26; wv = pc + 4; wr = 31; end
      default: ;
    endcase
  endtask

  task automatic random_runs();
    word_t pcs [$], exp_v [$], got_v [$];
    int exp_r [$], got_r [$];
    int p_idx [$], p_reg [$];
    word_t p_val [$];
    word_t pc, tgt, wv;
    int wr, redir_at, since_ctl;
    bit jump;
    word_t redir_pc;
    logic [7:0] mem0 [1024];
    for (int n = 0; n < NPROG; n++) begin
      // program: no jump within two instructions after a jump, and none in
      // the last three, so every jump's delay slots hold plain instructions
      since_ctl = 3;
      foreach (rprog[i]) begin
        if (i < NINS) begin
          rprog[i] = rnd_instr(since_ctl >= 2 && i < NINS - 3);
          since_ctl = is_ctl(rprog[i]) ? 0 : since_ctl + 1;
        end else rprog[i] = enc_j(OP_J, 26'h3fffffc);
      end
      foreach (m_mem[i]) m_mem[i] = 8'($urandom);
      mem0 = m_mem;
      // model: the run of dynamic instructions j = 0, 1, ...
      foreach (m_regs[i]) m_regs[i] = '0;
      pcs.delete(); exp_v.delete(); exp_r.delete(); got_v.delete(); got_r.delete();
      p_idx.delete(); p_reg.delete(); p_val.delete();
      pc = 0; redir_at = -1; redir_pc = '0;
      for (int j = 0; pc < 4 * NINS; j++) begin
        // results of instructions at least four earlier are visible
        while (p_idx.size() > 0 && p_idx[0] <= j - 4) begin
          m_regs[p_reg[0]] = p_val[0];
          void'(p_idx.pop_front()); void'(p_reg.pop_front()); void'(p_val.pop_front());
        end
        pcs.push_back(pc);
        m_exec(pc, jump, tgt, wr, wv);
        if (wr != 0) begin
          p_idx.push_back(j); p_reg.push_back(wr); p_val.push_back(wv);
          exp_r.push_back(wr); exp_v.push_back(wv);
        end
        if (jump) begin redir_at = j + 3; redir_pc = tgt; end
        pc = (redir_at == j + 1) ? redir_pc : pc + 4;
      end
      // run the same program on the pipeline
      @(negedge clk);
      rst = 1;
      for (int i = 0; i < 256; i++) begin
        @(negedge clk);
        imem_ld_we = 1; imem_ld_addr = i * 4; imem_ld_data = rprog[i];
        dmem_ld_we = 1; dmem_ld_addr = i * 4;
        dmem_ld_data = {mem0[4*i], mem0[4*i+1], mem0[4*i+2], mem0[4*i+3]};
      end
      @(negedge clk);
      imem_ld_we = 0; dmem_ld_we = 0;
      rst = 0;
      for (int cyc = 0; cyc < pcs.size() + 8; cyc++) begin
        #1;
        if (cyc < pcs.size()) chk(ip, pcs[cyc], $sformatf("program %0d fetch %0d", n, cyc));
        if (wb_en && wb_rd != 0) begin got_r.push_back(wb_rd); got_v.push_back(wb_data); end
        @(negedge clk);
      end
      chk(got_r.size(), exp_r.size(), $sformatf("program %0d number of register writes", n));
      foreach (exp_r[i]) begin
        checks++;
        if (i >= got_r.size() || got_r[i] != exp_r[i] || got_v[i] != exp_v[i]) begin
          failures++;
          if (i < got_r.size())
            $display("FAIL program %0d write %0d: R%0d=%h expected R%0d=%h",
                     n, i, got_r[i], got_v[i], exp_r[i], exp_v[i]);
        end
      end
      for (int i = 0; i < 256; i++)
        chk(dut.u_dmem.mem[i], {m_mem[4*i], m_mem[4*i+1], m_mem[4*i+2], m_mem[4*i+3]},
            $sformatf("program %0d memory word %0d", n, i));
    end
  endtask
  int wb_cycle [32];
  int cyc;

  initial begin
    imem_ld_we = 0; dmem_ld_we = 0;
    imem_ld_addr = 0; imem_ld_data = 0; dmem_ld_addr = 0; dmem_ld_data = 0;
    prog = '{
      enc_i(OP_ADDI, 5'd1, 5'd0, 16'd7),        // 00 R1 = 7
      enc_i(OP_ADDI, 5'd2, 5'd0, 16'd3),        // 04 R2 = 3
      NOP, NOP, NOP,                            // 08 0c 10
      enc_r(FN_ADD, 5'd3, 5'd1, 5'd2),          // 14 R3 = 10
      enc_r(FN_ADD, 5'd4, 5'd3, 5'd1),          // 18 R4 reads stale R3 (0): 7
      enc_r(FN_SUB, 5'd5, 5'd1, 5'd2),          // 1c R5 = 4
      enc_r(FN_AND, 5'd6, 5'd1, 5'd2),          // 20 R6 = 3
      enc_r(FN_OR,  5'd7, 5'd1, 5'd2),          // 24 R7 = 7
      enc_r(FN_ADD, 5'd8, 5'd3, 5'd0),          // 28 R8 = R3 = 10 (4 apart)
      enc_i(OP_SW, 5'd3, 5'd0, 16'h0100),       // 2c M[100] = 10
      enc_i(OP_LW, 5'd9, 5'd0, 16'h0100),       // 30 R9 = 10
      enc_r(FN_XOR, 5'd10, 5'd1, 5'd2),         // 34 R10 = 4
      enc_j(OP_J, 26'd12),                      // 38 J -> 48
      enc_i(OP_ADDI, 5'd11, 5'd0, 16'd1),       // 3c delay slot: R11 = 1
      enc_i(OP_ADDI, 5'd12, 5'd0, 16'd2),       // 40 delay slot: R12 = 2
      enc_i(OP_ADDI, 5'd13, 5'd0, 16'd99),      // 44 skipped
      enc_j(OP_JAL, 26'd16),                    // 48 JAL -> 5c, R31 = 4c
      NOP, NOP,                                 // 4c 50
      enc_i(OP_ADDI, 5'd14, 5'd0, 16'd99),      // 54 skipped
      enc_i(OP_ADDI, 5'd14, 5'd0, 16'd99),      // 58 skipped
      enc_i(OP_BEQZ, 5'd0, 5'd0, 16'd12),       // 5c taken -> 6c
      NOP, NOP,                                 // 60 64
      enc_i(OP_ADDI, 5'd15, 5'd0, 16'd99),      // 68 skipped
      enc_i(OP_BEQZ, 5'd0, 5'd1, 16'd12),       // 6c not taken
      NOP, NOP,                                 // 70 74
      enc_i(OP_ADDI, 5'd16, 5'd0, 16'd5),       // 78 R16 = 5
      enc_i(OP_ADDI, 5'd17, 5'd0, 16'h00a0),    // 7c R17 = a0
      NOP, NOP, NOP,                            // 80 84 88
      enc_i(OP_JR, 5'd0, 5'd17, 16'd0),         // 8c JR R17 -> a0
      NOP, NOP,                                 // 90 94
      enc_i(OP_ADDI, 5'd18, 5'd0, 16'd99),      // 98 skipped
      enc_i(OP_ADDI, 5'd18, 5'd0, 16'd99),      // 9c skipped
      enc_r(FN_ADD, 5'd19, 5'd31, 5'd0),        // a0 R19 = R31 = 4c
      enc_i(OP_LB,  5'd20, 5'd0, 16'h0181),     // a4 byte 1 of 8162a3f4: 62
      enc_i(OP_LBU, 5'd21, 5'd0, 16'h0183),     // a8 byte 3: f4
      enc_i(OP_LB,  5'd22, 5'd0, 16'h0180),     // ac byte 0 sign-extended: ffffff81
      enc_i(OP_LH,  5'd23, 5'd0, 16'h0182),     // b0 low half sign-extended: ffffa3f4
      enc_i(OP_LHU, 5'd24, 5'd0, 16'h0180),     // b4 high half: 8162
      enc_i(OP_SB,  5'd1, 5'd0, 16'h01c1),      // b8 byte 1 of word 1c0 <- 07
      enc_i(OP_SH,  5'd2, 5'd0, 16'h01c2),      // bc low half <- 0003
      enc_i(OP_SB,  5'd17, 5'd0, 16'h01c0),     // c0 byte 0 <- a0
      NOP,                                      // c4
      enc_i(OP_LW,  5'd25, 5'd0, 16'h01c0),     // c8 a0070003
      enc_j(OP_J, 26'h3fffffc)                  // cc J -> cc (halt loop)
    };
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      imem_ld_we = 1; imem_ld_addr = i * 4;
      imem_ld_data = (i < prog.size()) ? prog[i] : NOP;
      dmem_ld_we = 1; dmem_ld_addr = i * 4;
      dmem_ld_data = (i == 'h180 / 4) ? 32'h8162a3f4 : '0;
    end
    @(negedge clk);
    imem_ld_we = 0; dmem_ld_we = 0;
    foreach (regs[i]) regs[i] = '0;
    foreach (wb_cycle[i]) wb_cycle[i] = -1;
    rst = 0;
    // cycle 0 is the clock in which address 0 is fetched
    for (cyc = 0; cyc < 200; cyc++) begin
      #1;
      if (cyc == 0) chk(ip, 0, "first fetch at address 0");
      if (wb_en) begin
        regs[wb_rd] = wb_data;
        if (wb_cycle[wb_rd] < 0) wb_cycle[wb_rd] = cyc;
      end
      if (redirect) n_redirect++;
      @(negedge clk);
    end
    // instruction at word n writes in clock n + 4
    chk(wb_cycle[1], 0 + 4, "W clock of word 0");
    chk(wb_cycle[2], 1 + 4, "W clock of word 1");
    chk(wb_cycle[3], 5 + 4, "W clock of word 5");
    chk(wb_cycle[10], 13 + 4, "W clock of word 13");
    chk(regs[1], 7, "ADDI R1");
    chk(regs[2], 3, "ADDI R2");
    chk(regs[3], 10, "ADD R3");
    chk(regs[4], 7, "RAW hazard: consumer right after producer reads the old value");
    chk(regs[5], 4, "SUB");
    chk(regs[6], 3, "AND");
    chk(regs[7], 7, "OR");
    chk(regs[8], 10, "consumer four instructions later sees the result");
    chk(regs[9], 10, "LW after SW");
    chk(regs[10], 4, "XOR");
    chk(regs[11], 1, "J delay slot 1 executes");
    chk(regs[12], 2, "J delay slot 2 executes");
    chk(regs[13], 0, "instruction after J delay slots skipped");
    chk(regs[14], 0, "instructions after JAL delay slots skipped");
    chk(regs[15], 0, "instruction after taken BEQZ delay slots skipped");
    chk(regs[16], 5, "untaken BEQZ falls through");
    chk(regs[17], 'ha0, "JR target register");
    chk(regs[18], 0, "instructions after JR delay slots skipped");
    chk(regs[31], 'h4c, "JAL link");
    chk(regs[19], 'h4c, "JR landed at its target");
    chk(dut.u_rf.regs[19], 'h4c, "register file holds the written value");
    chk(dut.u_dmem.mem['h100 / 4], 10, "stored word");
    chk(regs[20], 'h62, "LB");
    chk(regs[21], 'hf4, "LBU");
    chk(regs[22], 'hffffff81, "LB sign extension");
    chk(regs[23], 'hffffa3f4, "LH sign extension");
    chk(regs[24], 'h8162, "LHU");
    chk(regs[25], 'ha0070003, "SB, SH, SB then LW");
    chk(dut.u_dmem.mem['h1c0 / 4], 'ha0070003, "byte and half-word stores in memory");
    checks++;
    if (n_redirect < 5) begin failures++; $display("FAIL only %0d redirects", n_redirect); end
    random_runs();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
