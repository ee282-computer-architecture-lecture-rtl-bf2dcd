// tb_dlx_single: runs a program on the single-cycle DLX in which every
// instruction depends on the one before it and jumps have no delay slots.
// Checks the fetch address of every clock (one instruction per clock, jump
// targets taken at once), the register results, byte/half-word accesses and
// the memory contents.
// A second phase runs random programs (ALU ops, ADDI, all loads and stores,
// forward J/JAL/BEQZ/BNEZ) and compares every fetch address and register
// write with an instruction-by-instruction model kept in this testbench,
// then compares the data memory.
module tb_dlx_single;
  import dlx_pkg::*;
  logic clk = 0, rst = 1;
  logic imem_ld_we, dmem_ld_we, wb_en, retire;
  word_t imem_ld_addr, imem_ld_data, dmem_ld_addr, dmem_ld_data, ip, wb_data;
  reg_idx_t wb_rd;
  int checks = 0, failures = 0;

  dlx_single #(.IMEM_WORDS(128), .DMEM_WORDS(128)) dut (.*);

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

  word_t prog [$] = '{
    enc_i(OP_ADDI, 5'd1, 5'd0, 16'd7),        // 00 R1 = 7
    enc_i(OP_ADDI, 5'd2, 5'd0, 16'd3),        // 04 R2 = 3
    enc_r(FN_ADD, 5'd3, 5'd1, 5'd2),          // 08 R3 = 10
    enc_r(FN_ADD, 5'd4, 5'd3, 5'd1),          // 0c R4 = 17 (uses R3 at once)
    enc_r(FN_SUB, 5'd5, 5'd4, 5'd2),          // 10 R5 = 14
    enc_r(FN_AND, 5'd6, 5'd1, 5'd2),          // 14 R6 = 3
    enc_r(FN_OR,  5'd7, 5'd1, 5'd2),          // 18 R7 = 7
    enc_r(FN_XOR, 5'd8, 5'd1, 5'd2),          // 1c R8 = 4
    enc_i(OP_SW,  5'd4, 5'd0, 16'h0100),      // 20 M[100] = 17
    enc_i(OP_LW,  5'd9, 5'd0, 16'h0100),      // 24 R9 = 17
    enc_i(OP_SB,  5'd1, 5'd0, 16'h0101),      // 28 M[100] = 00070011
    enc_i(OP_LB,  5'd10, 5'd0, 16'h0101),     // 2c R10 = 7
    enc_i(OP_LHU, 5'd11, 5'd0, 16'h0102),     // 30 R11 = 0011
    enc_j(OP_J, 26'd8),                       // 34 -> 40
    enc_i(OP_ADDI, 5'd12, 5'd0, 16'd99),      // 38 skipped
    enc_i(OP_ADDI, 5'd12, 5'd0, 16'd99),      // 3c skipped
    enc_j(OP_JAL, 26'd8),                     // 40 -> 4c, R31 = 44
    enc_i(OP_ADDI, 5'd13, 5'd0, 16'd99),      // 44 skipped
    enc_i(OP_ADDI, 5'd13, 5'd0, 16'd99),      // 48 skipped
    enc_i(OP_BEQZ, 5'd0, 5'd0, 16'd4),        // 4c taken -> 54
    enc_i(OP_ADDI, 5'd14, 5'd0, 16'd99),      // 50 skipped
    enc_i(OP_BNEZ, 5'd0, 5'd0, 16'd4),        // 54 not taken
    enc_i(OP_ADDI, 5'd15, 5'd0, 16'd5),       // 58 R15 = 5
    enc_i(OP_ADDI, 5'd16, 5'd0, 16'h0068),    // 5c R16 = 68
    enc_i(OP_JR, 5'd0, 5'd16, 16'd0),         // 60 -> 68
    enc_i(OP_ADDI, 5'd17, 5'd0, 16'd99),      // 64 skipped
    enc_r(FN_ADD, 5'd18, 5'd31, 5'd0),        // 68 R18 = 44
    enc_j(OP_J, 26'h3fffffc)                  // 6c halt loop
  };
  word_t trace [$] = '{'h00, 'h04, 'h08, 'h0c, 'h10, 'h14, 'h18, 'h1c, 'h20, 'h24, 'h28,
                       'h2c, 'h30, 'h34, 'h40, 'h4c, 'h54, 'h58, 'h5c, 'h60, 'h68, 'h6c, 'h6c};
  word_t regs [32];

  // ---------------------------------------------------------------- model
  localparam int NPROG = 24;      // random programs
  localparam int NINS  = 100;     // instructions per program, then a halt loop
  word_t        m_regs [32];
  logic [7:0]   m_mem [512];      // data memory, bytes, big-endian words
  word_t        rprog [128];

  function automatic word_t sx8(input logic [7:0] b);   return {{24{b[7]}}, b}; endfunction
  function automatic word_t sx16(input logic [15:0] h); return {{16{h[15]}}, h}; endfunction

  function automatic word_t rnd_instr();
    logic [4:0] rd = 5'($urandom_range(1, 7));
    logic [4:0] ra = 5'($urandom_range(0, 7));
    logic [4:0] rb = 5'($urandom_range(0, 7));
    logic [15:0] ea = 16'(16'h100 + $urandom_range(0, 255));
    logic [10:0] fns [5] = '{FN_ADD, FN_SUB, FN_AND, FN_OR, FN_XOR};
    case ($urandom_range(0, 11))
      0, 1, 2: return enc_r(fns[$urandom_range(0, 4)], rd, ra, rb);
      3:       return enc_i(OP_ADDI, rd, ra, 16'($urandom_range(0, 65535)));
      4:       return enc_i(OP_LW,  rd, 5'd0, ea & 16'hfffc);
      5:       return enc_i($urandom_range(0, 1) ? OP_LH : OP_LHU, rd, 5'd0, ea & 16'hfffe);
      6:       return enc_i($urandom_range(0, 1) ? OP_LB : OP_LBU, rd, 5'd0, ea);
      7:       return enc_i(OP_SW, ra, 5'd0, ea & 16'hfffc);
      8:       return enc_i(OP_SH, ra, 5'd0, ea & 16'hfffe);
      9:       return enc_i(OP_SB, ra, 5'd0, ea);
      10:      return enc_i($urandom_range(0, 1) ? OP_BEQZ : OP_BNEZ, 5'd0, ra,
                            16'(4 * $urandom_range(0, 3)));
      default: return enc_j($urandom_range(0, 1) ? OP_J : OP_JAL, 26'(4 * $urandom_range(0, 3)));
    endcase
  endfunction

  // Executes the instruction at pc in the model; returns the next pc and the
  // register written (0 = none) with its value.
  task automatic m_step(input word_t pc, output word_t npc, output int wr, output word_t wv);
    word_t ir = rprog[pc[8:2]];
    logic [5:0] op = ir[31:26];
    word_t a = m_regs[ir[25:21]];
    word_t b = m_regs[ir[20:16]];
    word_t c16 = sx16(ir[15:0]);
    word_t c26 = {{6{ir[25]}}, ir[25:0]};
    int ad = int'(c16[8:0]);      // data addresses use base R0
    int rdi = ir[20:16];
    npc = pc + 4; wr = 0; wv = '0;
    case (op)
      OP_SPECIAL: begin
        rdi = ir[15:11];
        case (ir[10:0])
          FN_ADD: wv = a + b;
          FN_SUB: wv = a - b;
          FN_AND: wv = a & b;
          FN_OR:  wv = a | b;
          FN_XOR: wv = a ^ b;
          default: wv = a + b;
        endcase
        wr = rdi;
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
      OP_BEQZ: if (a == 0) npc = pc + 4 + c16;
      OP_BNEZ: if (a != 0) npc = pc + 4 + c16;
      OP_J:    npc = pc + 4 + c26;
      OP_JAL:  begin wv = pc + 4; wr = 31; npc = pc + 4 + c26; end
      default: ;
    endcase
    if (wr != 0) m_regs[wr] = wv;
  endtask

  task automatic random_runs();
    word_t pc, npc, wv;
    int wr;
    for (int n = 0; n < NPROG; n++) begin
      foreach (rprog[i]) rprog[i] = (i < NINS) ? rnd_instr() : enc_j(OP_J, 26'h3fffffc);
      foreach (m_mem[i]) m_mem[i] = 8'($urandom);
      foreach (m_regs[i]) m_regs[i] = '0;
      @(negedge clk);
      rst = 1;
      for (int i = 0; i < 128; i++) begin
        @(negedge clk);
        imem_ld_we = 1; imem_ld_addr = i * 4; imem_ld_data = rprog[i];
        dmem_ld_we = 1; dmem_ld_addr = i * 4;
        dmem_ld_data = {m_mem[4*i], m_mem[4*i+1], m_mem[4*i+2], m_mem[4*i+3]};
      end
      @(negedge clk);
      imem_ld_we = 0; dmem_ld_we = 0;
      rst = 0;
      pc = 0;
      while (pc < 4 * NINS) begin
        #1;
        chk(ip, pc, $sformatf("program %0d fetch address", n));
        m_step(pc, npc, wr, wv);
        checks++;
        if (wr != 0 ? !(wb_en && wb_rd == 5'(wr) && wb_data == wv) : (wb_en && wb_rd != 0)) begin
          failures++;
          $display("FAIL program %0d pc %h: write en=%b R%0d=%h, expected R%0d=%h",
                   n, pc, wb_en, wb_rd, wb_data, wr, wv);
        end
        pc = npc;
        @(negedge clk);
      end
      for (int i = 0; i < 128; i++)
        chk(dut.u_dmem.mem[i], {m_mem[4*i], m_mem[4*i+1], m_mem[4*i+2], m_mem[4*i+3]},
            $sformatf("program %0d memory word %0d", n, i));
    end
  endtask

  initial begin
    imem_ld_we = 0; dmem_ld_we = 0;
    imem_ld_addr = 0; imem_ld_data = 0; dmem_ld_addr = 0; dmem_ld_data = 0;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      imem_ld_we = 1; imem_ld_addr = i * 4;
      imem_ld_data = (i < prog.size()) ? prog[i] : '0;
      dmem_ld_we = 1; dmem_ld_addr = i * 4; dmem_ld_data = '0;
    end
    @(negedge clk);
    imem_ld_we = 0; dmem_ld_we = 0;
    foreach (regs[i]) regs[i] = '0;
    rst = 0;
    foreach (trace[c]) begin
      #1;
      chk(ip, trace[c], $sformatf("fetch address in clock %0d", c));
      checks++;
      if (!retire) begin failures++; $display("FAIL no instruction completed in clock %0d", c); end
      if (wb_en) regs[wb_rd] = wb_data;
      @(negedge clk);
    end
    chk(regs[3], 10, "ADD");
    chk(regs[4], 17, "ADD using the previous result");
    chk(regs[5], 14, "SUB");
    chk(regs[6], 3, "AND");
    chk(regs[7], 7, "OR");
    chk(regs[8], 4, "XOR");
    chk(regs[9], 17, "LW after SW");
    chk(regs[10], 7, "LB after SB");
    chk(regs[11], 'h11, "LHU");
    chk(regs[12], 0, "no delay slot after J");
    chk(regs[13], 0, "no delay slot after JAL");
    chk(regs[14], 0, "no delay slot after BEQZ");
    chk(regs[15], 5, "BNEZ falls through");
    chk(regs[31], 'h44, "JAL link");
    chk(regs[18], 'h44, "JR reached its target");
    chk(regs[17], 0, "no delay slot after JR");
    chk(dut.u_rf.regs[18], 'h44, "register file holds R18");
    chk(dut.u_dmem.mem['h100 / 4], 'h00070011, "memory word");
    random_runs();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
