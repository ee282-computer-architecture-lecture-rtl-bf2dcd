// tb_ee282_top: end-to-end test of all machines at their default sizes, run
// concurrently.
//  * microcoded DLX: a program using every microcode routine (ALU op, J,
//    BEQZ taken and not taken, LW, SW); checks results and clocks taken.
//  * hardwired single-bus DLX: the same program, same results and clocks.
//  * single-cycle DLX: the same program as the pipeline; with no hazards the
//    dependent ADD sees the new value and jumps have no delay slots.
//  * pipelined DLX: a program with one result per clock, a RAW hazard (stale
//    read), SW->LW, SB->LB, and J, JAL, JR, BEQZ with their delay slots.
//  * k*x^4: the same x stream into all three datapaths; every y checked,
//    the sequential unit must hold off input (in_ready low) between results,
//    the pipelined unit must deliver results on consecutive clocks.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_ee282_top;
  import dlx_pkg::*;
  localparam word_t NOP = '0;
  localparam int MEMW = 1024;
  localparam int W = 32;
  localparam int NX = 24;

  logic clk = 0, rst = 1;
  logic uc_ld_we, pp_imem_ld_we, pp_dmem_ld_we;
  word_t uc_ld_addr, uc_ld_data, uc_ip, uc_bus;
  logic sc_imem_ld_we, sc_dmem_ld_we, sc_wb_en, sc_retire;
  word_t sc_imem_ld_addr, sc_imem_ld_data, sc_dmem_ld_addr, sc_dmem_ld_data, sc_ip, sc_wb_data;
  reg_idx_t sc_wb_rd;
  word_t pp_imem_ld_addr, pp_imem_ld_data, pp_dmem_ld_addr, pp_dmem_ld_data, pp_ip, pp_wb_data;
  uaddr_e uc_uip, hw_uip;
  word_t hw_ip, hw_bus;
  logic hw_fetch;
  logic uc_fetch, pp_wb_en, pp_redirect;
  reg_idx_t pp_wb_rd;
  logic [W-1:0] kx_k, kxs_x, kxs_y, kxc_x, kxc_y, kxp_x, kxp_y;
  logic kxs_in_valid, kxs_in_ready, kxs_out_valid, kxc_in_valid, kxc_out_valid;
  logic kxp_in_valid, kxp_out_valid;

  ee282_top dut (.*);

  int checks = 0, failures = 0;
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

  // ---------------------------------------------------------------- programs
  word_t uprog [$] = '{
    enc_i(OP_LW, 5'd1, 5'd0, 16'h0200),     // 00 R1 = 7
    enc_i(OP_LW, 5'd2, 5'd0, 16'h0204),     // 04 R2 = 3
    enc_r(FN_ADD, 5'd3, 5'd1, 5'd2),        // 08 10
    enc_r(FN_SUB, 5'd4, 5'd1, 5'd2),        // 0c 4
    enc_i(OP_SW, 5'd3, 5'd0, 16'h0208),     // 10 M[208] = 10
    enc_i(OP_BEQZ, 5'd0, 5'd0, 16'd4),      // 14 taken -> 1c
    enc_r(FN_ADD, 5'd8, 5'd1, 5'd1),        // 18 skipped
    enc_i(OP_BEQZ, 5'd0, 5'd1, 16'd4),      // 1c not taken
    enc_j(OP_J, 26'd4),                     // 20 -> 28
    enc_r(FN_ADD, 5'd9, 5'd1, 5'd1),        // 24 skipped
    enc_i(OP_LW, 5'd10, 5'd0, 16'h0208),    // 28 R10 = 10
    enc_r(FN_OR, 5'd11, 5'd10, 5'd4),       // 2c R11 = 10 | 4 = 14
    enc_j(OP_J, 26'h3fffffc)                // 30 halt loop
  };
  int ucpi [$] = '{5, 5, 3, 3, 5, 5, 3, 5, 5, 3};   // clocks per instruction
  word_t uaddr [$] = '{'h00, 'h04, 'h08, 'h0c, 'h10, 'h14, 'h1c, 'h20, 'h28, 'h2c, 'h30};

  word_t pprog [$] = '{
    enc_i(OP_ADDI, 5'd1, 5'd0, 16'd7),      // 00
    enc_i(OP_ADDI, 5'd2, 5'd0, 16'd3),      // 04
    NOP, NOP, NOP,                          // 08..10
    enc_r(FN_ADD, 5'd3, 5'd1, 5'd2),        // 14 R3 = 10
    enc_r(FN_ADD, 5'd4, 5'd3, 5'd1),        // 18 stale R3: 7
    enc_i(OP_SW, 5'd1, 5'd0, 16'h0100),     // 1c M[100] = R1 = 7
    enc_i(OP_LW, 5'd5, 5'd0, 16'h0100),     // 20 R5 = 7
    enc_j(OP_JAL, 26'd12),                  // 24 -> 34, R31 = 28
    enc_i(OP_ADDI, 5'd6, 5'd0, 16'd1),      // 28 slot
    enc_i(OP_ADDI, 5'd7, 5'd0, 16'd2),      // 2c slot
    enc_i(OP_ADDI, 5'd8, 5'd0, 16'd99),     // 30 skipped
    enc_i(OP_BEQZ, 5'd0, 5'd0, 16'd12),     // 34 taken -> 44
    NOP, NOP,                               // 38 3c
    enc_i(OP_ADDI, 5'd9, 5'd0, 16'd99),     // 40 skipped
    enc_i(OP_BEQZ, 5'd0, 5'd1, 16'd12),     // 44 not taken
    NOP, NOP,                               // 48 4c
    enc_i(OP_ADDI, 5'd17, 5'd0, 16'h0070),  // 50 R17 = 70
    NOP, NOP, NOP,                          // 54..5c
    enc_i(OP_JR, 5'd0, 5'd17, 16'd0),       // 60 -> 70
    NOP, NOP,                               // 64 68
    enc_i(OP_ADDI, 5'd18, 5'd0, 16'd99),    // 6c skipped
    enc_r(FN_ADD, 5'd19, 5'd31, 5'd0),      // 70 R19 = 28
    enc_i(OP_SB, 5'd1, 5'd0, 16'h0141),     // 74 byte 1 of word 140 <- 07
    enc_i(OP_LB, 5'd20, 5'd0, 16'h0141),    // 78 R20 = 7
    enc_j(OP_J, 26'h3fffffc)                // 7c halt loop
  };

  // ---------------------------------------------------------------- counters
  int n_uc_alu = 0, n_uc_j = 0, n_uc_btaken = 0, n_uc_bnot = 0, n_uc_lw = 0, n_uc_sw = 0;
  int n_hw_alu = 0, n_hw_j = 0, n_hw_btaken = 0, n_hw_bnot = 0, n_hw_lw = 0, n_hw_sw = 0;
  int n_pp_redirect = 0, n_pp_hazard = 0, n_pp_slot = 0, n_pp_consec = 0;
  int n_kxs_stall = 0, n_kxp_b2b = 0;
  uaddr_e uip_prev = U_F1, hw_uip_prev = U_F1;
  logic kxp_prev;

  always @(posedge clk) if (!rst) begin
    unique case (uc_uip)
      U_A1: n_uc_alu++;
      U_J3: n_uc_j++;
      U_B3: n_uc_btaken++;
      U_L3: n_uc_lw++;
      U_S3: n_uc_sw++;
      default: ;
    endcase
    // BEQZ not taken: B1 followed directly by F1
    if (uip_prev == U_B1 && uc_uip == U_F1) n_uc_bnot++;
    uip_prev <= uc_uip;
    unique case (hw_uip)
      U_A1: n_hw_alu++;
      U_J3: n_hw_j++;
      U_B3: n_hw_btaken++;
      U_L3: n_hw_lw++;
      U_S3: n_hw_sw++;
      default: ;
    endcase
    if (hw_uip_prev == U_B1 && hw_uip == U_F1) n_hw_bnot++;
    hw_uip_prev <= hw_uip;
    if (pp_redirect) n_pp_redirect++;
    if (kxs_in_valid && !kxs_in_ready) n_kxs_stall++;
    if (kxp_out_valid && kxp_prev) n_kxp_b2b++;
    kxp_prev <= kxp_out_valid;
  end

  // ---------------------------------------------------------------- k*x^4 stream
  logic [W-1:0] xs [NX];
  int s_in = 0, s_out = 0, c_out = 0, p_out = 0;

  function automatic logic [W-1:0] kx4(input logic [W-1:0] xx);
    return kx_k * xx * xx * xx * xx;
  endfunction

  initial begin
    kx_k = 5; kxs_in_valid = 0; kxc_in_valid = 0; kxp_in_valid = 0;
    kxs_x = '0; kxc_x = '0; kxp_x = '0; kxp_prev = 0;
    foreach (xs[i]) xs[i] = W'($urandom);
    wait (!rst);
    for (int cyc = 0; cyc < 4 * NX + 20; cyc++) begin
      kxs_in_valid = (s_in < NX);
      kxs_x = (s_in < NX) ? xs[s_in] : '0;
      kxc_in_valid = (cyc < NX);
      kxc_x = (cyc < NX) ? xs[cyc] : '0;
      kxp_in_valid = (cyc < NX);
      kxp_x = (cyc < NX) ? xs[cyc] : '0;
      #1;
      if (kxs_out_valid) begin chk(kxs_y, kx4(xs[s_out]), "sequential k*x^4"); s_out++; end
      if (kxc_out_valid) begin chk(kxc_y, kx4(xs[c_out]), "combinational k*x^4"); c_out++; end
      if (kxp_out_valid) begin chk(kxp_y, kx4(xs[p_out]), "pipelined k*x^4"); p_out++; end
      if (kxs_in_valid && kxs_in_ready) s_in++;
      @(negedge clk);
    end
    chk(s_out, NX, "sequential results");
    chk(c_out, NX, "combinational results");
    chk(p_out, NX, "pipelined results");
  end

  // ---------------------------------------------------------------- DLX runs
  word_t pregs [32];
  word_t sregs [32];
  int n_sc_retire = 0;
  int pp_wb_cycle [32];

  initial begin
    int cyc, t_prev, idx, hw_t_prev, hw_idx;
    uc_ld_we = 0; uc_ld_addr = 0; uc_ld_data = 0;
    pp_imem_ld_we = 0; pp_imem_ld_addr = 0; pp_imem_ld_data = 0;
    pp_dmem_ld_we = 0; pp_dmem_ld_addr = 0; pp_dmem_ld_data = 0;
    sc_imem_ld_we = 0; sc_imem_ld_addr = 0; sc_imem_ld_data = 0;
    sc_dmem_ld_we = 0; sc_dmem_ld_addr = 0; sc_dmem_ld_data = 0;
    for (int i = 0; i < MEMW; i++) begin
      @(negedge clk);
      uc_ld_we = 1; uc_ld_addr = i * 4;
      uc_ld_data = (i < uprog.size()) ? uprog[i] : (i == 'h200 / 4) ? 7 : (i == 'h204 / 4) ? 3 : '0;
      pp_imem_ld_we = 1; pp_imem_ld_addr = i * 4;
      pp_imem_ld_data = (i < pprog.size()) ? pprog[i] : NOP;
      pp_dmem_ld_we = 1; pp_dmem_ld_addr = i * 4; pp_dmem_ld_data = '0;
      sc_imem_ld_we = 1; sc_imem_ld_addr = i * 4;
      sc_imem_ld_data = (i < pprog.size()) ? pprog[i] : NOP;
      sc_dmem_ld_we = 1; sc_dmem_ld_addr = i * 4; sc_dmem_ld_data = '0;
    end
    @(negedge clk);
    uc_ld_we = 0; pp_imem_ld_we = 0; pp_dmem_ld_we = 0;
    sc_imem_ld_we = 0; sc_dmem_ld_we = 0;
    foreach (sregs[i]) sregs[i] = '0;
    foreach (pregs[i]) begin pregs[i] = '0; pp_wb_cycle[i] = -1; end
    rst = 0;
    t_prev = 0; idx = 0; hw_t_prev = 0; hw_idx = 0;
    for (cyc = 0; cyc < 200; cyc++) begin
      #1;
      if (uc_fetch && idx < uaddr.size()) begin
        chk(uc_ip, uaddr[idx], $sformatf("microcoded IP of instruction %0d", idx));
        if (idx > 0) chk(cyc - t_prev, ucpi[idx - 1], $sformatf("microcoded clocks of instruction %0d", idx - 1));
        t_prev = cyc;
        idx++;
      end
      if (hw_fetch && hw_idx < uaddr.size()) begin
        chk(hw_ip, uaddr[hw_idx], $sformatf("hardwired IP of instruction %0d", hw_idx));
        if (hw_idx > 0)
          chk(cyc - hw_t_prev, ucpi[hw_idx - 1], $sformatf("hardwired clocks of instruction %0d", hw_idx - 1));
        hw_t_prev = cyc;
        hw_idx++;
      end
      if (sc_wb_en) sregs[sc_wb_rd] = sc_wb_data;
      if (sc_retire) n_sc_retire++;
      if (pp_wb_en) begin
        pregs[pp_wb_rd] = pp_wb_data;
        if (pp_wb_cycle[pp_wb_rd] < 0) pp_wb_cycle[pp_wb_rd] = cyc;
      end
      @(negedge clk);
    end
    // microcoded machine
    chk(idx, uaddr.size(), "microcoded instructions fetched");
    chk(dut.u_ucode.u_dp.u_rf.regs[3], 10, "uc ADD");
    chk(dut.u_ucode.u_dp.u_rf.regs[4], 4, "uc SUB");
    chk(dut.u_ucode.u_dp.u_rf.regs[8], 0, "uc branch skipped");
    chk(dut.u_ucode.u_dp.u_rf.regs[9], 0, "uc jump skipped");
    chk(dut.u_ucode.u_dp.u_rf.regs[10], 10, "uc load of stored word");
    chk(dut.u_ucode.u_dp.u_rf.regs[11], 14, "uc OR");
    chk(dut.u_ucode.u_mem.mem['h208 / 4], 10, "uc stored word");
    // hardwired machine: same program, same results
    chk(hw_idx, uaddr.size(), "hardwired instructions fetched");
    chk(dut.u_hw.u_dp.u_rf.regs[3], 10, "hw ADD");
    chk(dut.u_hw.u_dp.u_rf.regs[4], 4, "hw SUB");
    chk(dut.u_hw.u_dp.u_rf.regs[8], 0, "hw branch skipped");
    chk(dut.u_hw.u_dp.u_rf.regs[9], 0, "hw jump skipped");
    chk(dut.u_hw.u_dp.u_rf.regs[10], 10, "hw load of stored word");
    chk(dut.u_hw.u_dp.u_rf.regs[11], 14, "hw OR");
    chk(dut.u_hw.u_mem.mem['h208 / 4], 10, "hw stored word");
    // single-cycle machine: same program, no hazards, no delay slots
    chk(sregs[3], 10, "sc ADD");
    chk(sregs[4], 17, "sc dependent ADD sees the new value");
    chk(sregs[5], 7, "sc LW after SW");
    chk(sregs[6], 0, "sc no delay slot after JAL");
    chk(sregs[7], 0, "sc no delay slot after JAL (2)");
    chk(sregs[8], 0, "sc skipped after JAL");
    chk(sregs[31], 'h28, "sc JAL link");
    chk(sregs[19], 'h28, "sc JR target reached");
    chk(sregs[20], 7, "sc LB after SB");
    chk(n_sc_retire, 200, "sc one instruction per clock");
    // pipelined machine
    chk(pp_wb_cycle[1], 4, "pp first result in clock 4");
    chk(pp_wb_cycle[3], 9, "pp word 5 result in clock 9");
    chk(pp_wb_cycle[4], 10, "pp word 6 result in clock 10 (one per clock)");
    chk(pregs[3], 10, "pp ADD");
    if (pregs[4] == 7) n_pp_hazard++;
    chk(pregs[4], 7, "pp RAW hazard reads old value");
    chk(pregs[5], 7, "pp LW after SW");
    chk(pregs[6], 1, "pp delay slot 1");
    chk(pregs[7], 2, "pp delay slot 2");
    if (pregs[6] == 1 && pregs[7] == 2) n_pp_slot++;
    chk(pregs[8], 0, "pp skipped after JAL");
    chk(pregs[9], 0, "pp skipped after BEQZ");
    chk(pregs[18], 0, "pp skipped after JR");
    chk(pregs[31], 'h28, "pp JAL link");
    chk(pregs[19], 'h28, "pp JR target reached");
    chk(pregs[20], 7, "pp LB after SB");
    chk(dut.u_pipe.u_dmem.mem['h140 / 4], 'h00070000, "pp SB writes one byte lane");
    if (pp_wb_cycle[4] == pp_wb_cycle[3] + 1) n_pp_consec++;
    // mechanisms
    wait (s_out == NX && p_out == NX && c_out == NX);
    checks++;
    if (n_uc_alu == 0 || n_uc_j == 0 || n_uc_btaken == 0 || n_uc_bnot == 0 ||
        n_uc_lw == 0 || n_uc_sw == 0 ||
        n_hw_alu == 0 || n_hw_j == 0 || n_hw_btaken == 0 || n_hw_bnot == 0 ||
        n_hw_lw == 0 || n_hw_sw == 0 || n_pp_redirect < 4 || n_pp_hazard == 0 ||
        n_pp_slot == 0 || n_pp_consec == 0 || sregs[4] != 17 || n_kxs_stall == 0 || n_kxp_b2b == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("mechanisms: uc ALU=%0d J=%0d BEQZ taken=%0d not taken=%0d LW=%0d SW=%0d",
             n_uc_alu, n_uc_j, n_uc_btaken, n_uc_bnot, n_uc_lw, n_uc_sw);
    $display("mechanisms: hw ALU=%0d J=%0d BEQZ taken=%0d not taken=%0d LW=%0d SW=%0d",
             n_hw_alu, n_hw_j, n_hw_btaken, n_hw_bnot, n_hw_lw, n_hw_sw);
    $display("mechanisms: pp redirects=%0d RAW stale reads=%0d delay slots=%0d back-to-back W=%0d",
             n_pp_redirect, n_pp_hazard, n_pp_slot, n_pp_consec);
    $display("mechanisms: kx seq input held off=%0d, pipe consecutive results=%0d",
             n_kxs_stall, n_kxp_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
