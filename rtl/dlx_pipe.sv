// dlx_pipe: pipelined DLX implementation.
//
// The sequential datapath is cut by registers into stages of roughly equal
// length at its natural module boundaries:
//   IP  next-instruction-pointer adder and select      -> IP register
//   F   instruction fetch from I-Mem                   -> IR(R), NPC(R)
//   R   register read                                  -> A, B, IR(X), NPC(X)
//   X   execute: ALU on A and B or the IR constant      -> C, D(store), IR(M)
//   M   D-Mem access; load data or C selected           -> D(W), IR(W)
//   W   register write of D(W) into the IR(W) target
// Every signal that travels forward is latched at each stage boundary,
// including a copy of the instruction register per stage, and each stage
// only combines signals of its own stage.
//
// Hazards are not handled in hardware: there is no interlock, squash or
// bypass. Timing that software must respect:
//  * RAW: a result is written at the end of W; a later instruction reads its
//    registers in R, so it sees the new value only if at least three
//    instructions lie between producer and consumer. Closer consumers read
//    the old value.
//  * Control: J, JAL, JR and BEQZ/BNEZ are resolved in X (target from the A
//    register or the IR constant), and IP is loaded at the end of that cycle.
//    The two instructions after a jump or branch are already fetched and
//    always execute (two delay slots).
// Jump/branch targets: J, JAL, BEQZ, BNEZ go to NPC + sign-extended constant
// (NPC = address of the jump + 4); JR goes to A. JAL writes NPC into R31.
//
// Supported: R-type ADD SUB AND OR XOR, ADDI, LW LH LHU LB LBU, SW SH SB,
// J, JAL, JR, BEQZ, BNEZ; other opcodes execute as no-ops. Memory is
// big-endian; half-word accesses use bit 1 of the address, and the low bit
// (and bit 1 for words) is ignored, there is no alignment trap. The all-zero word is a no-op. The
// stage cuts and the datapath follow the pipelined datapath figures; the
// branch stage, the handling of hazards by software and the instruction set
// coverage are this design's choices. I-Mem and D-Mem are loaded through
// their ld_* ports while rst is high; execution starts at address 0.
module dlx_pipe
  import dlx_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     imem_ld_we,
  input  word_t    imem_ld_addr,
  input  word_t    imem_ld_data,
  input  logic     dmem_ld_we,
  input  word_t    dmem_ld_addr,
  input  word_t    dmem_ld_data,
  output word_t    ip,          // address being fetched
  output logic     wb_en,       // register write in W this cycle
  output reg_idx_t wb_rd,
  output word_t    wb_data,
  output logic     redirect     // a jump or taken branch in X this cycle
);

  // ---------------- stage registers
  word_t ir_r, npc_r;                 // F -> R
  word_t a_x, b_x, ir_x, npc_x;       // R -> X
  word_t c_m, d_m, ir_m;              // X -> M
  word_t d_w, ir_w;                   // M -> W

  // ---------------- IP stage (resolves the jump or branch held in X)
  alu_op_e alu_op_x;
  word_t   alu_b_x, alu_y_x;
  logic    alu_z_x;

  word_t imem_do, ip_next, target;
  logic  [5:0] op_x;
  logic  take_x;

  assign op_x = f_op(ir_x);
  always_comb begin
    unique case (op_x)
      OP_J, OP_JAL: take_x = 1'b1;
      OP_JR:        take_x = 1'b1;
      OP_BEQZ:      take_x = alu_z_x;
      OP_BNEZ:      take_x = !alu_z_x;
      default:      take_x = 1'b0;
    endcase
  end
  always_comb begin
    if (op_x == OP_JR)                      target = a_x;
    else if (op_x == OP_J || op_x == OP_JAL) target = npc_x + f_c26(ir_x);
    else                                     target = npc_x + f_c16(ir_x);
  end
  assign ip_next  = take_x ? target : ip + 32'd4;
  assign redirect = take_x;

  always_ff @(posedge clk) begin
    if (rst) ip <= '0;
    else     ip <= ip_next;
  end

  // ---------------- F stage
  dlx_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk(clk), .a(ip), .dout(imem_do), .mw(1'b0), .be(4'h0), .din('0),
    .ld_we(imem_ld_we), .ld_addr(imem_ld_addr), .ld_data(imem_ld_data)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      ir_r  <= '0;
      npc_r <= '0;
    end else begin
      ir_r  <= imem_do;
      npc_r <= ip + 32'd4;
    end
  end

  // ---------------- R stage
  word_t rf_d1, rf_d2;
  reg_idx_t w_rd;
  logic w_en;

  dlx_regfile u_rf (
    .clk(clk), .rst(rst),
    .ra1(f_rs1(ir_r)), .rd1(rf_d1),
    .ra2(f_rs2(ir_r)), .rd2(rf_d2),
    .rw(w_en), .wa(w_rd), .wd(d_w)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      a_x <= '0; b_x <= '0; ir_x <= '0; npc_x <= '0;
    end else begin
      a_x <= rf_d1; b_x <= rf_d2; ir_x <= ir_r; npc_x <= npc_r;
    end
  end

  // ---------------- X stage
  always_comb begin
    alu_op_x = (op_x == OP_SPECIAL) ? func_to_alu(f_func(ir_x)) : ALU_ADD;
    alu_b_x  = (op_x == OP_SPECIAL) ? b_x : f_c16(ir_x);
  end

  dlx_alu u_alu (.op(alu_op_x), .a(a_x), .b(alu_b_x), .y(alu_y_x), .z(alu_z_x));

  always_ff @(posedge clk) begin
    if (rst) begin
      c_m <= '0; d_m <= '0; ir_m <= '0;
    end else begin
      c_m  <= (op_x == OP_JAL) ? npc_x : alu_y_x;
      d_m  <= b_x;
      ir_m <= ir_x;
    end
  end

  // ---------------- M stage
  word_t dmem_do;
  logic  [5:0] op_m;
  assign op_m = f_op(ir_m);

  dlx_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk(clk), .a(c_m), .dout(dmem_do), .mw(is_store(op_m) && !rst),
    .be(store_be(op_m, c_m[1:0])), .din(store_data(op_m, d_m)),
    .ld_we(dmem_ld_we), .ld_addr(dmem_ld_addr), .ld_data(dmem_ld_data)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      d_w <= '0; ir_w <= '0;
    end else begin
      d_w  <= load_result(op_m, c_m[1:0], dmem_do, c_m);
      ir_w <= ir_m;
    end
  end

  // ---------------- W stage
  assign w_rd = dest_reg(ir_w);
  assign w_en = (w_rd != '0);

  assign wb_en   = w_en;
  assign wb_rd   = w_rd;
  assign wb_data = d_w;

endmodule
