// dlx_single: combinational (single-cycle) DLX implementation.
//
// Every instruction completes in one clock: IP addresses I-Mem, the fields of
// the instruction address the register file, the ALU works on the register
// operands (or A and the 16-bit constant), D-Mem is read or written at the
// ALU result, and the result is written into the register file at the end of
// the same clock while IP loads the next address. No unit is shared between
// steps and no state is held besides IP, the register file and the memories,
// so there are no hazards; the price is a clock period as long as the whole
// path. It is the machine the pipelined implementation is cut from.
//
// Next IP: IP + 4, or for J, JAL, taken BEQZ/BNEZ IP + 4 + sign-extended
// constant, or for JR the value of R[RS1]. JAL writes IP + 4 into R31.
// Instruction set and encodings are those of the pipelined machine (ADD SUB
// AND OR XOR, ADDI, LW LH LHU LB LBU, SW SH SB, J, JAL, JR, BEQZ, BNEZ;
// others are no-ops); memory is big-endian with byte-enabled stores.
//
// The datapath (IP, adder with a 4 / jump-target input, I-Mem, register file,
// ALU with B-or-constant select, D-Mem, write-back select) follows the
// combinational datapath figure; the instruction set coverage and the target
// arithmetic are this design's choices. I-Mem and D-Mem are loaded through
// ld_* while rst is high; execution starts at address 0. `retire` is high in
// every clock after reset (one instruction per clock).
module dlx_single
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
  output word_t    ip,
  output logic     wb_en,
  output reg_idx_t wb_rd,
  output word_t    wb_data,
  output logic     retire
);

  word_t   ir, npc, rf_d1, rf_d2, alu_b, alu_y, dmem_do, result, target;
  logic    [5:0] op;
  alu_op_e alu_op;
  logic    alu_z, take;

  dlx_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk(clk), .a(ip), .dout(ir), .mw(1'b0), .be(4'h0), .din('0),
    .ld_we(imem_ld_we), .ld_addr(imem_ld_addr), .ld_data(imem_ld_data)
  );

  assign op  = f_op(ir);
  assign npc = ip + 32'd4;

  dlx_regfile u_rf (
    .clk(clk), .rst(rst),
    .ra1(f_rs1(ir)), .rd1(rf_d1),
    .ra2(f_rs2(ir)), .rd2(rf_d2),
    .rw(wb_en && !rst), .wa(wb_rd), .wd(result)
  );

  always_comb begin
    alu_op = (op == OP_SPECIAL) ? func_to_alu(f_func(ir)) : ALU_ADD;
    alu_b  = (op == OP_SPECIAL) ? rf_d2 : f_c16(ir);
  end

  dlx_alu u_alu (.op(alu_op), .a(rf_d1), .b(alu_b), .y(alu_y), .z(alu_z));

  dlx_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk(clk), .a(alu_y), .dout(dmem_do), .mw(is_store(op) && !rst),
    .be(store_be(op, alu_y[1:0])), .din(store_data(op, rf_d2)),
    .ld_we(dmem_ld_we), .ld_addr(dmem_ld_addr), .ld_data(dmem_ld_data)
  );

  assign result  = load_result(op, alu_y[1:0], dmem_do, (op == OP_JAL) ? npc : alu_y);
  assign wb_rd   = dest_reg(ir);
  assign wb_en   = (wb_rd != '0);
  assign wb_data = result;

  always_comb begin
    unique case (op)
      OP_J, OP_JAL, OP_JR: take = 1'b1;
      OP_BEQZ:             take = alu_z;
      OP_BNEZ:             take = !alu_z;
      default:             take = 1'b0;
    endcase
    if (op == OP_JR)                         target = rf_d1;
    else if (op == OP_J || op == OP_JAL)     target = npc + f_c26(ir);
    else                                     target = npc + f_c16(ir);
  end

  always_ff @(posedge clk) begin
    if (rst) ip <= '0;
    else     ip <= take ? target : npc;
  end

  assign retire = !rst;

endmodule
