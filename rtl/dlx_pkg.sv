// dlx_pkg: types and constants shared by the two DLX machines.
//
// Instruction formats follow the three printed layouts: J-type
// (Op 6 | Const 26), I-type (Op 6 | RS1 5 | RD 5 | Const 16) and R-type
// (Op 6 | RS1 5 | RS2 5 | RD 5 | func 11), 32 bits in all. The numeric opcode
// and function codes are not part of the source material; they are taken from
// the published DLX encoding (SPECIAL = 0 for register-register operations).
package dlx_pkg;

  localparam int unsigned XLEN = 32;
  localparam int unsigned NREGS = 32;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0] reg_idx_t;

  typedef enum logic [5:0] {
    OP_SPECIAL = 6'h00,  // R-type, operation in func
    OP_J       = 6'h02,
    OP_JAL     = 6'h03,
    OP_BEQZ    = 6'h04,
    OP_BNEZ    = 6'h05,
    OP_ADDI    = 6'h08,
    OP_JR      = 6'h12,
    OP_LB      = 6'h20,
    OP_LH      = 6'h21,
    OP_LW      = 6'h23,
    OP_LBU     = 6'h24,
    OP_LHU     = 6'h25,
    OP_SB      = 6'h28,
    OP_SH      = 6'h29,
    OP_SW      = 6'h2B
  } opcode_e;

  typedef enum logic [10:0] {
    FN_ADD = 11'h020,
    FN_SUB = 11'h022,
    FN_AND = 11'h024,
    FN_OR  = 11'h025,
    FN_XOR = 11'h026
  } func_e;

  // Operation performed by the ALU.
  typedef enum logic [2:0] {
    ALU_ADD,
    ALU_SUB,
    ALU_AND,
    ALU_OR,
    ALU_XOR,
    ALU_INC4   // A + 4, used to step the instruction pointer
  } alu_op_e;

  // Field extraction. I-type RD sits where R-type RS2 sits.
  function automatic logic [5:0] f_op(input word_t ir);
    return ir[31:26];
  endfunction
  function automatic reg_idx_t f_rs1(input word_t ir);
    return ir[25:21];
  endfunction
  function automatic reg_idx_t f_rs2(input word_t ir);
    return ir[20:16];
  endfunction
  function automatic reg_idx_t f_rd_r(input word_t ir);
    return ir[15:11];
  endfunction
  function automatic reg_idx_t f_rd_i(input word_t ir);
    return ir[20:16];
  endfunction
  function automatic logic [10:0] f_func(input word_t ir);
    return ir[10:0];
  endfunction
  function automatic word_t f_c16(input word_t ir);
    return {{16{ir[15]}}, ir[15:0]};
  endfunction
  function automatic word_t f_c26(input word_t ir);
    return {{6{ir[25]}}, ir[25:0]};
  endfunction

  // ALU decode of an R-type function field; unknown codes add.
  function automatic alu_op_e func_to_alu(input logic [10:0] fn);
    case (fn)
      FN_ADD:  return ALU_ADD;
      FN_SUB:  return ALU_SUB;
      FN_AND:  return ALU_AND;
      FN_OR:   return ALU_OR;
      FN_XOR:  return ALU_XOR;
      default: return ALU_ADD;
    endcase
  endfunction

  // Instruction builders (used by testbenches to assemble programs).
  function automatic word_t enc_r(input logic [10:0] fn, input reg_idx_t rd,
                                  input reg_idx_t rs1, input reg_idx_t rs2);
    return {OP_SPECIAL, rs1, rs2, rd, fn};
  endfunction
  function automatic word_t enc_i(input opcode_e op, input reg_idx_t rd,
                                  input reg_idx_t rs1, input logic [15:0] c);
    return {op, rs1, rd, c};
  endfunction
  function automatic word_t enc_j(input opcode_e op, input logic [25:0] c);
    return {op, c};
  endfunction

  // ---------------------------------------------------------------------
  // Single-bus machine: control points of the datapath (one per control
  // input of the datapath figure).
  typedef struct packed {
    logic    eip;   // IP drives the bus
    logic    em;    // memory data out drives the bus
    logic    ei;    // IR constant drives the bus
    logic    ei26;  // ... the 26-bit constant (else the 16-bit one)
    logic    ea;    // ALU output drives the bus
    logic    mas;   // memory address select: 0 = IP, 1 = A
    logic    mw;    // memory write
    logic    lip;   // load IP from the bus
    logic    lir;   // load IR from memory data out
    logic    rw;    // write bus into R[IR.RD]
    logic    la;    // load A
    logic    as;    // A source: 0 = register file, 1 = bus
    logic    lb;    // load B
    logic    bs;    // B source: 0 = register file, 1 = bus
    alu_op_e af;    // ALU function
  } ctrl_t;

  // Microprogram addresses (states of the microcode table).
  typedef enum logic [3:0] {
    U_F1, U_D1, U_A1, U_J1, U_J2, U_J3, U_B1, U_B2, U_B3,
    U_L1, U_L2, U_L3, U_S1, U_S2, U_S3
  } uaddr_e;

  // Microinstruction fields, one per column of the microcode table.
  typedef enum logic [2:0] {BUS_NONE, BUS_IP, BUS_ALU, BUS_C16, BUS_C26, BUS_MEM} ubus_e;
  typedef enum logic [1:0] {LD_HOLD, LD_BUS, LD_R} uld_e;
  typedef enum logic [1:0] {AF_NONE, AF_INC4, AF_ADD, AF_FUNC} uaf_e;
  typedef enum logic [1:0] {NX_GOTO, NX_DECODE, NX_Z} unx_e;

  typedef struct packed {
    ubus_e  bus;
    logic   mas;
    logic   mw;
    logic   lip;
    logic   lir;
    logic   rw;
    uld_e   a;
    uld_e   b;
    uaf_e   af;
    unx_e   nx;     // how the next address is chosen
    uaddr_e nxt;    // GOTO target, or target of NX_Z when Z = 0
    uaddr_e nxt_z;  // target of NX_Z when Z = 1
  } uinstr_t;

  // ---------------------------------------------------------------------
  // Load/store lanes (big-endian: the byte at offset o is bits 8*(3-o)+7:8*(3-o))
  // and register-write destination, shared by the single-cycle and pipelined
  // machines.
  function automatic logic is_store(input logic [5:0] op);
    return (op == OP_SW) || (op == OP_SH) || (op == OP_SB);
  endfunction

  function automatic logic [3:0] store_be(input logic [5:0] op, input logic [1:0] off);
    case (op)
      OP_SB:   return 4'b1000 >> off;
      OP_SH:   return off[1] ? 4'b0011 : 4'b1100;
      default: return 4'b1111;
    endcase
  endfunction

  function automatic word_t store_data(input logic [5:0] op, input word_t d);
    case (op)
      OP_SB:   return {4{d[7:0]}};
      OP_SH:   return {2{d[15:0]}};
      default: return d;
    endcase
  endfunction

  // Result of a load (or `other` for any non-load instruction).
  function automatic word_t load_result(input logic [5:0] op, input logic [1:0] off,
                                        input word_t mem_word, input word_t other);
    logic [7:0]  bt;
    logic [15:0] hf;
    bt = mem_word[{~off, 3'b000} +: 8];
    hf = off[1] ? mem_word[15:0] : mem_word[31:16];
    case (op)
      OP_LW:   return mem_word;
      OP_LB:   return {{24{bt[7]}}, bt};
      OP_LBU:  return {24'b0, bt};
      OP_LH:   return {{16{hf[15]}}, hf};
      OP_LHU:  return {16'b0, hf};
      default: return other;
    endcase
  endfunction

  // Register written by an instruction; 0 when it writes none.
  function automatic reg_idx_t dest_reg(input word_t ir);
    case (f_op(ir))
      OP_SPECIAL:                                  return f_rd_r(ir);
      OP_ADDI, OP_LW, OP_LH, OP_LB, OP_LHU, OP_LBU: return f_rd_i(ir);
      OP_JAL:                                      return 5'd31;
      default:                                     return 5'd0;
    endcase
  endfunction

endpackage
