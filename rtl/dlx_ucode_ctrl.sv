// dlx_ucode_ctrl: microcoded controller of the single-bus DLX.
//
// Structure: branch logic -> uIP -> control store -> uIR -> control points,
// with an ALU decode that turns the microinstruction's ALU field and the
// instruction's func field into an ALU operation. The control store holds the
// fifteen microinstructions F1..S3 of the microcode table: F1 fetches, D1
// steps IP and reads the operands, then DECODE dispatches on the opcode to
// A1 (register-register ALU op), J1 (J), B1 (BEQZ), L1 (LW) or S1 (SW); every
// routine returns to F1. B1 branches on Z: to B2 when Z = 1, to F1 when Z = 0.
//
// Timing: one microinstruction per clock. The control store is read with the
// address the branch logic selects, and uIP and uIR load together, so uIR
// always holds the word at uIP and drives the datapath during that cycle.
// The branch logic reads the next-address fields of the current word, the
// opcode held in IR and Z (A == 0) of the current cycle.
//
// From the source: the table contents, the block structure and the factoring
// idea (one A1 routine for ADD, SUB, AND, OR, ... via ALU decode). This
// design's choices: the binary encoding of fields, the A1 ALU field reading
// "take the operation from func", reloading B from the register file in S2,
// and unknown opcodes returning to F1 (executed as no-ops).
module dlx_ucode_ctrl
  import dlx_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [5:0]  opcode,  // IR.Op
  input  logic [10:0] func,    // IR.func
  input  logic        z,       // operand A is zero
  output ctrl_t       ctrl,
  output uaddr_e      uip
);

  // Control store: one row of the microcode table per address.
  function automatic uinstr_t cs(input uaddr_e ad);
    uinstr_t u;
    //        BUS       MAS   MW    LIP   LIR   RW    A        B        AF       NEXT
    unique case (ad)
      U_F1: u = '{BUS_IP,   1'b0, 1'b0, 1'b0, 1'b1, 1'b0, LD_BUS,  LD_HOLD, AF_NONE, NX_GOTO,   U_D1, U_D1};
      U_D1: u = '{BUS_ALU,  1'b0, 1'b0, 1'b1, 1'b0, 1'b0, LD_R,    LD_R,    AF_INC4, NX_DECODE, U_F1, U_F1};
      U_A1: u = '{BUS_ALU,  1'b0, 1'b0, 1'b0, 1'b0, 1'b1, LD_HOLD, LD_HOLD, AF_FUNC, NX_GOTO,   U_F1, U_F1};
      U_J1: u = '{BUS_IP,   1'b0, 1'b0, 1'b0, 1'b0, 1'b0, LD_BUS,  LD_HOLD, AF_NONE, NX_GOTO,   U_J2, U_J2};
      U_J2: u = '{BUS_C26,  1'b0, 1'b0, 1'b0, 1'b0, 1'b0, LD_HOLD, LD_BUS,  AF_NONE, NX_GOTO,   U_J3, U_J3};
      U_J3: u = '{BUS_ALU,  1'b0, 1'b0, 1'b1, 1'b0, 1'b0, LD_HOLD, LD_HOLD, AF_ADD,  NX_GOTO,   U_F1, U_F1};
      U_B1: u = '{BUS_IP,   1'b0, 1'b0, 1'b0, 1'b0, 1'b0, LD_BUS,  LD_HOLD, AF_NONE, NX_Z,      U_F1, U_B2};
      U_B2: u = '{BUS_C16,  1'b0, 1'b0, 1'b0, 1'b0, 1'b0, LD_HOLD, LD_BUS,  AF_NONE, NX_GOTO,   U_B3, U_B3};
      U_B3: u = '{BUS_ALU,  1'b0, 1'b0, 1'b1, 1'b0, 1'b0, LD_HOLD, LD_HOLD, AF_ADD,  NX_GOTO,   U_F1, U_F1};
      U_L1: u = '{BUS_C16,  1'b0, 1'b0, 1'b0, 1'b0, 1'b0, LD_HOLD, LD_BUS,  AF_NONE, NX_GOTO,   U_L2, U_L2};
      U_L2: u = '{BUS_ALU,  1'b0, 1'b0, 1'b0, 1'b0, 1'b0, LD_BUS,  LD_HOLD, AF_ADD,  NX_GOTO,   U_L3, U_L3};
      U_L3: u = '{BUS_MEM,  1'b1, 1'b0, 1'b0, 1'b0, 1'b1, LD_HOLD, LD_HOLD, AF_NONE, NX_GOTO,   U_F1, U_F1};
      U_S1: u = '{BUS_C16,  1'b0, 1'b0, 1'b0, 1'b0, 1'b0, LD_HOLD, LD_BUS,  AF_NONE, NX_GOTO,   U_S2, U_S2};
      U_S2: u = '{BUS_ALU,  1'b0, 1'b0, 1'b0, 1'b0, 1'b0, LD_BUS,  LD_R,    AF_ADD,  NX_GOTO,   U_S3, U_S3};
      U_S3: u = '{BUS_NONE, 1'b1, 1'b1, 1'b0, 1'b0, 1'b0, LD_HOLD, LD_HOLD, AF_NONE, NX_GOTO,   U_F1, U_F1};
      default: u = '{BUS_NONE, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, LD_HOLD, LD_HOLD, AF_NONE, NX_GOTO, U_F1, U_F1};
    endcase
    return u;
  endfunction

  uinstr_t uir;
  uaddr_e  unext;

  // uCode branch logic.
  always_comb begin
    unique case (uir.nx)
      NX_DECODE: begin
        case (opcode)
          OP_SPECIAL: unext = U_A1;
          OP_J:       unext = U_J1;
          OP_BEQZ:    unext = U_B1;
          OP_LW:      unext = U_L1;
          OP_SW:      unext = U_S1;
          default:    unext = U_F1;
        endcase
      end
      NX_Z:    unext = z ? uir.nxt_z : uir.nxt;
      default: unext = uir.nxt;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      uip <= U_F1;
      uir <= cs(U_F1);
    end else begin
      uip <= unext;
      uir <= cs(unext);
    end
  end

  // Field decode to control points, including ALU decode.
  always_comb begin
    ctrl      = '0;
    ctrl.eip  = (uir.bus == BUS_IP);
    ctrl.em   = (uir.bus == BUS_MEM);
    ctrl.ei   = (uir.bus == BUS_C16) || (uir.bus == BUS_C26);
    ctrl.ei26 = (uir.bus == BUS_C26);
    ctrl.ea   = (uir.bus == BUS_ALU);
    ctrl.mas  = uir.mas;
    ctrl.mw   = uir.mw;
    ctrl.lip  = uir.lip;
    ctrl.lir  = uir.lir;
    ctrl.rw   = uir.rw;
    ctrl.la   = (uir.a != LD_HOLD);
    ctrl.as   = (uir.a == LD_BUS);
    ctrl.lb   = (uir.b != LD_HOLD);
    ctrl.bs   = (uir.b == LD_BUS);
    unique case (uir.af)
      AF_INC4: ctrl.af = ALU_INC4;
      AF_FUNC: ctrl.af = func_to_alu(func);
      default: ctrl.af = ALU_ADD;
    endcase
  end

endmodule
