// dlx_hw_ctrl: hardwired controller of the single-bus DLX.
//
// Performs the same register-transfer sequences as the microcoded controller
// (dlx_ucode_ctrl) with the same interface and timing, but without a control
// store: a state register holds the step (F1..S3), each control point is an
// OR of the states in which it is active, and the next state is decoded from
// the state, the opcode and Z. One step per clock; the control points of the
// current state are driven during that clock.
//
// The sequences (F1, D1, then A1 / J1-J3 / B1[-B3] / L1-L3 / S1-S3) and the
// control points they use are those of the microcode table; building them as
// decoded logic is the hardwired end of the range between microcode and
// hardwired control. The state encoding and the logic form are this design's
// choices; like the microcode, unknown opcodes return to F1.
module dlx_hw_ctrl
  import dlx_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [5:0]  opcode,
  input  logic [10:0] func,
  input  logic        z,
  output ctrl_t       ctrl,
  output uaddr_e      uip      // current state, same encoding as the microcode address
);

  uaddr_e st, nst;

  always_ff @(posedge clk) begin
    if (rst) st <= U_F1;
    else     st <= nst;
  end

  always_comb begin
    unique case (st)
      U_F1: nst = U_D1;
      U_D1: begin
        case (opcode)
          OP_SPECIAL: nst = U_A1;
          OP_J:       nst = U_J1;
          OP_BEQZ:    nst = U_B1;
          OP_LW:      nst = U_L1;
          OP_SW:      nst = U_S1;
          default:    nst = U_F1;
        endcase
      end
      U_J1: nst = U_J2;
      U_J2: nst = U_J3;
      U_B1: nst = z ? U_B2 : U_F1;
      U_B2: nst = U_B3;
      U_L1: nst = U_L2;
      U_L2: nst = U_L3;
      U_S1: nst = U_S2;
      U_S2: nst = U_S3;
      default: nst = U_F1;   // A1, J3, B3, L3, S3
    endcase
  end

  // Control points as sums of states.
  always_comb begin
    ctrl      = '0;
    ctrl.eip  = st inside {U_F1, U_J1, U_B1};
    ctrl.em   = (st == U_L3);
    ctrl.ei   = st inside {U_J2, U_B2, U_L1, U_S1};
    ctrl.ei26 = (st == U_J2);
    ctrl.ea   = st inside {U_D1, U_A1, U_J3, U_B3, U_L2, U_S2};
    ctrl.mas  = st inside {U_L3, U_S3};
    ctrl.mw   = (st == U_S3);
    ctrl.lip  = st inside {U_D1, U_J3, U_B3};
    ctrl.lir  = (st == U_F1);
    ctrl.rw   = st inside {U_A1, U_L3};
    ctrl.la   = st inside {U_F1, U_D1, U_J1, U_B1, U_L2, U_S2};
    ctrl.as   = st inside {U_F1, U_J1, U_B1, U_L2, U_S2};
    ctrl.lb   = st inside {U_D1, U_J2, U_B2, U_L1, U_S1, U_S2};
    ctrl.bs   = st inside {U_J2, U_B2, U_L1, U_S1};
    if (st == U_D1)      ctrl.af = ALU_INC4;
    else if (st == U_A1) ctrl.af = func_to_alu(func);
    else                 ctrl.af = ALU_ADD;
  end

  assign uip = st;

endmodule
