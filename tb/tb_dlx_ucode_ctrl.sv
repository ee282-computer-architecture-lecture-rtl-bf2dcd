// tb_dlx_ucode_ctrl: holds each opcode (and Z) at the controller's inputs
// and checks the microinstruction sequence it steps through and the control
// points of every step against the microcode table as transcribed here.
// It then rebuilds the reservation tables of ADD and JUMP (bus, memory and
// ALU use per state) from the control points and compares them with the
// lecture's tables.
module tb_dlx_ucode_ctrl;
  import dlx_pkg::*;
  logic clk = 0, rst = 1;
  logic [5:0] opcode;
  logic [10:0] func;
  logic z;
  ctrl_t ctrl;
  uaddr_e uip;
  int checks = 0, failures = 0;

  dlx_ucode_ctrl dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected control points of a state: {eip,em,ei,ei26,ea,mas,mw,lip,lir,rw,la,as,lb,bs}
  function automatic logic [13:0] exp_bits(uaddr_e s);
    case (s)
      U_F1: return 14'b1000_0000_1011_00;
      U_D1: return 14'b0000_1001_0010_10;
      U_A1: return 14'b0000_1000_0100_00;
      U_J1: return 14'b1000_0000_0011_00;
      U_J2: return 14'b0011_0000_0000_11;
      U_J3: return 14'b0000_1001_0000_00;
      U_B1: return 14'b1000_0000_0011_00;
      U_B2: return 14'b0010_0000_0000_11;
      U_B3: return 14'b0000_1001_0000_00;
      U_L1: return 14'b0010_0000_0000_11;
      U_L2: return 14'b0000_1000_0011_00;
      U_L3: return 14'b0100_0100_0100_00;
      U_S1: return 14'b0010_0000_0000_11;
      U_S2: return 14'b0000_1000_0011_10;
      U_S3: return 14'b0000_0110_0000_00;
      default: return '0;
    endcase
  endfunction

  task automatic run(input logic [5:0] op, input logic [10:0] fn, input logic zz,
                     input uaddr_e seq [$], input alu_op_e last_af);
    opcode = op; func = fn; z = zz;
    foreach (seq[i]) begin
      #1;
      checks++;
      if (uip !== seq[i] ||
          {ctrl.eip, ctrl.em, ctrl.ei, ctrl.ei26, ctrl.ea, ctrl.mas, ctrl.mw, ctrl.lip,
           ctrl.lir, ctrl.rw, ctrl.la, ctrl.as, ctrl.lb, ctrl.bs} !== exp_bits(seq[i])) begin
        failures++;
        $display("FAIL op=%h step %0d: uip=%s expected %s", op, i, uip.name(), seq[i].name());
      end
      if (seq[i] == U_D1) begin
        checks++;
        if (ctrl.af !== ALU_INC4) begin failures++; $display("FAIL D1 ALU function"); end
      end
      if (seq[i] inside {U_A1, U_J3, U_B3, U_L2, U_S2}) begin
        checks++;
        if (ctrl.af !== last_af) begin
          failures++;
          $display("FAIL op=%h %s ALU function %s expected %s", op, uip.name(), ctrl.af.name(), last_af.name());
        end
      end
      @(posedge clk);
    end
    #1;
    checks++;
    if (uip !== U_F1) begin failures++; $display("FAIL op=%h did not return to F1", op); end
  endtask

  // Reservation table of one instruction: per state, "X" where the bus, the
  // memory or the ALU is in use. The bus is in use when any driver is on;
  // memory when IR is fetched, data is read or a store writes; the ALU when
  // its result is driven onto the bus (EA).
  task automatic restab(input logic [5:0] op, input logic [10:0] fn, input int n,
                        input string exp_bus, input string exp_mem, input string exp_alu);
    string bus_s = "", mem_s = "", alu_s = "";
    opcode = op; func = fn; z = 0;
    repeat (n) begin
      #1;
      bus_s = {bus_s, (ctrl.eip | ctrl.em | ctrl.ei | ctrl.ea) ? "X" : "."};
      mem_s = {mem_s, (ctrl.lir | ctrl.em | ctrl.mw) ? "X" : "."};
      alu_s = {alu_s, ctrl.ea ? "X" : "."};
      @(posedge clk);
    end
    checks += 3;
    if (bus_s != exp_bus) begin failures++; $display("FAIL op=%h BUS %s expected %s", op, bus_s, exp_bus); end
    if (mem_s != exp_mem) begin failures++; $display("FAIL op=%h MEM %s expected %s", op, mem_s, exp_mem); end
    if (alu_s != exp_alu) begin failures++; $display("FAIL op=%h ALU %s expected %s", op, alu_s, exp_alu); end
  endtask

  initial begin
    opcode = 0; func = 0; z = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    run(OP_SPECIAL, FN_ADD, 0, '{U_F1, U_D1, U_A1}, ALU_ADD);
    run(OP_SPECIAL, FN_SUB, 1, '{U_F1, U_D1, U_A1}, ALU_SUB);
    run(OP_SPECIAL, FN_AND, 0, '{U_F1, U_D1, U_A1}, ALU_AND);
    run(OP_SPECIAL, FN_OR,  0, '{U_F1, U_D1, U_A1}, ALU_OR);
    run(OP_SPECIAL, FN_XOR, 0, '{U_F1, U_D1, U_A1}, ALU_XOR);
    run(OP_J,    FN_SUB, 0, '{U_F1, U_D1, U_J1, U_J2, U_J3}, ALU_ADD);
    run(OP_BEQZ, FN_SUB, 1, '{U_F1, U_D1, U_B1, U_B2, U_B3}, ALU_ADD);
    run(OP_BEQZ, FN_SUB, 0, '{U_F1, U_D1, U_B1}, ALU_ADD);
    run(OP_LW,   FN_SUB, 0, '{U_F1, U_D1, U_L1, U_L2, U_L3}, ALU_ADD);
    run(OP_SW,   FN_SUB, 1, '{U_F1, U_D1, U_S1, U_S2, U_S3}, ALU_ADD);
    run(6'h3f,   FN_ADD, 0, '{U_F1, U_D1}, ALU_ADD);
    // the two reservation tables of the lecture: ADD (F1 D1 A1), JUMP (F1 D1 J1 J2 J3)
    restab(OP_SPECIAL, FN_ADD, 3, "XXX", "X..", ".XX");
    restab(OP_J,       FN_ADD, 5, "XXXXX", "X....", ".X..X");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
