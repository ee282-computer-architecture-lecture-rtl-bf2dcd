// dlx_bus_datapath: the single-bus DLX datapath.
//
// Registers IP, IR, A and B, the register file and one ALU, joined by one
// shared bus. Four drivers can put a value on the bus: IP (EIP), memory data
// out (EM), a sign-extended IR constant (EI; 16- or 26-bit) and the ALU
// output (EA). At most one is enabled per cycle (checked by an assertion);
// with none enabled the bus reads 0. The memory address is IP or A (MAS); the
// memory write data is B. A loads from the register file (RS1) or the bus,
// B from the register file (bits 20:16, RS2 or the I-type RD) or the bus. A
// register write takes the bus into R[IR.RD], where RD is bits 15:11 for an
// R-type instruction and bits 20:16 otherwise. The ALU reads A and B; Z flags
// A == 0. All loads happen at the rising clock edge.
//
// The register set, control points and connections follow the datapath
// figure; the bus built as a multiplexer and the field positions of RD are
// this design's reading of it.
module dlx_bus_datapath
  import dlx_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  ctrl_t       ctrl,
  // memory port
  output word_t       mem_a,
  output word_t       mem_di,
  output logic        mem_w,
  input  word_t       mem_do,
  // to the controller
  output logic [5:0]  opcode,
  output logic [10:0] func,
  output logic        z,
  // observation
  output word_t       ip_o,
  output word_t       bus_o
);

  word_t ip, ir, a, b, bus, alu_y, rf_d1, rf_d2;
  reg_idx_t rd_sel;

  always_comb begin
    unique case (1'b1)
      ctrl.eip: bus = ip;
      ctrl.em:  bus = mem_do;
      ctrl.ei:  bus = ctrl.ei26 ? f_c26(ir) : f_c16(ir);
      ctrl.ea:  bus = alu_y;
      default:  bus = '0;
    endcase
  end

  assign rd_sel = (f_op(ir) == OP_SPECIAL) ? f_rd_r(ir) : f_rd_i(ir);

  dlx_regfile u_rf (
    .clk(clk), .rst(rst),
    .ra1(f_rs1(ir)), .rd1(rf_d1),
    .ra2(f_rs2(ir)), .rd2(rf_d2),
    .rw(ctrl.rw), .wa(rd_sel), .wd(bus)
  );

  dlx_alu u_alu (.op(ctrl.af), .a(a), .b(b), .y(alu_y), .z(z));

  always_ff @(posedge clk) begin
    if (rst) begin
      ip <= '0;
      ir <= '0;
      a  <= '0;
      b  <= '0;
    end else begin
      if (ctrl.lip) ip <= bus;
      if (ctrl.lir) ir <= mem_do;
      if (ctrl.la)  a  <= ctrl.as ? bus : rf_d1;
      if (ctrl.lb)  b  <= ctrl.bs ? bus : rf_d2;
    end
  end

  assign mem_a  = ctrl.mas ? a : ip;
  assign mem_di = b;
  assign mem_w  = ctrl.mw;
  assign opcode = f_op(ir);
  assign func   = f_func(ir);
  assign ip_o   = ip;
  assign bus_o  = bus;

  // Only one driver may own the bus.
  a_bus_onehot: assert property (@(posedge clk) disable iff (rst)
    $onehot0({ctrl.eip, ctrl.em, ctrl.ei, ctrl.ea}));

endmodule
