// dlx_ucode: the simple DLX implementation: one bus, one ALU, one memory and
// sequential execution of one instruction at a time under microcode.
//
// Cycle counts per instruction (microinstructions from the microcode table):
// register-register ALU op 3 (F1 D1 A1), J 5 (F1 D1 J1 J2 J3), BEQZ 3 when
// not taken or 5 when taken (F1 D1 B1 [B2 B3]), LW 5 (F1 D1 L1 L2 L3), SW 5
// (F1 D1 S1 S2 S3). Jumps and branches are relative to the address of the
// next instruction: target = IP + 4 + sign-extended constant.
//
// HARDWIRED selects the hardwired controller, which runs the same sequences
// with the same clock counts; the default is the microcoded one.
//
// The memory is loaded through ld_* while rst is high (a host port of this
// design). Execution starts at address 0 when rst falls. `bus` shows the
// value on the shared bus. `fetch` is high in
// every cycle that executes F1, i.e. once per instruction.
module dlx_ucode
  import dlx_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 1024,
  parameter bit          HARDWIRED = 1'b0   // 1: hardwired controller instead of microcode
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   ld_we,
  input  word_t  ld_addr,
  input  word_t  ld_data,
  output word_t  ip,
  output uaddr_e uip,
  output word_t  bus,
  output logic   fetch
);

  ctrl_t       ctrl;
  word_t       mem_a, mem_di, mem_do;
  logic        mem_w, z;
  logic [5:0]  opcode;
  logic [10:0] func;

  if (HARDWIRED) begin : g_hw
    dlx_hw_ctrl u_ctrl (
      .clk(clk), .rst(rst), .opcode(opcode), .func(func), .z(z),
      .ctrl(ctrl), .uip(uip)
    );
  end else begin : g_uc
    dlx_ucode_ctrl u_ctrl (
      .clk(clk), .rst(rst), .opcode(opcode), .func(func), .z(z),
      .ctrl(ctrl), .uip(uip)
    );
  end

  dlx_bus_datapath u_dp (
    .clk(clk), .rst(rst), .ctrl(ctrl),
    .mem_a(mem_a), .mem_di(mem_di), .mem_w(mem_w), .mem_do(mem_do),
    .opcode(opcode), .func(func), .z(z), .ip_o(ip), .bus_o(bus)
  );

  dlx_mem #(.WORDS(MEM_WORDS)) u_mem (
    .clk(clk), .a(mem_a), .dout(mem_do), .mw(mem_w && !rst), .be(4'hf), .din(mem_di),
    .ld_we(ld_we), .ld_addr(ld_addr), .ld_data(ld_data)
  );

  assign fetch = (uip == U_F1) && !rst;

endmodule
