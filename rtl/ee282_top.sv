// ee282_top: the lecture's example machines side by side.
//
//   uc_*   the single-bus, microcoded DLX (one instruction at a time)
//   hw_*   the same single-bus DLX with hardwired control; it has its own
//          memory, loaded through the uc_ld_* port together with the
//          microcoded machine's, so both run the same program
//   sc_*   the single-cycle (combinational) DLX (separate I-Mem and D-Mem)
//   pp_*   the five-stage pipelined DLX cut from it
//   kx_*   three datapaths for y = k*x^4: one multiplier over four clocks
//          (kxs_*), four chained multipliers (kxc_*) and four pipelined
//          multipliers (kxp_*); all three share the k input
// The machines share only the clock and reset; each has its own ports,
// described in its own module.
module ee282_top
  import dlx_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 1024,
  parameter int unsigned KX_W      = 32
) (
  input  logic            clk,
  input  logic            rst,
  // microcoded DLX
  input  logic            uc_ld_we,
  input  word_t           uc_ld_addr,
  input  word_t           uc_ld_data,
  output word_t           uc_ip,
  output uaddr_e          uc_uip,
  output word_t           uc_bus,
  output logic            uc_fetch,
  // single-bus DLX, hardwired control
  output word_t           hw_ip,
  output uaddr_e          hw_uip,
  output word_t           hw_bus,
  output logic            hw_fetch,
  // single-cycle DLX
  input  logic            sc_imem_ld_we,
  input  word_t           sc_imem_ld_addr,
  input  word_t           sc_imem_ld_data,
  input  logic            sc_dmem_ld_we,
  input  word_t           sc_dmem_ld_addr,
  input  word_t           sc_dmem_ld_data,
  output word_t           sc_ip,
  output logic            sc_wb_en,
  output reg_idx_t        sc_wb_rd,
  output word_t           sc_wb_data,
  output logic            sc_retire,
  // pipelined DLX
  input  logic            pp_imem_ld_we,
  input  word_t           pp_imem_ld_addr,
  input  word_t           pp_imem_ld_data,
  input  logic            pp_dmem_ld_we,
  input  word_t           pp_dmem_ld_addr,
  input  word_t           pp_dmem_ld_data,
  output word_t           pp_ip,
  output logic            pp_wb_en,
  output reg_idx_t        pp_wb_rd,
  output word_t           pp_wb_data,
  output logic            pp_redirect,
  // k*x^4 datapaths
  input  logic [KX_W-1:0] kx_k,
  input  logic            kxs_in_valid,
  output logic            kxs_in_ready,
  input  logic [KX_W-1:0] kxs_x,
  output logic            kxs_out_valid,
  output logic [KX_W-1:0] kxs_y,
  input  logic            kxc_in_valid,
  input  logic [KX_W-1:0] kxc_x,
  output logic            kxc_out_valid,
  output logic [KX_W-1:0] kxc_y,
  input  logic            kxp_in_valid,
  input  logic [KX_W-1:0] kxp_x,
  output logic            kxp_out_valid,
  output logic [KX_W-1:0] kxp_y
);

  dlx_ucode #(.MEM_WORDS(MEM_WORDS)) u_ucode (
    .clk(clk), .rst(rst),
    .ld_we(uc_ld_we), .ld_addr(uc_ld_addr), .ld_data(uc_ld_data),
    .ip(uc_ip), .uip(uc_uip), .bus(uc_bus), .fetch(uc_fetch)
  );

  dlx_ucode #(.MEM_WORDS(MEM_WORDS), .HARDWIRED(1'b1)) u_hw (
    .clk(clk), .rst(rst),
    .ld_we(uc_ld_we), .ld_addr(uc_ld_addr), .ld_data(uc_ld_data),
    .ip(hw_ip), .uip(hw_uip), .bus(hw_bus), .fetch(hw_fetch)
  );

  dlx_single #(.IMEM_WORDS(MEM_WORDS), .DMEM_WORDS(MEM_WORDS)) u_single (
    .clk(clk), .rst(rst),
    .imem_ld_we(sc_imem_ld_we), .imem_ld_addr(sc_imem_ld_addr), .imem_ld_data(sc_imem_ld_data),
    .dmem_ld_we(sc_dmem_ld_we), .dmem_ld_addr(sc_dmem_ld_addr), .dmem_ld_data(sc_dmem_ld_data),
    .ip(sc_ip), .wb_en(sc_wb_en), .wb_rd(sc_wb_rd), .wb_data(sc_wb_data), .retire(sc_retire)
  );

  dlx_pipe #(.IMEM_WORDS(MEM_WORDS), .DMEM_WORDS(MEM_WORDS)) u_pipe (
    .clk(clk), .rst(rst),
    .imem_ld_we(pp_imem_ld_we), .imem_ld_addr(pp_imem_ld_addr), .imem_ld_data(pp_imem_ld_data),
    .dmem_ld_we(pp_dmem_ld_we), .dmem_ld_addr(pp_dmem_ld_addr), .dmem_ld_data(pp_dmem_ld_data),
    .ip(pp_ip), .wb_en(pp_wb_en), .wb_rd(pp_wb_rd), .wb_data(pp_wb_data),
    .redirect(pp_redirect)
  );

  kx4_seq #(.W(KX_W)) u_kxs (
    .clk(clk), .rst(rst), .k(kx_k), .in_valid(kxs_in_valid), .in_ready(kxs_in_ready),
    .x(kxs_x), .out_valid(kxs_out_valid), .y(kxs_y)
  );

  kx4_comb #(.W(KX_W)) u_kxc (
    .clk(clk), .rst(rst), .k(kx_k), .in_valid(kxc_in_valid),
    .x(kxc_x), .out_valid(kxc_out_valid), .y(kxc_y)
  );

  kx4_pipe #(.W(KX_W)) u_kxp (
    .clk(clk), .rst(rst), .k(kx_k), .in_valid(kxp_in_valid),
    .x(kxp_x), .out_valid(kxp_out_valid), .y(kxp_y)
  );

endmodule
