// dlx_regfile: the DLX general register file.
//
// 31 general registers R1..R31; R0 always reads 0 and ignores writes. Two
// combinational read ports (RS1, RS2 fields) and one write port, written at
// the rising clock edge when RW is high. A read in the same cycle as a write
// to the same register returns the old value: there is no write-through, so in
// the pipelined machine a reader must be at least four instructions behind
// the writer (the RAW hazard of the pipeline diagrams). Register count and R0
// behaviour follow the ISA description; port count follows the datapath
// figures; reset clears all registers (a choice of this design).
module dlx_regfile
  import dlx_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  reg_idx_t ra1,
  output word_t    rd1,
  input  reg_idx_t ra2,
  output word_t    rd2,
  input  logic     rw,     // write enable (RW control point)
  input  reg_idx_t wa,
  input  word_t    wd
);

  word_t regs [1:NREGS-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 1; i < NREGS; i++) regs[i] <= '0;
    end else if (rw && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == '0) ? '0 : regs[ra1];
  assign rd2 = (ra2 == '0) ? '0 : regs[ra2];

endmodule
