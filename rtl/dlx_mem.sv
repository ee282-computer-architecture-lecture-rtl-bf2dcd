// dlx_mem: word-organised memory used as MEM (single-bus machine) and as the
// separate I-Mem and D-Mem of the pipelined machine.
//
// Byte addresses, big-endian: byte 0 of a word is bits 31:24. Reads return
// the whole word (the low two address bits are ignored); writes update the
// bytes selected by the byte enables be[3:0] (be[3] = bits 31:24). Read is
// combinational (address in, DO out in the same cycle, as both the microcode
// step "IR <- M[IP]" and the pipeline's one-cycle fetch need); write happens
// at the rising edge when MW is high. A second write port lets a host load the
// memory; it takes priority. Size is this design's choice (WORDS).
module dlx_mem
  import dlx_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic  clk,
  input  word_t a,        // byte address
  output word_t dout,
  input  logic  mw,       // write enable
  input  logic [3:0] be,  // byte enables of a write
  input  word_t din,
  input  logic  ld_we,    // host load port
  input  word_t ld_addr,  // byte address
  input  word_t ld_data
);

  localparam int unsigned AW = $clog2(WORDS);

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (ld_we) begin
      mem[ld_addr[AW+1:2]] <= ld_data;
    end else if (mw) begin
      for (int i = 0; i < 4; i++)
        if (be[i]) mem[a[AW+1:2]][8*i +: 8] <= din[8*i +: 8];
    end
  end

  assign dout = mem[a[AW+1:2]];

endmodule
