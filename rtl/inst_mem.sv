// inst_mem: the instruction memory of the MIPS-lite processor.
//
// A word-wide array of WORDS words (default 1024, 4 KiB; the size is this
// design's choice). The instruction at byte address adr is word adr[.. :2],
// read combinationally so the instruction is available in the cycle that
// fetches it; higher address bits wrap around. The processor never writes
// it; a separate load port (ld_we, ld_addr as a word index, ld_data, written
// on the rising clock edge) lets a host place a program in it, normally
// while the processor is held in reset. The contents are not reset.
module inst_mem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic [31:0] adr,
  output logic [31:0] instr,
  input  logic        ld_we,
  input  logic [31:0] ld_addr,
  input  logic [31:0] ld_data
);

  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (ld_we) mem[ld_addr[AW-1:0]] <= ld_data;
  end

  assign instr = mem[adr[AW+1:2]];

endmodule
