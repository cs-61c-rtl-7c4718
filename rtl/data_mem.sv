// data_mem: the data memory of the MIPS-lite datapath.
//
// A word-wide array of WORDS words (default 1024, 4 KiB; the size is this
// design's choice). The byte address Adr selects the word Adr[.. :2]; the two
// low address bits are ignored and address bits above the array wrap
// around. Reading is combinational, so lw gets its data within the cycle.
// Writing takes Data In on the rising clock edge when WrEn is high. The
// contents are not reset.
module data_mem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic        wr_en,
  input  logic [31:0] adr,
  input  logic [31:0] data_in,
  output logic [31:0] data_out
);

  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [31:0]   mem [WORDS];
  logic [AW-1:0] widx;

  assign widx = adr[AW+1:2];

  always_ff @(posedge clk) begin
    if (wr_en) mem[widx] <= data_in;
  end

  assign data_out = mem[widx];

endmodule
