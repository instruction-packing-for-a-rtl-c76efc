// sx_memory: memory M, shared by code and data (evaluation stack, frames,
// heap). 32-bit words, word addressed; only the low $clog2(WORDS) address bits
// are used. Reads are combinational (mR completes in the same control step
// that presents the address, as the published control steps require);
// writes (mW) happen at the rising clock edge when `we` is high. The size is
// this design's choice. Contents are not reset; a program is written through
// the same port before the processor leaves reset.
module sx_memory #(
  parameter int unsigned WORDS = 16384
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic        we,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];
  logic [AW-1:0] a;

  assign a     = addr[AW-1:0];
  assign rdata = mem[a];

  always_ff @(posedge clk) begin
    if (we) mem[a] <= wdata;
  end
endmodule
