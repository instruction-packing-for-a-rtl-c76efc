// sx_packed_top: the packed-instruction stack processor with its memory.
//
// A 32-bit stack machine whose evaluation stack lives in memory (TS holds the
// top, SP points at the second element). Its instructions are byte codes of
// one, two or four bytes. Instead of giving every instruction a word of its
// own, up to four of them are packed into one 32-bit word; a 2-bit entry type
// in each opcode byte tells the decoder how long each sub-instruction is and
// when the word is used up, and a byte pointer (BP) walks through the word.
// Jump targets carry a byte number (NB) next to the word offset (NW), so a
// jump can land in the middle of a word.
// The top joins the control unit (sx_control), the data path (sx_datapath)
// and memory M (sx_memory). While rst_n is low the core is idle and memory
// can be written through the load port (load_we/load_addr/load_data, which
// takes the memory whenever load_we is high); after
// reset the core starts fetching at word address 1 and runs until its
// decoder meets an entry type that does not fit the byte position (HALT).
// The load port, the memory size, the reset values and the counters
// (dbg_fetches: instruction-word fetches, dbg_instrs: sub-instructions,
// dbg_cycles: cycles since reset until halt) are this design's additions.
module sx_packed_top
  import sx_pkg::*;
#(
  parameter int unsigned MEM_WORDS  = 16384,
  parameter logic [31:0] STACK_BASE = 32'h0000_2000,
  parameter logic [31:0] HEAP_BASE  = 32'h0000_3000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data,
  output logic        halted,
  output logic [31:0] dbg_ts,
  output logic [31:0] dbg_sp,
  output logic [31:0] dbg_fp,
  output logic [31:0] dbg_pc,
  output logic [31:0] dbg_aa,
  output logic [31:0] dbg_fetches,
  output logic [31:0] dbg_instrs,
  output logic [31:0] dbg_cycles
);
  ctrl_t       ctrl;
  dclass_e     dclass;
  logic [5:0]  dopcode;
  isel_e       disel;
  logic [1:0]  dnext_bp, bp;
  logic        zero, fetch, issue;
  logic [31:0] cpu_addr, cpu_wdata, mem_rdata, m_addr, m_wdata;
  logic        cpu_we, m_we;

  sx_control u_ctrl (
    .clk(clk), .rst_n(rst_n), .dclass(dclass), .dopcode(dopcode), .disel(disel),
    .dnext_bp(dnext_bp), .bp(bp), .zero(zero), .ctrl(ctrl), .halted(halted),
    .fetch(fetch), .issue(issue)
  );

  sx_datapath #(.STACK_BASE(STACK_BASE), .HEAP_BASE(HEAP_BASE)) u_dp (
    .clk(clk), .rst_n(rst_n), .ctrl(ctrl),
    .mem_addr(cpu_addr), .mem_wdata(cpu_wdata), .mem_we(cpu_we), .mem_rdata(mem_rdata),
    .dclass(dclass), .dopcode(dopcode), .disel(disel), .dnext_bp(dnext_bp), .bp(bp), .zero(zero),
    .ts_o(dbg_ts), .sp_o(dbg_sp), .fp_o(dbg_fp), .pc_o(dbg_pc), .aa_o(dbg_aa)
  );

  // the load port takes the memory while load_we is high (use it in reset)
  assign m_addr  = load_we ? load_addr : cpu_addr;
  assign m_wdata = load_we ? load_data : cpu_wdata;
  assign m_we    = load_we | cpu_we;

  sx_memory #(.WORDS(MEM_WORDS)) u_mem (
    .clk(clk), .addr(m_addr), .we(m_we), .wdata(m_wdata), .rdata(mem_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dbg_fetches <= '0;
      dbg_instrs  <= '0;
      dbg_cycles  <= '0;
    end else begin
      if (fetch) dbg_fetches <= dbg_fetches + 32'd1;
      if (issue) dbg_instrs  <= dbg_instrs + 32'd1;
      if (!halted) dbg_cycles <= dbg_cycles + 32'd1;
    end
  end
endmodule
