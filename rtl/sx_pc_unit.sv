// sx_pc_unit: program counter with its own adder (PC, "+", mux e, mux j).
//
// The adder computes npc = PC + ebus, where mux e gives ebus = 1 (sequential
// fetch, so a fetch takes one cycle) or the word offset NW = arg[23:2] of a
// jump. Mux j loads PC from npc, from tbus (absolute targets: call, return)
// or from the constant 1. These paths follow the published data path. This
// design's choices: the offset arg[23:2] is sign-extended (bit 23), so long
// jumps can go backwards; the offset is relative to the already incremented
// PC, i.e. to the word after the jump; the constant 1 is used as the start
// address after reset; PC itself resets to 0. PC is a word address.
// Timing: one register, loaded at the rising clock edge when `ld` is high.
module sx_pc_unit
  import sx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ld,
  input  jsel_e       jsel,
  input  esel_e       esel,
  input  logic [21:0] argw,   // arg[23:2], the word offset NW
  input  logic [31:0] tbus,
  output logic [31:0] pc
);
  logic [31:0] ebus, npc, jbus;

  assign ebus = (esel == ES_ONE) ? 32'd1 : {{10{argw[21]}}, argw};
  assign npc  = pc + ebus;

  always_comb begin
    unique case (jsel)
      JS_NPC:  jbus = npc;
      JS_TBUS: jbus = tbus;
      default: jbus = 32'd1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  pc <= 32'd0;
    else if (ld) pc <= jbus;
  end
endmodule
