// tb_sx_datapath: drives the data path with hand-written control words, one
// per cycle, as the control unit would, and checks registers, memory traffic
// and the decode outputs. A 256-word memory model lives in the testbench
// (combinational read, write at the clock edge). Covers: reset values,
// instruction fetch with PC increment, every input of muxes i, c, x, y, b,
// a, d and j, the ALU path through tbus, a push (SP+1, TS -> mW(SP)), a pop
// into FF, a relative jump and the decode outputs for the byte at BP, then
// 100 random instruction words fetched and taken apart through mux i.
module tb_sx_datapath;
  import sx_pkg::*;
  logic        clk = 0, rst_n = 0;
  ctrl_t       ctrl;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic        mem_we;
  dclass_e     dclass;
  logic [5:0]  dopcode;
  isel_e       disel;
  logic [1:0]  dnext_bp, bp;
  logic        zero;
  logic [31:0] ts_o, sp_o, fp_o, pc_o, aa_o;
  logic [31:0] mem [256];
  int checks = 0, failures = 0;

  sx_datapath #(.STACK_BASE(32'h80), .HEAP_BASE(32'hC0)) dut (.*);

  always #5 clk = ~clk;
  assign mem_rdata = mem[mem_addr[7:0]];
  always @(posedge clk) if (mem_we) mem[mem_addr[7:0]] <= mem_wdata;

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic cyc(input ctrl_t c);
    ctrl = c;
    @(posedge clk); #1;
    ctrl = CTRL_IDLE;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl_t c;
    logic [31:0] w;
    ctrl = CTRL_IDLE;
    for (int i = 0; i < 256; i++) mem[i] = 32'h0;
    mem[0] = {2'b10, 6'(OP_LIT), 8'h2B, 2'b01, 6'(OP_ADD), 2'b00, 6'd0}; // M-S-(end)
    mem[1] = {2'b11, 6'(OP_LIT), 24'hABCDEF};                           // L
    mem[8'h81] = 32'd1000;
    #12;
    chk("reset SP", sp_o, 32'h80); chk("reset FP", fp_o, 32'h80); chk("reset AA", aa_o, 32'hC0);
    chk("reset PC", pc_o, 0); chk("reset TS", ts_o, 0);
    rst_n = 1;

    // fetch word 0: IR <- M[PC], PC <- PC + 1
    c = CTRL_IDLE; c.asel = AS_PC; c.ld_ir = 1; c.esel = ES_ONE; c.jsel = JS_NPC; c.ld_pc = 1;
    cyc(c);
    chk("fetch PC", pc_o, 1);
    chk("decode byte0 class", dclass, DC_M); chk("decode byte0 op", dopcode, OP_LIT);
    chk("decode byte0 isel", disel, IS_B1); chk("decode byte0 next bp", dnext_bp, 2);
    // ARG <- {0, IR[23:16]}, BP <- 2
    c = CTRL_IDLE; c.isel = disel; c.ld_arg = 1; c.csel = CS_2; c.ld_bp = 1; cyc(c);
    chk("bp after M", bp, 2);
    chk("decode byte2 class", dclass, DC_S); chk("decode byte2 op", dopcode, OP_ADD);
    // push: SP+1 ; TS -> mW(SP) ; arg -> TS
    c = CTRL_IDLE; c.xsel = XS_SP; c.alu_op = ALU_INC; c.bsel = BS_TBUS; c.ld_sp = 1; cyc(c);
    chk("SP+1", sp_o, 32'h81);
    c = CTRL_IDLE; c.xsel = XS_SP; c.alu_op = ALU_PASSA; c.asel = AS_TBUS; c.dsel = DS_TS; c.mem_we = 1;

    ctrl = c; #1 chk("write address on abus", mem_addr, 32'h81); chk("din = TS", mem_wdata, 0);
    @(posedge clk); #1 ctrl = CTRL_IDLE;
    chk("pushed word", mem[8'h81], 0);
    c = CTRL_IDLE; c.ysel = YS_ARG; c.alu_op = ALU_PASSB; c.bsel = BS_TBUS; c.ld_ts = 1; cyc(c);
    chk("TS <- arg", ts_o, 32'h2B);
    // BP at 3 -> entry type 0 -> PRE_IF
    c = CTRL_IDLE; c.csel = CS_3; c.ld_bp = 1; cyc(c);
    chk("decode byte3 class", dclass, DC_PRE_IF);
    // mR(SP) -> FF ; alu(TS + FF) -> TS ; SP-1
    mem[8'h81] = 32'd1000;
    c = CTRL_IDLE; c.xsel = XS_SP; c.alu_op = ALU_PASSA; c.asel = AS_TBUS; c.bsel = BS_DBUS; c.ld_ff = 1; cyc(c);
    c = CTRL_IDLE; c.xsel = XS_TS; c.ysel = YS_FF; c.alu_op = ALU_ADD; c.bsel = BS_TBUS; c.ld_ts = 1; cyc(c);
    chk("TS + FF", ts_o, 1000 + 32'h2B);
    c = CTRL_IDLE; c.xsel = XS_SP; c.alu_op = ALU_DEC; c.bsel = BS_TBUS; c.ld_sp = 1; cyc(c);
    chk("SP-1", sp_o, 32'h80);
    // fetch word 1 (L-format), ARG <- IR[23:0]
    c = CTRL_IDLE; c.csel = CS_0; c.ld_bp = 1; cyc(c);
    c = CTRL_IDLE; c.asel = AS_PC; c.ld_ir = 1; c.esel = ES_ONE; c.jsel = JS_NPC; c.ld_pc = 1; cyc(c);
    chk("decode L class", dclass, DC_L); chk("decode L isel", disel, IS_W24);
    // every input of mux i: one operand byte zero-extended, or IR[23:0]
    for (int k = 0; k < 3; k++) begin
      c = CTRL_IDLE; c.isel = isel_e'(k); c.ld_arg = 1; cyc(c);
      c = CTRL_IDLE; c.ysel = YS_ARG; c.alu_op = ALU_PASSB; c.bsel = BS_TBUS; c.ld_ts = 1; cyc(c);
      chk($sformatf("arg <- operand byte %0d", k + 1), ts_o, (32'hABCDEF >> (16 - 8*k)) & 32'hFF);
    end
    c = CTRL_IDLE; c.isel = IS_W24; c.ld_arg = 1; cyc(c);
    // p2 = arg and p2 = arg[23:2]
    c = CTRL_IDLE; c.ysel = YS_ARG; c.alu_op = ALU_PASSB; c.bsel = BS_TBUS; c.ld_nx = 1; cyc(c);
    c = CTRL_IDLE; c.xsel = XS_NX; c.alu_op = ALU_PASSA; c.bsel = BS_TBUS; c.ld_ts = 1; cyc(c);
    chk("NX <- arg, TS <- NX", ts_o, 32'hABCDEF);
    c = CTRL_IDLE; c.ysel = YS_ARGW; c.alu_op = ALU_PASSB; c.bsel = BS_TBUS; c.ld_ts = 1; cyc(c);
    chk("TS <- arg[23:2]", ts_o, 32'hABCDEF >> 2);
    // BP <- arg[1:0]
    c = CTRL_IDLE; c.csel = CS_ARG; c.ld_bp = 1; cyc(c);
    chk("BP <- arg[1:0]", bp, 2'b11);
    // PC -> TS via mux b
    c = CTRL_IDLE; c.bsel = BS_PC; c.ld_ts = 1; cyc(c);
    chk("TS <- PC", ts_o, 2);
    // FP -> din (mux d); AA path; FP load
    c = CTRL_IDLE; c.xsel = XS_TS; c.ysel = YS_AA; c.alu_op = ALU_ADD; c.bsel = BS_TBUS; c.ld_aa = 1; cyc(c);
    chk("AA <- TS + AA", aa_o, 32'hC2);
    c = CTRL_IDLE; c.xsel = XS_TS; c.alu_op = ALU_INC; c.bsel = BS_TBUS; c.ld_fp = 1; cyc(c);
    chk("FP <- TS+1", fp_o, 3);
    c = CTRL_IDLE; c.xsel = XS_SP; c.alu_op = ALU_INC; c.asel = AS_TBUS; c.dsel = DS_FP; c.mem_we = 1; cyc(c);
    chk("FP -> mW(SP+1)", mem[8'h81], 3);
    // jumps: PC <- tbus, then PC <- PC + arg[23:2]
    c = CTRL_IDLE; c.xsel = XS_FP; c.alu_op = ALU_PASSA; c.jsel = JS_TBUS; c.ld_pc = 1; cyc(c);
    chk("PC <- tbus", pc_o, 3);
    c = CTRL_IDLE; c.esel = ES_ARGW; c.jsel = JS_NPC; c.ld_pc = 1; cyc(c);
    chk("PC <- PC + NW (sign-extended)", pc_o, 3 + {{10{1'b1}}, 22'(32'hABCDEF >> 2)});
    // zero flag
    c = CTRL_IDLE; c.xsel = XS_TS; c.alu_op = ALU_SUB; c.ysel = YS_FF; ctrl = c; #1;
    chk("zero flag clear", zero, 0);
    c.alu_op = ALU_EQ; c.xsel = XS_NX; c.ysel = YS_ARG; ctrl = c; #1;
    chk("EQ result", 32'(zero), 0);
    // random words: fetch each, decode byte 0, then route every mux i input,
    // arg[23:2] and arg[1:0] through the data path
    for (int n = 0; n < 100; n++) begin
      w = $urandom;
      mem[pc_o[7:0]] = w;
      c = CTRL_IDLE; c.csel = CS_0; c.ld_bp = 1; cyc(c);
      c = CTRL_IDLE; c.asel = AS_PC; c.ld_ir = 1; c.esel = ES_ONE; c.jsel = JS_NPC; c.ld_pc = 1; cyc(c);
      chk("random byte0 opcode", 32'(dopcode), 32'(w[29:24]));
      chk("random byte0 class", 32'(dclass), 32'(w[31:30]));
      for (int k = 0; k < 4; k++) begin
        c = CTRL_IDLE; c.isel = isel_e'(k); c.ld_arg = 1; cyc(c);
        c = CTRL_IDLE; c.ysel = YS_ARG; c.alu_op = ALU_PASSB; c.bsel = BS_TBUS; c.ld_ts = 1; cyc(c);
        chk($sformatf("random arg, mux i input %0d", k), ts_o,
            (k == 3) ? {8'h0, w[23:0]} : {24'h0, w[23 - 8*k -: 8]});
      end
      c = CTRL_IDLE; c.ysel = YS_ARGW; c.alu_op = ALU_PASSB; c.bsel = BS_TBUS; c.ld_ts = 1; cyc(c);
      chk("random arg[23:2]", ts_o, {10'h0, w[23:2]});
      c = CTRL_IDLE; c.csel = CS_ARG; c.ld_bp = 1; cyc(c);
      chk("random BP <- arg[1:0]", 32'(bp), 32'(w[1:0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
