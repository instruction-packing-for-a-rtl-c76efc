// tb_sx_control: tests the control unit on its own. The testbench plays the
// data path: it presents a decode result (class, opcode, operand select,
// next byte pointer) whenever the unit is in its first decode state, holds
// BP and the ALU zero flag at chosen values, and checks
//  - the start-up sequence (PC <- 1, then a fetch with PC increment),
//  - the decode states: entry type 0 -> PRE_IF (BP <- 0, then fetch),
//    M/L load ARG with the given select, the second decode state loads BP,
//    an illegal position -> HALT,
//  - the number of execute steps of every instruction (table below),
//  - the state after an instruction: decode the same word when BP != 0,
//    fetch when BP == 0 or after a taken jump, call or return,
//  - conditional jumps taken / not taken, and both return paths.
module tb_sx_control;
  import sx_pkg::*;
  logic       clk = 0, rst_n = 0;
  dclass_e    dclass = DC_S;
  logic [5:0] dopcode = '0;
  isel_e      disel = IS_B1;
  logic [1:0] dnext_bp = '0, bp = '0;
  logic       zero = 0;
  ctrl_t      ctrl;
  logic       halted, fetch, issue;
  int checks = 0, failures = 0;

  sx_control dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  // state numbers: START 0, IF 1, ID0 2, ID1 3, PRE_IF 4, EX 5, HALT 6
  function automatic int st();
    return int'(dut.state);
  endfunction

  task automatic go_to_id0();
    int n = 0;
    while (st() != 2 && n < 20) begin @(posedge clk); #1; n++; end
  endtask

  // Run one instruction from ID0. zval is the ALU zero flag the data path
  // would give. Returns the execute-step count, whether PC was loaded and
  // the state reached after the instruction.
  task automatic run_instr(input opcode_e op, input dclass_e cls, input logic [1:0] nbp,
                           input logic zval, output int steps, output bit pc_loaded, output int next_st);
    go_to_id0();
    dclass = cls; dopcode = op; dnext_bp = nbp; disel = (cls == DC_L) ? IS_W24 : IS_B2;
    zero = zval;
    #1;
    if (cls == DC_M || cls == DC_L) begin
      chk("ID0 loads ARG", ctrl.ld_arg, 1); chk("ID0 isel", ctrl.isel, disel);
    end
    @(posedge clk); #1;
    chk("second decode state", st(), 3);
    chk("ID1 loads BP", ctrl.ld_bp, 1); chk("ID1 BP value", ctrl.csel, nbp);
    chk("issue pulse", issue, 1);
    @(posedge clk); #1;
    bp = nbp;
    steps = 0; pc_loaded = 0;
    while (st() == 5 && steps < 20) begin
      if (ctrl.ld_pc) pc_loaded = 1;
      @(posedge clk); #1;
      steps++;
    end
    next_st = st();
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int steps, nst;
    bit pcl;
    opcode_e ops [] = '{OP_NOP, OP_LIT, OP_GET, OP_PUT, OP_LD, OP_ST, OP_ADD, OP_SUB, OP_MUL,
                        OP_AND, OP_OR, OP_XOR, OP_SHL, OP_SHR, OP_EQ, OP_LT, OP_GT, OP_NOT,
                        OP_DUP, OP_DROP, OP_SWAP, OP_NEW};
    int      len [] = '{1, 3, 3, 3, 1, 6, 3, 3, 3, 3, 3, 3, 3, 3, 3, 3, 3, 1, 2, 2, 3, 3};

    #12;
    chk("START state", st(), 0);
    #1 chk("START loads PC", ctrl.ld_pc, 1); chk("START selects constant 1", ctrl.jsel, JS_ONE);
    rst_n = 1;
    @(posedge clk); #1;
    chk("IF after START", st(), 1);
    chk("IF fetch pulse", fetch, 1); chk("IF loads IR", ctrl.ld_ir, 1);
    chk("IF address from PC", ctrl.asel, AS_PC); chk("IF PC+1", ctrl.ld_pc && ctrl.jsel == JS_NPC && ctrl.esel == ES_ONE, 1);
    @(posedge clk); #1;
    chk("a fetch takes one cycle: ID0 follows IF", st(), 2);

    // step counts and follow-on state, BP != 0 afterwards -> ID0
    foreach (ops[k]) begin
      run_instr(ops[k], (ops[k] == OP_LIT) ? DC_M : DC_S, 2'd1, 1'b0, steps, pcl, nst);
      chk($sformatf("%s steps", ops[k].name()), steps, len[k]);
      chk($sformatf("%s then ID0", ops[k].name()), nst, 2);
    end
    // BP wrapped to 0 -> fetch
    run_instr(OP_ADD, DC_S, 2'd0, 1'b0, steps, pcl, nst);
    chk("BP 0 -> IF", nst, 1);
    // jumps
    run_instr(OP_JMPS, DC_M, 2'd2, 1'b0, steps, pcl, nst);
    chk("JMPS steps", steps, 1); chk("JMPS loads PC", pcl, 1); chk("JMPS then IF", nst, 1);
    run_instr(OP_JT, DC_L, 2'd0, 1'b1, steps, pcl, nst);       // TS == 0: not taken
    chk("JT not taken steps", steps, 3); chk("JT not taken: PC kept", pcl, 0);
    run_instr(OP_JF, DC_M, 2'd1, 1'b1, steps, pcl, nst);       // TS == 0: taken
    chk("JF taken loads PC", pcl, 1); chk("JF taken then IF though BP != 0", nst, 1);
    run_instr(OP_JT, DC_M, 2'd1, 1'b0, steps, pcl, nst);       // TS != 0: taken
    chk("JT taken loads PC", pcl, 1);
    run_instr(OP_JF, DC_M, 2'd1, 1'b0, steps, pcl, nst);       // TS != 0: not taken
    chk("JF not taken: PC kept", pcl, 0); chk("JF not taken then ID0", nst, 2);
    run_instr(OP_CALL, DC_L, 2'd0, 1'b0, steps, pcl, nst);
    chk("CALL steps", steps, 7); chk("CALL then IF", nst, 1);
    run_instr(OP_RET, DC_M, 2'd1, 1'b0, steps, pcl, nst);      // FP == SP: plain return
    chk("RET steps", steps, 7); chk("RET then IF", nst, 1);
    run_instr(OP_RET, DC_M, 2'd1, 1'b1, steps, pcl, nst);      // FP != SP: return with value
    chk("RETV steps", steps, 6);

    // entry type 0 -> PRE_IF -> IF
    go_to_id0();
    dclass = DC_PRE_IF;
    @(posedge clk); #1;
    chk("PRE_IF state", st(), 4); chk("PRE_IF clears BP", ctrl.ld_bp && ctrl.csel == CS_0, 1);
    @(posedge clk); #1;
    chk("IF after PRE_IF", st(), 1);
    // illegal position -> HALT, stays there
    go_to_id0();
    dclass = DC_HALT;
    repeat (3) @(posedge clk);
    #1 chk("halted", halted, 1);
    chk("HALT is idle", ctrl.ld_pc | ctrl.mem_we | ctrl.ld_ir, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
