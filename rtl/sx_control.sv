// sx_control: control unit of the packed-instruction stack processor.
//
// A state machine that emits one control word (ctrl_t) per clock cycle:
//   START  : PC <- 1 (constant input of mux j), BP <- 0          -> IF
//   IF     : IR <- M[PC], PC <- PC+1                              -> ID0
//   ID0    : first decode state. The decoder reports the entry type of the
//            byte at BP: 0 -> PRE_IF; an illegal position -> HALT; S/M/L ->
//            ID1. M and L also load ARG through mux i here.
//   ID1    : second decode state: BP <- BP+1 (S), BP+2 (M) or 0 (L)   -> EX
//   PRE_IF : BP <- 0                                              -> IF
//   EX     : the control steps of the instruction, one per cycle (step)
//   HALT   : stays until reset.
// After the last control step the next state is IF when a jump, call or
// return was taken (BP was loaded with the target byte NB, or 0) or when BP
// wrapped to 0; otherwise ID0 decodes the next sub-instruction of the same
// word without a fetch. This is where packing saves fetches.
// The decode flow, the BP update rule, the jump NB -> BP rule and the call /
// return / return-with-value step sequences follow the published design.
// This design's own choices: the instruction set and opcodes (sx_pkg); the
// control steps of all other instructions; steps the published sequences
// write on one line but that would need two values on the single register
// bank bus (e.g. "mR(sp)->ts, sp-1") are split over two cycles; the call
// target word is a function header whose bits [23:2] give the frame size and
// bits [1:0] the start byte in the next word (the published call sequence
// reads a word at the target into IR and takes arg and BP from it; its
// field positions are not given).
// Conditions (JT/JF on TS, the FP == SP test of return) use the ALU zero
// flag registered at the end of the step that computed it, so the control
// word never depends combinationally on the ALU result.
// Outputs fetch / issue pulse once per word fetch / per dispatched
// sub-instruction so that fetch and instruction counts can be measured.
module sx_control
  import sx_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  dclass_e    dclass,
  input  logic [5:0] dopcode,
  input  isel_e      disel,
  input  logic [1:0] dnext_bp,
  input  logic [1:0] bp,
  input  logic       zero,
  output ctrl_t      ctrl,
  output logic       halted,
  output logic       fetch,
  output logic       issue
);
  typedef enum logic [2:0] { ST_START, ST_IF, ST_ID0, ST_ID1, ST_PRE_IF, ST_EX, ST_HALT } state_e;

  state_e     state, state_n;
  opcode_e    op_q;
  logic [1:0] nbp_q;
  logic [3:0] step, step_n;
  logic       taken_q, taken_n;
  logic       zf_q;      // ALU zero flag of the previous cycle
  logic       done;      // last control step of the instruction
  logic       take;      // this step redirects the instruction stream

  // ---- micro-operation helpers ----
  function automatic ctrl_t sp_inc(ctrl_t c);
    c.xsel = XS_SP; c.alu_op = ALU_INC; c.bsel = BS_TBUS; c.ld_sp = 1'b1; return c;
  endfunction
  function automatic ctrl_t sp_dec(ctrl_t c);
    c.xsel = XS_SP; c.alu_op = ALU_DEC; c.bsel = BS_TBUS; c.ld_sp = 1'b1; return c;
  endfunction
  // TS -> mW(SP)
  function automatic ctrl_t ts_to_msp(ctrl_t c);
    c.xsel = XS_SP; c.alu_op = ALU_PASSA; c.asel = AS_TBUS; c.dsel = DS_TS; c.mem_we = 1'b1; return c;
  endfunction
  // mR(SP) -> TS
  function automatic ctrl_t msp_to_ts(ctrl_t c);
    c.xsel = XS_SP; c.alu_op = ALU_PASSA; c.asel = AS_TBUS; c.bsel = BS_DBUS; c.ld_ts = 1'b1; return c;
  endfunction
  // mR(SP) -> FF
  function automatic ctrl_t msp_to_ff(ctrl_t c);
    c.xsel = XS_SP; c.alu_op = ALU_PASSA; c.asel = AS_TBUS; c.bsel = BS_DBUS; c.ld_ff = 1'b1; return c;
  endfunction
  // PC+arg -> PC, arg[1:0] -> BP  (taken jump)
  function automatic ctrl_t jump_rel(ctrl_t c);
    c.esel = ES_ARGW; c.jsel = JS_NPC; c.ld_pc = 1'b1; c.csel = CS_ARG; c.ld_bp = 1'b1; return c;
  endfunction

  function automatic alu_op_e bin_op(opcode_e o);
    unique case (o)
      OP_ADD:  return ALU_ADD;
      OP_SUB:  return ALU_RSUB;
      OP_MUL:  return ALU_MUL;
      OP_AND:  return ALU_AND;
      OP_OR:   return ALU_OR;
      OP_XOR:  return ALU_XOR;
      OP_SHL:  return ALU_RSHL;
      OP_SHR:  return ALU_RSHR;
      OP_EQ:   return ALU_EQ;
      OP_LT:   return ALU_RLT;
      default: return ALU_RGT;
    endcase
  endfunction

  // ---- control word and next state ----
  always_comb begin
    ctrl    = CTRL_IDLE;
    state_n = state;
    step_n  = step;
    taken_n = taken_q;
    done    = 1'b0;
    take    = 1'b0;

    unique case (state)
      ST_START: begin
        ctrl.jsel = JS_ONE; ctrl.ld_pc = 1'b1;
        ctrl.csel = CS_0;   ctrl.ld_bp = 1'b1;
        state_n = ST_IF;
      end
      ST_IF: begin
        ctrl.asel = AS_PC; ctrl.ld_ir = 1'b1;
        ctrl.esel = ES_ONE; ctrl.jsel = JS_NPC; ctrl.ld_pc = 1'b1;
        state_n = ST_ID0;
      end
      ST_ID0: begin
        unique case (dclass)
          DC_PRE_IF: state_n = ST_PRE_IF;
          DC_S:      state_n = ST_ID1;
          DC_M, DC_L: begin
            ctrl.isel = disel; ctrl.ld_arg = 1'b1;
            state_n = ST_ID1;
          end
          default:   state_n = ST_HALT;
        endcase
      end
      ST_ID1: begin
        ctrl.csel = csel_e'({1'b0, nbp_q}); ctrl.ld_bp = 1'b1;
        state_n = ST_EX;
        step_n  = 4'd0;
        taken_n = 1'b0;
      end
      ST_PRE_IF: begin
        ctrl.csel = CS_0; ctrl.ld_bp = 1'b1;
        state_n = ST_IF;
      end
      ST_EX: begin
        unique case (op_q)
          OP_LIT: unique case (step)
            4'd0: ctrl = sp_inc(ctrl);
            4'd1: ctrl = ts_to_msp(ctrl);
            default: begin
              ctrl.ysel = YS_ARG; ctrl.alu_op = ALU_PASSB; ctrl.bsel = BS_TBUS; ctrl.ld_ts = 1'b1;
              done = 1'b1;
            end
          endcase
          OP_GET: unique case (step)
            4'd0: ctrl = sp_inc(ctrl);
            4'd1: ctrl = ts_to_msp(ctrl);
            default: begin // alu(FP-arg) -> tbus, mR(tbus) -> TS
              ctrl.xsel = XS_FP; ctrl.ysel = YS_ARG; ctrl.alu_op = ALU_SUB;
              ctrl.asel = AS_TBUS; ctrl.bsel = BS_DBUS; ctrl.ld_ts = 1'b1;
              done = 1'b1;
            end
          endcase
          OP_PUT: unique case (step)
            4'd0: begin // alu(FP-arg) -> tbus, TS -> mW(tbus)
              ctrl.xsel = XS_FP; ctrl.ysel = YS_ARG; ctrl.alu_op = ALU_SUB;
              ctrl.asel = AS_TBUS; ctrl.dsel = DS_TS; ctrl.mem_we = 1'b1;
            end
            4'd1: ctrl = msp_to_ts(ctrl);
            default: begin ctrl = sp_dec(ctrl); done = 1'b1; end
          endcase
          OP_LD: begin // alu(TS) -> tbus, mR(tbus) -> TS
            ctrl.xsel = XS_TS; ctrl.alu_op = ALU_PASSA; ctrl.asel = AS_TBUS;
            ctrl.bsel = BS_DBUS; ctrl.ld_ts = 1'b1;
            done = 1'b1;
          end
          OP_ST: unique case (step)
            4'd0: begin ctrl.xsel = XS_TS; ctrl.alu_op = ALU_PASSA; ctrl.bsel = BS_TBUS; ctrl.ld_nx = 1'b1; end
            4'd1: ctrl = msp_to_ts(ctrl);
            4'd2: ctrl = sp_dec(ctrl);
            4'd3: begin // alu(NX) -> tbus, TS -> mW(tbus)
              ctrl.xsel = XS_NX; ctrl.alu_op = ALU_PASSA; ctrl.asel = AS_TBUS;
              ctrl.dsel = DS_TS; ctrl.mem_we = 1'b1;
            end
            4'd4: ctrl = msp_to_ts(ctrl);
            default: begin ctrl = sp_dec(ctrl); done = 1'b1; end
          endcase
          OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR, OP_XOR, OP_SHL, OP_SHR,
          OP_EQ, OP_LT, OP_GT: unique case (step)
            4'd0: ctrl = msp_to_ff(ctrl);
            4'd1: begin
              ctrl.xsel = XS_TS; ctrl.ysel = YS_FF; ctrl.alu_op = bin_op(op_q);
              ctrl.bsel = BS_TBUS; ctrl.ld_ts = 1'b1;
            end
            default: begin ctrl = sp_dec(ctrl); done = 1'b1; end
          endcase
          OP_NOT: begin
            ctrl.xsel = XS_TS; ctrl.alu_op = ALU_NOT; ctrl.bsel = BS_TBUS; ctrl.ld_ts = 1'b1;
            done = 1'b1;
          end
          OP_DUP: unique case (step)
            4'd0: ctrl = sp_inc(ctrl);
            default: begin ctrl = ts_to_msp(ctrl); done = 1'b1; end
          endcase
          OP_DROP: unique case (step)
            4'd0: ctrl = msp_to_ts(ctrl);
            default: begin ctrl = sp_dec(ctrl); done = 1'b1; end
          endcase
          OP_SWAP: unique case (step)
            4'd0: ctrl = msp_to_ff(ctrl);
            4'd1: ctrl = ts_to_msp(ctrl);
            default: begin
              ctrl.ysel = YS_FF; ctrl.alu_op = ALU_PASSB; ctrl.bsel = BS_TBUS; ctrl.ld_ts = 1'b1;
              done = 1'b1;
            end
          endcase
          OP_JMPS, OP_JMP: begin
            ctrl = jump_rel(ctrl);
            take = 1'b1; done = 1'b1;
          end
          OP_JT, OP_JF: unique case (step)
            4'd0: begin ctrl.xsel = XS_TS; ctrl.alu_op = ALU_PASSA; end  // test TS
            4'd1: begin // pop; a taken jump loads PC and BP in the same step
              ctrl = msp_to_ts(ctrl);
              if ((op_q == OP_JT) ? !zf_q : zf_q) begin
                ctrl = jump_rel(ctrl);
                take = 1'b1;
              end
            end
            default: begin ctrl = sp_dec(ctrl); done = 1'b1; end
          endcase
          OP_CALL: unique case (step)
            4'd0: ctrl = sp_inc(ctrl);
            4'd1: ctrl = ts_to_msp(ctrl);
            4'd2: begin ctrl.bsel = BS_PC; ctrl.ld_ts = 1'b1; end          // PC -> TS
            4'd3: begin // arg[23:2] -> tbus -> NX, PC; arg[1:0] -> BP; mR(tbus) -> IR
              ctrl.ysel = YS_ARGW; ctrl.alu_op = ALU_PASSB; ctrl.bsel = BS_TBUS; ctrl.ld_nx = 1'b1;
              ctrl.jsel = JS_TBUS; ctrl.ld_pc = 1'b1;
              ctrl.csel = CS_ARG; ctrl.ld_bp = 1'b1;
              ctrl.asel = AS_TBUS; ctrl.ld_ir = 1'b1;
            end
            4'd4: begin // header: IR[23:0] -> arg, PC++
              ctrl.isel = IS_W24; ctrl.ld_arg = 1'b1;
              ctrl.esel = ES_ONE; ctrl.jsel = JS_NPC; ctrl.ld_pc = 1'b1;
            end
            4'd5: begin // alu(SP+arg[23:2]) -> tbus, FP -> mW(tbus); arg[1:0] -> BP
              ctrl.xsel = XS_SP; ctrl.ysel = YS_ARGW; ctrl.alu_op = ALU_ADD;
              ctrl.asel = AS_TBUS; ctrl.dsel = DS_FP; ctrl.mem_we = 1'b1;
              ctrl.csel = CS_ARG; ctrl.ld_bp = 1'b1;
            end
            default: begin // alu(SP+arg[23:2]) -> tbus -> SP, FP
              ctrl.xsel = XS_SP; ctrl.ysel = YS_ARGW; ctrl.alu_op = ALU_ADD;
              ctrl.bsel = BS_TBUS; ctrl.ld_sp = 1'b1; ctrl.ld_fp = 1'b1;
              take = 1'b1; done = 1'b1;
            end
          endcase
          OP_RET: unique case (step)
            4'd0: begin ctrl.xsel = XS_SP; ctrl.alu_op = ALU_PASSA; ctrl.bsel = BS_TBUS; ctrl.ld_ff = 1'b1; end
            4'd1: begin // alu(FP == FF); not equal -> return with value
              ctrl.xsel = XS_FP; ctrl.ysel = YS_FF; ctrl.alu_op = ALU_EQ;
            end
            4'd2: begin
              if (zf_q) begin // FP != SP: Returnv, alu(FP+1) -> tbus, mR(tbus) -> FF
                ctrl.xsel = XS_FP; ctrl.alu_op = ALU_INC; ctrl.asel = AS_TBUS;
                ctrl.bsel = BS_DBUS; ctrl.ld_ff = 1'b1;
              end else begin  // TS -> PC
                ctrl.xsel = XS_TS; ctrl.alu_op = ALU_PASSA; ctrl.jsel = JS_TBUS; ctrl.ld_pc = 1'b1;
              end
            end
            4'd3, 4'd12: begin // alu(FP-arg) -> SP
              ctrl.xsel = XS_FP; ctrl.ysel = YS_ARG; ctrl.alu_op = ALU_SUB;
              ctrl.bsel = BS_TBUS; ctrl.ld_sp = 1'b1;
            end
            4'd4: ctrl = msp_to_ts(ctrl);
            4'd5: ctrl = sp_dec(ctrl);
            4'd11: begin ctrl.ysel = YS_FF; ctrl.alu_op = ALU_PASSB; ctrl.jsel = JS_TBUS; ctrl.ld_pc = 1'b1; end
            default: begin // mR(FP) -> FP, 0 -> BP, fetch
              ctrl.xsel = XS_FP; ctrl.alu_op = ALU_PASSA; ctrl.asel = AS_TBUS;
              ctrl.bsel = BS_DBUS; ctrl.ld_fp = 1'b1;
              ctrl.csel = CS_0; ctrl.ld_bp = 1'b1;
              take = 1'b1; done = 1'b1;
            end
          endcase
          OP_NEW: unique case (step)
            4'd0: begin ctrl.ysel = YS_AA; ctrl.alu_op = ALU_PASSB; ctrl.bsel = BS_TBUS; ctrl.ld_nx = 1'b1; end
            4'd1: begin ctrl.xsel = XS_TS; ctrl.ysel = YS_AA; ctrl.alu_op = ALU_ADD; ctrl.bsel = BS_TBUS; ctrl.ld_aa = 1'b1; end
            default: begin
              ctrl.xsel = XS_NX; ctrl.alu_op = ALU_PASSA; ctrl.bsel = BS_TBUS; ctrl.ld_ts = 1'b1;
              done = 1'b1;
            end
          endcase
          default: done = 1'b1; // NOP and unassigned opcodes
        endcase

        // step sequencing
        if (op_q == OP_RET && step == 4'd2 && zf_q) step_n = 4'd11;  // Returnv branch
        else if (op_q == OP_RET && step == 4'd5)    step_n = 4'd13;  // join the common last step
        else                                        step_n = step + 4'd1;
        if (take) taken_n = 1'b1;
        if (done) begin
          // After the last step: a redirected stream or a word that is used up
          // needs a fetch; otherwise decode the next byte of the same word.
          // (BP here already holds the value loaded in ID1.)
          state_n = (take || taken_q || bp == 2'd0) ? ST_IF : ST_ID0;
        end
      end
      default: state_n = ST_HALT; // ST_HALT
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_START;
      op_q    <= OP_NOP;
      nbp_q   <= 2'd0;
      step    <= 4'd0;
      taken_q <= 1'b0;
      zf_q    <= 1'b0;
    end else begin
      zf_q    <= zero;
      state   <= state_n;
      step    <= step_n;
      taken_q <= taken_n;
      if (state == ST_ID0) begin
        op_q  <= opcode_e'(dopcode);
        nbp_q <= dnext_bp;
      end
    end
  end

  // HALT is left only through reset; a fetch never writes memory.
  a_halt_sticky: assert property (@(posedge clk) disable iff (!rst_n) halted |=> halted);
  a_fetch_read:  assert property (@(posedge clk) disable iff (!rst_n) fetch |-> !ctrl.mem_we);

  assign halted = (state == ST_HALT);
  assign fetch  = (state == ST_IF);
  assign issue  = (state == ST_ID1);
endmodule
