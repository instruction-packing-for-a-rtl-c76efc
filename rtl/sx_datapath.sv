// sx_datapath: data path of the packed-instruction stack processor.
//
// Registers: IR (instruction word), BP (2-bit byte pointer), ARG (24-bit
// operand), PC (in sx_pc_unit), and the register bank TS (top of stack), SP
// (address of the second stack element, which lives in memory), FP (frame
// pointer), NX and FF (temporaries) and AA (array allocation pointer).
// One ALU takes p1 from mux x (TS/SP/FP/NX) and p2 from mux y (FF/arg/
// arg[23:2]/AA) and drives tbus. The register bank loads from one bus chosen
// by mux b (memory output dbus, PC or tbus). Memory is addressed by mux a
// (PC or tbus); the bus interface writes din from mux d (TS or FP) and returns
// dbus. BP loads from mux c (constants 0..3 or arg[1:0]); ARG loads from mux i
// (one operand byte at byte 1, 2 or 3 zero-extended, or IR[23:0]).
// The first decode state (sx_pack_decode) looks at IR and BP and reports to
// the control unit.
// All of this structure follows the published data-path figure. This
// design's choices: arg is zero-extended to 32 bits into p2 ({8'b0,arg} and
// {10'b0,arg[23:2]}); the reset values of SP/FP (STACK_BASE) and AA
// (HEAP_BASE); every register resets, TS/NX/FF/IR/ARG/BP to zero.
// Timing: every register loads at the rising clock edge when its ld_* bit in
// the control word is high; memory reads are combinational, so one control
// step can compute an address on tbus and capture the memory word.
module sx_datapath
  import sx_pkg::*;
#(
  parameter logic [31:0] STACK_BASE = 32'h0000_2000,
  parameter logic [31:0] HEAP_BASE  = 32'h0000_3000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  ctrl_t       ctrl,
  // bus interface to memory M
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata,
  output logic        mem_we,
  input  logic [31:0] mem_rdata,
  // to the control unit
  output dclass_e     dclass,
  output logic [5:0]  dopcode,
  output isel_e       disel,
  output logic [1:0]  dnext_bp,
  output logic [1:0]  bp,
  output logic        zero,
  // observation
  output logic [31:0] ts_o,
  output logic [31:0] sp_o,
  output logic [31:0] fp_o,
  output logic [31:0] pc_o,
  output logic [31:0] aa_o
);
  logic [31:0] ir, ts, sp, fp, nx, ff, aa, pc;
  logic [23:0] arg;
  logic [31:0] p1, p2, tbus, bus, dbus;
  logic [23:0] ibus;
  logic [1:0]  cbus;

  // ---- bus interface unit: din from mux d, dout back as dbus ----
  assign dbus      = mem_rdata;
  assign mem_addr  = (ctrl.asel == AS_PC) ? pc : tbus;           // mux a
  assign mem_wdata = (ctrl.dsel == DS_TS) ? ts : fp;             // mux d
  assign mem_we    = ctrl.mem_we;

  // ---- ALU input multiplexers ----
  always_comb begin
    unique case (ctrl.xsel)                                      // mux x -> p1
      XS_TS:   p1 = ts;
      XS_SP:   p1 = sp;
      XS_FP:   p1 = fp;
      default: p1 = nx;
    endcase
    unique case (ctrl.ysel)                                      // mux y -> p2
      YS_FF:   p2 = ff;
      YS_ARG:  p2 = {8'd0, arg};
      YS_ARGW: p2 = {10'd0, arg[23:2]};
      default: p2 = aa;
    endcase
  end

  sx_alu u_alu (.op(ctrl.alu_op), .a(p1), .b(p2), .y(tbus), .zero(zero));

  // ---- register-bank bus, mux b ----
  always_comb begin
    unique case (ctrl.bsel)
      BS_DBUS: bus = dbus;
      BS_PC:   bus = pc;
      default: bus = tbus;
    endcase
  end

  // ---- mux c (BP) and mux i (ARG) ----
  always_comb begin
    unique case (ctrl.csel)
      CS_0:    cbus = 2'd0;
      CS_1:    cbus = 2'd1;
      CS_2:    cbus = 2'd2;
      CS_3:    cbus = 2'd3;
      default: cbus = arg[1:0];
    endcase
    unique case (ctrl.isel)
      IS_B1:   ibus = {16'd0, ir[23:16]};
      IS_B2:   ibus = {16'd0, ir[15:8]};
      IS_B3:   ibus = {16'd0, ir[7:0]};
      default: ibus = ir[23:0];
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir <= '0; bp <= '0; arg <= '0;
      ts <= '0; sp <= STACK_BASE; fp <= STACK_BASE;
      nx <= '0; ff <= '0; aa <= HEAP_BASE;
    end else begin
      if (ctrl.ld_ir)  ir  <= dbus;
      if (ctrl.ld_bp)  bp  <= cbus;
      if (ctrl.ld_arg) arg <= ibus;
      if (ctrl.ld_ts)  ts  <= bus;
      if (ctrl.ld_sp)  sp  <= bus;
      if (ctrl.ld_fp)  fp  <= bus;
      if (ctrl.ld_nx)  nx  <= bus;
      if (ctrl.ld_ff)  ff  <= bus;
      if (ctrl.ld_aa)  aa  <= bus;
    end
  end

  sx_pc_unit u_pc (
    .clk(clk), .rst_n(rst_n), .ld(ctrl.ld_pc), .jsel(ctrl.jsel), .esel(ctrl.esel),
    .argw(arg[23:2]), .tbus(tbus), .pc(pc)
  );

  sx_pack_decode u_dec (
    .ir(ir), .bp(bp), .dclass(dclass), .opcode(dopcode), .isel(disel), .next_bp(dnext_bp)
  );

  assign ts_o = ts;
  assign sp_o = sp;
  assign fp_o = fp;
  assign pc_o = pc;
  assign aa_o = aa;
endmodule
