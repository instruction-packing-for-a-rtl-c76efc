// sx_pack_decode: first decode state (ID0) of the packed instruction word.
//
// IR holds one 32-bit instruction word of up to four sub-instructions; byte 0
// is IR[31:24], byte 3 is IR[7:0]. BP (byte pointer) names the byte to decode
// next. The byte's top two bits are its entry type:
//   0 -> PRE_IF (nothing more in this word; clear BP and fetch)
//   1 -> S-format, 2 -> M-format (operand in the next byte),
//   3 -> L-format (operand in the three following bytes).
// A format that does not fit in the rest of the word (L anywhere but byte 0,
// M in byte 3) decodes to HALT, exactly as in the published decode flow
// chart. This gives the twelve legal packing patterns (L, M-M, M, M-S-S, M-S,
// S-S-S-S, S-S-S, S-S, S, S-S-M, S-M-S, S-M).
// Outputs: the 6-bit opcode of the byte, the select for the arg multiplexer
// (i) that picks the operand, and the BP value after this sub-instruction
// (S: BP+1, M: BP+2, L: 0, all modulo 4, so a wrap to 0 means "fetch").
// Purely combinational; all of it follows the published design.
module sx_pack_decode
  import sx_pkg::*;
(
  input  logic [31:0] ir,
  input  logic [1:0]  bp,
  output dclass_e     dclass,
  output logic [5:0]  opcode,
  output isel_e       isel,
  output logic [1:0]  next_bp
);
  logic [7:0] cur;
  etype_e     et;

  always_comb begin
    unique case (bp)
      2'd0: cur = ir[31:24];
      2'd1: cur = ir[23:16];
      2'd2: cur = ir[15:8];
      default: cur = ir[7:0];
    endcase
  end

  assign et     = etype_e'(cur[7:6]);
  assign opcode = cur[5:0];

  always_comb begin
    dclass  = DC_HALT;
    isel    = IS_B1;
    next_bp = 2'd0;
    unique case (et)
      ET_NONE: dclass = DC_PRE_IF;
      ET_S: begin
        dclass  = DC_S;
        next_bp = bp + 2'd1;
      end
      ET_M: begin
        // the operand byte must still be inside this word
        if (bp != 2'd3) begin
          dclass  = DC_M;
          next_bp = bp + 2'd2;
          isel    = (bp == 2'd0) ? IS_B1 : (bp == 2'd1) ? IS_B2 : IS_B3;
        end
      end
      default: begin // ET_L: only as the first byte of a word
        if (bp == 2'd0) begin
          dclass  = DC_L;
          next_bp = 2'd0;
          isel    = IS_W24;
        end
      end
    endcase
  end
endmodule
