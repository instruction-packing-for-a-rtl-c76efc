// tb_sx_pack_decode: exhaustive test of the first decode state. For every
// byte pointer value and every 8-bit value of the selected byte (with random
// other bytes) the class, opcode, operand select and next byte pointer are
// compared with the decode table of the packing scheme written out here:
// entry type 0 -> fetch; 1 -> S, BP+1; 2 -> M, BP+2, not at byte 3;
// 3 -> L, BP 0, only at byte 0; anything else -> HALT.
module tb_sx_pack_decode;
  import sx_pkg::*;
  logic [31:0] ir;
  logic [1:0]  bp;
  dclass_e     dclass;
  logic [5:0]  opcode;
  isel_e       isel;
  logic [1:0]  next_bp;
  int checks = 0, failures = 0;

  sx_pack_decode dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cls, nb, sel;
    for (int p = 0; p < 4; p++) begin
      for (int v = 0; v < 256; v++) begin
        ir = $urandom;
        ir[31 - 8*p -: 8] = v[7:0];
        bp = p[1:0];
        #1;
        // reference
        sel = 0; nb = 0;
        case (v >> 6)
          0: cls = 0;
          1: begin cls = 1; nb = (p + 1) % 4; end
          2: if (p < 3) begin cls = 2; nb = (p + 2) % 4; sel = p; end else cls = 4;
          default: if (p == 0) begin cls = 3; nb = 0; sel = 3; end else cls = 4;
        endcase
        checks++;
        if (int'(dclass) != cls || opcode != v[5:0] ||
            ((cls == 2 || cls == 3) && int'(isel) != sel) ||
            ((cls >= 1 && cls <= 3) && int'(next_bp) != nb)) begin
          failures++;
          $display("FAIL bp=%0d byte=%h: class %0d/%0d op %h next_bp %0d/%0d isel %0d/%0d",
                   p, v, dclass, cls, opcode, next_bp, nb, isel, sel);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
