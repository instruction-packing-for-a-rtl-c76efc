// tb_sx_alu: self-checking test of the ALU. Random operands (plus corner
// values) for every operation, compared with a reference computed here.
module tb_sx_alu;
  import sx_pkg::*;
  alu_op_e     op;
  logic [31:0] a, b, y;
  logic        zero;
  int checks = 0, failures = 0;

  sx_alu dut (.op(op), .a(a), .b(b), .y(y), .zero(zero));

  function automatic logic [31:0] ref_alu(alu_op_e o, logic [31:0] x, logic [31:0] z);
    case (o)
      ALU_PASSA: return x;
      ALU_PASSB: return z;
      ALU_ADD:   return x + z;
      ALU_SUB:   return x - z;
      ALU_RSUB:  return z - x;
      ALU_MUL:   return x * z;
      ALU_AND:   return x & z;
      ALU_OR:    return x | z;
      ALU_XOR:   return x ^ z;
      ALU_RSHL:  return z << (x % 32);
      ALU_RSHR:  return z >> (x % 32);
      ALU_EQ:    return (x == z) ? 32'd1 : 32'd0;
      ALU_RLT:   return ($signed(z) < $signed(x)) ? 32'd1 : 32'd0;
      ALU_RGT:   return ($signed(z) > $signed(x)) ? 32'd1 : 32'd0;
      ALU_NOT:   return ~x;
      ALU_INC:   return x + 1;
      default:   return x - 1;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corner [6] = '{32'd0, 32'd1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'd5};
    logic [31:0] e;
    for (int o = 0; o <= int'(ALU_DEC); o++) begin
      for (int k = 0; k < 236; k++) begin
        op = alu_op_e'(o);
        if (k < 36) begin a = corner[k % 6]; b = corner[k / 6]; end
        else begin a = $urandom; b = $urandom; end
        #1;
        e = ref_alu(op, a, b);
        checks++;
        if (y !== e || zero !== (e == 0)) begin
          failures++;
          $display("FAIL op %0d a=%h b=%h y=%h exp=%h", o, a, b, y, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
