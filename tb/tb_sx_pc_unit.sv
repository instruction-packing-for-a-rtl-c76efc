// tb_sx_pc_unit: checks reset to 0, the constant-1 load, sequential
// increment (one per cycle), forward and backward relative jumps by the
// sign-extended word offset arg[23:2], tbus loads, and hold when ld is low.
module tb_sx_pc_unit;
  import sx_pkg::*;
  logic        clk = 0, rst_n = 0, ld = 0;
  jsel_e       jsel = JS_NPC;
  esel_e       esel = ES_ONE;
  logic [21:0] argw = '0;
  logic [31:0] tbus = '0, pc, model;
  int checks = 0, failures = 0;

  sx_pc_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step_and_check(input string what);
    @(posedge clk); #1;
    checks++;
    if (pc !== model) begin failures++; $display("FAIL %s: pc %h expected %h", what, pc, model); end
  endtask

  initial begin
    #12 checks++;
    if (pc !== 32'd0) begin failures++; $display("FAIL reset value"); end
    rst_n = 1;
    ld = 1; jsel = JS_ONE; model = 1; step_and_check("const 1");
    jsel = JS_NPC; esel = ES_ONE;
    for (int i = 0; i < 5; i++) begin model = model + 1; step_and_check("increment"); end
    for (int i = 0; i < 200; i++) begin
      int r;
      r = $urandom_range(0, 3);
      ld = ($urandom_range(0, 4) != 0);
      argw = $urandom; tbus = $urandom;
      case (r)
        0: begin jsel = JS_NPC; esel = ES_ONE; end
        1: begin jsel = JS_NPC; esel = ES_ARGW; end
        2: begin jsel = JS_TBUS; end
        default: begin jsel = JS_ONE; end
      endcase
      if (ld) begin
        case (r)
          0: model = model + 1;
          1: model = model + {{10{argw[21]}}, argw};
          2: model = tbus;
          default: model = 1;
        endcase
      end
      step_and_check($sformatf("random %0d sel %0d", i, r));
    end
    // explicit backward jump by -3 words
    ld = 1; jsel = JS_NPC; esel = ES_ARGW; argw = 22'h3FFFFD;
    model = model - 3; step_and_check("backward jump");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
