// tb_sx_memory: writes random words to random addresses of the memory and
// reads them back combinationally, against a model kept in the testbench;
// also checks that the address wraps on its low bits.
module tb_sx_memory;
  logic        clk = 0, we = 0;
  logic [31:0] addr = 0, wdata = 0, rdata;
  logic [31:0] model [int];
  int checks = 0, failures = 0;

  sx_memory #(.WORDS(1024)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    for (int i = 0; i < 500; i++) begin
      a = $urandom_range(0, 1023);
      @(negedge clk); we = 1; addr = a; wdata = $urandom; model[a] = wdata;
    end
    @(negedge clk); we = 0;
    foreach (model[k]) begin
      addr = k; #1;
      checks++;
      if (rdata !== model[k]) begin failures++; $display("FAIL addr %0d", k); end
    end
    // write with we low does nothing
    void'(model.first(a));
    @(negedge clk); addr = a; wdata = ~model[a]; we = 0;
    @(negedge clk); #1; checks++;
    if (rdata !== model[a]) begin failures++; $display("FAIL write without we"); end
    // upper address bits are ignored
    addr = 32'h0001_0000 + a; #1; checks++;
    if (rdata !== model[a]) begin failures++; $display("FAIL address wrap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
