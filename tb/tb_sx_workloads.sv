// tb_sx_workloads: runs three of the benchmark programs the packing scheme
// was evaluated with, written for this processor's instruction set:
//   quick  - recursive quicksort (Lomuto partition) of 20 integers given in
//            descending order,
//   hanoi  - recursive Towers of Hanoi with 7 disks, every move recorded in
//            memory (127 moves),
//   matmul - product of two 4 x 4 integer matrices.
// (The fourth benchmark, bubble sort of 20 integers, is in tb_sx_packed_top.)
// Results are compared with the same computation done in the testbench.
// For each program it prints the packed code size against one word per
// instruction (the unpacked layout) and the word fetches against one fetch
// per executed instruction, and checks that packing reduces both.
// Uses the same small two-pass assembler as tb_sx_packed_top.
module tb_sx_workloads;
  import sx_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        load_we = 1'b0;
  logic [31:0] load_addr = '0, load_data = '0;
  logic        halted;
  logic [31:0] dbg_ts, dbg_sp, dbg_fp, dbg_pc, dbg_aa, dbg_fetches, dbg_instrs, dbg_cycles;

  sx_packed_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ------------------------------------------------------------------
  // assembler
  typedef enum int { K_S, K_M, K_L, K_ALIGN, K_LABEL, K_HDR, K_HALT } kind_e;
  localparam int MAXI = 512;
  kind_e it_kind [MAXI];
  int    it_op   [MAXI];
  int    it_arg  [MAXI];
  int    it_lab  [MAXI];
  int    it_word [MAXI];
  int    it_byte [MAXI];
  int    n_items;
  int    lab_word [64];
  int    lab_byte [64];
  logic [31:0] image [1024];
  int    n_words;

  function automatic void asm_reset();
    n_items = 0;
  endfunction
  function automatic void add(kind_e k, int op, int arg, int lab);
    it_kind[n_items] = k; it_op[n_items] = op; it_arg[n_items] = arg; it_lab[n_items] = lab;
    n_items++;
  endfunction
  function automatic void S(opcode_e op);             add(K_S, int'(op), 0, -1);   endfunction
  function automatic void M(opcode_e op, int a);      add(K_M, int'(op), a, -1);   endfunction
  function automatic void L(opcode_e op, int a);      add(K_L, int'(op), a, -1);   endfunction
  function automatic void MJ(opcode_e op, int lab);   add(K_M, int'(op), 0, lab);  endfunction
  function automatic void LJ(opcode_e op, int lab);   add(K_L, int'(op), 0, lab);  endfunction
  function automatic void LABEL(int lab);             add(K_LABEL, 0, 0, lab);     endfunction
  function automatic void ALIGN();                    add(K_ALIGN, 0, 0, -1);      endfunction
  function automatic void FUNC(int lab, int k);       add(K_HDR, 0, k, lab);       endfunction
  function automatic void HALT();                     add(K_HALT, 0, 0, -1);       endfunction

  function automatic void put_byte(int w, int b, logic [7:0] v);
    image[w][31-8*b -: 8] = v;
  endfunction

  function automatic void assemble();
    int w, b;
    w = 1; b = 0;                       // code starts at word address 1
    for (int i = 0; i < n_items; i++) begin
      case (it_kind[i])
        K_S:     begin it_word[i] = w; it_byte[i] = b; b++; end
        K_M:     begin if (b == 3) begin w++; b = 0; end
                       it_word[i] = w; it_byte[i] = b; b += 2; end
        K_L:     begin if (b != 0) begin w++; b = 0; end
                       it_word[i] = w; it_byte[i] = 0; b = 4; end
        K_ALIGN: if (b != 0) begin w++; b = 0; end
        K_LABEL: begin lab_word[it_lab[i]] = w; lab_byte[it_lab[i]] = b; end
        K_HDR:   begin if (b != 0) begin w++; b = 0; end
                       lab_word[it_lab[i]] = w; lab_byte[it_lab[i]] = 0;
                       it_word[i] = w; b = 4; end
        K_HALT:  begin if (b == 0) begin it_arg[i] = 1; b = 1; end  // byte 0 a NOP
                       it_word[i] = w; it_byte[i] = b; b = 4; end
        default: ;
      endcase
      if (b == 4) begin w++; b = 0; end
    end
    n_words = (b == 0) ? w : w + 1;
    for (int i = 0; i < n_words; i++) image[i] = 32'h0;
    for (int i = 0; i < n_items; i++) begin
      int nw;
      case (it_kind[i])
        K_S: put_byte(it_word[i], it_byte[i], {2'b01, it_op[i][5:0]});
        K_M: begin
          logic [7:0] opnd;
          if (it_lab[i] >= 0) begin
            nw = lab_word[it_lab[i]] - (it_word[i] + 1);
            if (nw < 0 || nw > 63) $display("ASM: short jump out of range");
            opnd = {nw[5:0], lab_byte[it_lab[i]][1:0]};
          end else opnd = it_arg[i][7:0];
          put_byte(it_word[i], it_byte[i], {2'b10, it_op[i][5:0]});
          put_byte(it_word[i], it_byte[i] + 1, opnd);
        end
        K_L: begin
          logic [23:0] a;
          if (it_lab[i] >= 0) begin
            if (it_op[i] == int'(OP_CALL)) nw = lab_word[it_lab[i]];
            else                           nw = lab_word[it_lab[i]] - (it_word[i] + 1);
            a = {nw[21:0], lab_byte[it_lab[i]][1:0]};
          end else a = it_arg[i][23:0];
          image[it_word[i]] = {2'b11, it_op[i][5:0], a};
        end
        K_HDR:  image[it_word[i]] = {8'h00, it_arg[i][21:0], 2'b00};
        K_HALT: begin
          if (it_arg[i] == 1) put_byte(it_word[i], 0, {2'b01, 6'(OP_NOP)});
          put_byte(it_word[i], it_byte[i], 8'hC0);
        end
        default: ;
      endcase
    end
  endfunction

  // load the image (and optional data words) while reset is held, then run
  task automatic run(input string name, input int max_cycles);
    rst_n = 1'b0;
    for (int i = 1; i < n_words; i++) begin
      @(negedge clk);
      load_we = 1'b1; load_addr = i; load_data = image[i];
    end
    @(negedge clk);
    load_we = 1'b0;
    rst_n = 1'b1;
    for (int c = 0; c < max_cycles && !halted; c++) @(posedge clk);
    repeat (2) @(posedge clk);
    check({name, " halted"}, halted, 1);
    $display("%s: %0d words, %0d fetches, %0d sub-instructions, %0d cycles",
             name, n_words - 1, dbg_fetches, dbg_instrs, dbg_cycles);
  endtask

  task automatic load_word(input int addr, input int data);
    @(negedge clk);
    load_we = 1'b1; load_addr = addr; load_data = data;
    @(negedge clk);
    load_we = 1'b0;
  endtask

  // statistics: packed words against one word per instruction
  function automatic int n_instr_items();
    int n = 0;
    for (int i = 0; i < n_items; i++)
      if (it_kind[i] == K_S || it_kind[i] == K_M || it_kind[i] == K_L) n++;
    return n;
  endfunction

  task automatic report(input string name);
    int packed_bytes, plain_bytes;
    packed_bytes = (n_words - 1) * 4;
    plain_bytes  = n_instr_items() * 4;
    $display("%s: code %0d bytes packed vs %0d unpacked (%0d%% smaller); fetches %0d vs %0d executed instructions; %0d cycles",
             name, packed_bytes, plain_bytes, 100 - (100 * packed_bytes) / plain_bytes,
             dbg_fetches, dbg_instrs, dbg_cycles);
    check({name, " code smaller when packed"}, packed_bytes < plain_bytes, 1);
    check({name, " fewer fetches than instructions"}, dbg_fetches < dbg_instrs, 1);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int QA = 32'h1000;   // quicksort array
  localparam int HC = 32'h1200;   // hanoi move counter
  localparam int HM = 32'h1210;   // hanoi moves
  localparam int MA = 32'h1400, MB = 32'h1410, MC = 32'h1420;

  int exp_moves [$];
  function automatic void hanoi_ref(int n, int f, int t, int v);
    if (n == 0) return;
    hanoi_ref(n - 1, f, v, t);
    exp_moves.push_back(f * 4 + t);
    hanoi_ref(n - 1, v, t, f);
  endfunction

  initial begin
    // ---------------- quick: qs(lo, hi), frame 5: i FP-1, j FP-2, pivot FP-3
    // hi = FP-5, lo = FP-6
    asm_reset();
    M(OP_LIT, 0); M(OP_LIT, 19); LJ(OP_CALL, 1); HALT();
    FUNC(1, 5);
    M(OP_GET, 6); M(OP_GET, 5); S(OP_LT); LJ(OP_JF, 9);
    M(OP_GET, 5); L(OP_LIT, QA); S(OP_ADD); S(OP_LD); M(OP_PUT, 3);
    M(OP_GET, 6); M(OP_PUT, 1);
    M(OP_GET, 6); M(OP_PUT, 2);
    LABEL(2);
    M(OP_GET, 2); M(OP_GET, 5); S(OP_LT); LJ(OP_JF, 4);
    M(OP_GET, 2); L(OP_LIT, QA); S(OP_ADD); S(OP_LD); M(OP_GET, 3); S(OP_LT); LJ(OP_JF, 3);
    M(OP_GET, 1); L(OP_LIT, QA); S(OP_ADD); S(OP_LD);
    M(OP_GET, 2); L(OP_LIT, QA); S(OP_ADD); S(OP_LD);
    M(OP_GET, 1); L(OP_LIT, QA); S(OP_ADD); S(OP_ST);
    M(OP_GET, 2); L(OP_LIT, QA); S(OP_ADD); S(OP_ST);
    M(OP_GET, 1); M(OP_LIT, 1); S(OP_ADD); M(OP_PUT, 1);
    LABEL(3);
    M(OP_GET, 2); M(OP_LIT, 1); S(OP_ADD); M(OP_PUT, 2); LJ(OP_JMP, 2);
    LABEL(4);
    M(OP_GET, 1); L(OP_LIT, QA); S(OP_ADD); S(OP_LD);
    M(OP_GET, 5); L(OP_LIT, QA); S(OP_ADD); S(OP_LD);
    M(OP_GET, 1); L(OP_LIT, QA); S(OP_ADD); S(OP_ST);
    M(OP_GET, 5); L(OP_LIT, QA); S(OP_ADD); S(OP_ST);
    M(OP_GET, 6); M(OP_GET, 1); M(OP_LIT, 1); S(OP_SUB); LJ(OP_CALL, 1);
    M(OP_GET, 1); M(OP_LIT, 1); S(OP_ADD); M(OP_GET, 5); LJ(OP_CALL, 1);
    LABEL(9); M(OP_RET, 7);
    assemble();
    rst_n = 1'b0;
    for (int k = 0; k < 20; k++) load_word(QA + k, 20 - k);
    run("quick", 200000);
    for (int k = 0; k < 20; k++) check($sformatf("quick a[%0d]", k), dut.u_mem.mem[QA + k], k + 1);
    check("quick SP restored", dbg_sp, 32'h2000);
    report("quick");

    // ---------------- hanoi(n, from, to, via): via FP-1, to FP-2, from FP-3, n FP-4
    asm_reset();
    M(OP_LIT, 0); L(OP_LIT, HC); S(OP_ST);
    M(OP_LIT, 7); M(OP_LIT, 1); M(OP_LIT, 3); M(OP_LIT, 2); LJ(OP_CALL, 1);
    HALT();
    FUNC(1, 1);
    M(OP_GET, 4); LJ(OP_JF, 9);
    M(OP_GET, 4); M(OP_LIT, 1); S(OP_SUB); M(OP_GET, 3); M(OP_GET, 1); M(OP_GET, 2); LJ(OP_CALL, 1);
    M(OP_GET, 3); M(OP_LIT, 4); S(OP_MUL); M(OP_GET, 2); S(OP_ADD);
    L(OP_LIT, HC); S(OP_LD); L(OP_LIT, HM); S(OP_ADD); S(OP_ST);
    L(OP_LIT, HC); S(OP_LD); M(OP_LIT, 1); S(OP_ADD); L(OP_LIT, HC); S(OP_ST);
    M(OP_GET, 4); M(OP_LIT, 1); S(OP_SUB); M(OP_GET, 1); M(OP_GET, 2); M(OP_GET, 3); LJ(OP_CALL, 1);
    LABEL(9); M(OP_RET, 5);
    assemble();
    run("hanoi", 200000);
    hanoi_ref(7, 1, 3, 2);
    check("hanoi move count", dut.u_mem.mem[HC], 127);
    foreach (exp_moves[k]) check($sformatf("hanoi move %0d", k), dut.u_mem.mem[HM + k], exp_moves[k]);
    check("hanoi SP restored", dbg_sp, 32'h2000);
    report("hanoi");

    // ---------------- matmul: C = A * B, 4 x 4; i FP-1, j FP-2, k FP-3, sum FP-4
    asm_reset();
    M(OP_LIT, 0); M(OP_PUT, 1);
    LABEL(1);
    M(OP_LIT, 0); M(OP_PUT, 2);
    LABEL(2);
    M(OP_LIT, 0); M(OP_PUT, 4); M(OP_LIT, 0); M(OP_PUT, 3);
    LABEL(3);
    M(OP_GET, 1); M(OP_LIT, 4); S(OP_MUL); M(OP_GET, 3); S(OP_ADD); L(OP_LIT, MA); S(OP_ADD); S(OP_LD);
    M(OP_GET, 3); M(OP_LIT, 4); S(OP_MUL); M(OP_GET, 2); S(OP_ADD); L(OP_LIT, MB); S(OP_ADD); S(OP_LD);
    S(OP_MUL); M(OP_GET, 4); S(OP_ADD); M(OP_PUT, 4);
    M(OP_GET, 3); M(OP_LIT, 1); S(OP_ADD); S(OP_DUP); M(OP_PUT, 3); M(OP_LIT, 4); S(OP_LT); LJ(OP_JT, 3);
    M(OP_GET, 4); M(OP_GET, 1); M(OP_LIT, 4); S(OP_MUL); M(OP_GET, 2); S(OP_ADD); L(OP_LIT, MC); S(OP_ADD); S(OP_ST);
    M(OP_GET, 2); M(OP_LIT, 1); S(OP_ADD); S(OP_DUP); M(OP_PUT, 2); M(OP_LIT, 4); S(OP_LT); LJ(OP_JT, 2);
    M(OP_GET, 1); M(OP_LIT, 1); S(OP_ADD); S(OP_DUP); M(OP_PUT, 1); M(OP_LIT, 4); S(OP_LT); LJ(OP_JT, 1);
    HALT();
    assemble();
    rst_n = 1'b0;
    for (int k = 0; k < 16; k++) begin
      load_word(MA + k, k + 1);
      load_word(MB + k, (k / 4 + 2) * (k % 4 + 1) - 7);
    end
    run("matmul", 200000);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        logic [31:0] sum;
        sum = 0;
        for (int k = 0; k < 4; k++) sum += (r * 4 + k + 1) * ((k + 2) * (c + 1) - 7);
        check($sformatf("matmul C[%0d][%0d]", r, c), dut.u_mem.mem[MC + 4 * r + c], sum);
      end
    report("matmul");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
