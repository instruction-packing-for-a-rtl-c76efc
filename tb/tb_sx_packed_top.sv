// tb_sx_packed_top: end-to-end test of the packed-instruction processor.
//
// The testbench holds a small two-pass assembler. Pass one lays sub-
// instructions out in 32-bit words the way the packing scheme allows (an
// L-format only at byte 0, an M-format never at byte 3, an unused tail byte
// left as 0 = "fetch next word"), records the (word, byte) of every label,
// and pass two encodes jump targets as NW (word offset from the word after
// the jump) and NB (target byte). The image is written through the load
// port while reset is held, then the processor runs until it halts. A
// program ends with an L-format entry type at a byte other than 0, which the
// decoder treats as HALT.
// Programs: (1) the twelve packing patterns with stack arithmetic,
// (2) jumps landing inside a word, short and long jumps, taken and
// not-taken conditional jumps, NEW, (3) a recursive function using call and
// return-with-value, and a call that returns without a value, (4) bubble
// sort of 20 descending integers. Results are checked against values worked
// out in the testbench; fetch counts are checked against the image for
// straight-line code, and every mechanism must occur at least once.
// Runs at the default parameters of the top.
module tb_sx_packed_top;
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

  // ------------------------------------------------------------------
  // mechanism monitors (control state numbers: START 0, IF 1, ID0 2,
  // ID1 3, PRE_IF 4, EX 5, HALT 6)
  int n_fetch, n_pre_if, n_halt, n_midword, n_land_nb, n_call, n_ret, n_retv;
  int n_jt_taken, n_jt_not, n_jmps, n_jmp, n_new;
  int pat_seen [string];
  int prev_state;

  function automatic string pattern(logic [31:0] w);
    string s = "";
    int b = 0;
    while (b < 4) begin
      logic [1:0] et = w[31-8*b -: 2];
      if (et == 2'd0) break;
      if (s != "") s = {s, "-"};
      if (et == 2'd1) begin s = {s, "S"}; b += 1; end
      else if (et == 2'd2 && b < 3) begin s = {s, "M"}; b += 2; end
      else if (et == 2'd3 && b == 0) begin s = {s, "L"}; b = 4; end
      else begin s = {s, "halt"}; break; end
    end
    return s;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      int st;
      st = int'(dut.u_ctrl.state);
      if (st == 1) begin
        n_fetch++;
        if (dut.u_dp.bp != 2'd0) n_land_nb++;
      end
      if (st == 2 && prev_state == 1) pat_seen[pattern(dut.u_dp.ir)] = 1;
      if (st == 2 && prev_state == 5) n_midword++;
      if (st == 4) n_pre_if++;
      if (st == 6 && prev_state != 6) n_halt++;
      if (st == 5 && dut.u_ctrl.step == 4'd0) begin
        case (opcode_e'(dut.u_ctrl.op_q))
          OP_CALL: n_call++;
          OP_JMPS: n_jmps++;
          OP_JMP:  n_jmp++;
          OP_NEW:  n_new++;
          default: ;
        endcase
      end
      if (st == 5 && dut.u_ctrl.op_q == OP_RET && dut.u_ctrl.step == 4'd3) n_ret++;
      if (st == 5 && dut.u_ctrl.op_q == OP_RET && dut.u_ctrl.step == 4'd11) n_retv++;
      if (st == 5 && (dut.u_ctrl.op_q == OP_JT || dut.u_ctrl.op_q == OP_JF) && dut.u_ctrl.step == 4'd2) begin
        if (dut.u_ctrl.taken_q) n_jt_taken++; else n_jt_not++;
      end
      prev_state = st;
    end else prev_state = 0;
  end

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------
  localparam int A = 32'h1000;     // data array for bubble sort
  localparam int G = 32'h1100;     // a global written by a void function
  int exp_v;

  initial begin
    // ---------------- program 1: the twelve packing patterns ----------------
    asm_reset();
    L(OP_LIT, 100000); ALIGN();                                   // L
    M(OP_LIT, 1); M(OP_LIT, 2); ALIGN();                          // M-M
    S(OP_ADD); S(OP_ADD); ALIGN();                                // S-S      -> 100003
    M(OP_LIT, 7); ALIGN();                                        // M
    M(OP_LIT, 3); S(OP_ADD); S(OP_ADD); ALIGN();                  // M-S-S    -> 100013
    M(OP_LIT, 5); S(OP_ADD); ALIGN();                             // M-S      -> 100018
    S(OP_DUP); S(OP_ADD); S(OP_DUP); S(OP_ADD);                   // S-S-S-S  -> 400072
    S(OP_DUP); S(OP_ADD); S(OP_NOP); ALIGN();                     // S-S-S    -> 800144
    S(OP_NOP); ALIGN();                                           // S
    S(OP_NOP); S(OP_NOP); M(OP_LIT, 6); ALIGN();                  // S-S-M
    S(OP_NOP); M(OP_LIT, 4); S(OP_ADD);                           // S-M-S    -> 10
    S(OP_ADD); M(OP_LIT, 2); ALIGN();                             // S-M      -> 800154, 2
    S(OP_ADD); HALT();                                            //          -> 800156
    assemble();
    run("patterns", 2000);
    check("patterns TS", dbg_ts, 800156);
    check("patterns SP back at base", dbg_sp, 32'h2000 + 1);      // one word below TS was pushed at start
    check("patterns fetches = words", dbg_fetches, n_words - 1);
    check("patterns sub-instructions", dbg_instrs, 28);

    // ---------------- program 2: jumps, landing mid-word, NEW ----------------
    asm_reset();
    M(OP_LIT, 1);
    MJ(OP_JMPS, 1);                  // short jump over a word
    L(OP_LIT, 999);                  // skipped
    S(OP_NOP); LABEL(1);             // label 1 lands at byte 1 of a word
    M(OP_LIT, 10); S(OP_ADD);        // 11
    M(OP_LIT, 0); LJ(OP_JT, 5);      // not taken
    S(OP_DUP); LJ(OP_JT, 2);         // taken, TS = 11
    M(OP_LIT, 77);                   // skipped
    S(OP_NOP); S(OP_NOP); LABEL(2);  // label 2 at byte 2
    M(OP_LIT, 0); LJ(OP_JF, 3);      // taken
    M(OP_LIT, 55);                   // skipped
    LABEL(3); S(OP_NOP); S(OP_NOP); S(OP_NOP);
    M(OP_LIT, 5); S(OP_NEW); S(OP_DROP);   // AA += 5
    M(OP_LIT, 3); S(OP_NEW);               // TS = HEAP_BASE + 5
    L(OP_LIT, 32'h3005); S(OP_EQ);         // 1
    S(OP_ADD);                             // 11 + 1 = 12
    LJ(OP_JMP, 4);
    LABEL(5); M(OP_LIT, 200); HALT();      // only reached by a wrong JT
    LABEL(4); HALT();
    assemble();
    run("jumps", 2000);
    check("jumps TS", dbg_ts, 12);
    check("jumps AA", dbg_aa, 32'h3000 + 8);
    // long jump backwards: loop counting down from 9, summing into a global
    asm_reset();
    M(OP_LIT, 0); L(OP_LIT, G); S(OP_ST);        // G = 0
    M(OP_LIT, 9);                                // counter
    LABEL(1);
    S(OP_DUP); L(OP_LIT, G); S(OP_LD); S(OP_ADD); L(OP_LIT, G); S(OP_ST); // G += counter
    M(OP_LIT, 1); S(OP_SUB); S(OP_DUP); LJ(OP_JT, 1);
    HALT();
    assemble();
    run("loop", 5000);
    check("loop sum", dut.u_mem.mem[G], 45);
    check("loop TS", dbg_ts, 0);

    // ---------------- program 3: calls ----------------
    // f(n) = n == 0 ? 0 : n + f(n-1), frame size 1 (the argument)
    asm_reset();
    M(OP_LIT, 10); LJ(OP_CALL, 1);               // TS = f(10)
    M(OP_LIT, 77); LJ(OP_CALL, 3);               // g(77): void, stores 77+1000 to G
    S(OP_ADD);                                   // f(10) + 77
    HALT();
    FUNC(1, 1);
    M(OP_GET, 1); LJ(OP_JF, 2);
    M(OP_GET, 1); M(OP_GET, 1); M(OP_LIT, 1); S(OP_SUB);
    LJ(OP_CALL, 1);
    S(OP_ADD); M(OP_RET, 2);
    LABEL(2); M(OP_LIT, 0); M(OP_RET, 2);
    FUNC(3, 1);
    M(OP_GET, 1); L(OP_LIT, 1000); S(OP_ADD); L(OP_LIT, G); S(OP_ST);
    M(OP_RET, 1);
    assemble();
    run("calls", 20000);
    check("calls f(10)+77", dbg_ts, 55 + 77);
    check("calls void store", dut.u_mem.mem[G], 1077);
    check("calls SP restored", dbg_sp, 32'h2000 + 1);
    check("calls FP restored", dbg_fp, 32'h2000);

    // ---------------- program 4: bubble sort of 20 integers ----------------
    // locals: i at FP-1, j at FP-2
    asm_reset();
    M(OP_LIT, 19); M(OP_PUT, 1);
    LABEL(1);                                                     // outer
    M(OP_LIT, 0); M(OP_PUT, 2);
    LABEL(2);                                                     // inner
    M(OP_GET, 2); L(OP_LIT, A); S(OP_ADD); S(OP_LD);
    M(OP_GET, 2); L(OP_LIT, A); S(OP_ADD); M(OP_LIT, 1); S(OP_ADD); S(OP_LD);
    S(OP_GT); LJ(OP_JF, 3);
    M(OP_GET, 2); L(OP_LIT, A); S(OP_ADD); S(OP_LD);
    M(OP_GET, 2); L(OP_LIT, A); S(OP_ADD); M(OP_LIT, 1); S(OP_ADD); S(OP_LD);
    M(OP_GET, 2); L(OP_LIT, A); S(OP_ADD); S(OP_ST);
    M(OP_GET, 2); L(OP_LIT, A); S(OP_ADD); M(OP_LIT, 1); S(OP_ADD); S(OP_ST);
    LABEL(3);                                                     // no swap
    M(OP_GET, 2); M(OP_LIT, 1); S(OP_ADD); S(OP_DUP); M(OP_PUT, 2);
    M(OP_GET, 1); S(OP_LT); LJ(OP_JT, 2);
    M(OP_GET, 1); M(OP_LIT, 1); S(OP_SUB); S(OP_DUP); M(OP_PUT, 1);
    LJ(OP_JT, 1);
    HALT();
    assemble();
    rst_n = 1'b0;
    for (int k = 0; k < 20; k++) load_word(A + k, 20 - k);        // descending
    run("bubble", 100000);
    for (int k = 0; k < 20; k++) check($sformatf("bubble a[%0d]", k), dut.u_mem.mem[A + k], k + 1);
    begin
      int n_ins = 0;
      for (int i = 0; i < n_items; i++)
        if (it_kind[i] == K_S || it_kind[i] == K_M || it_kind[i] == K_L) n_ins++;
      $display("bubble: code %0d bytes packed vs %0d unpacked; fetches %0d vs %0d executed instructions",
               (n_words - 1) * 4, n_ins * 4, dbg_fetches, dbg_instrs);
      check("bubble code smaller when packed", (n_words - 1) < n_ins, 1);
    end

    // ---------------- every mechanism happened ----------------
    begin
      string pats [12] = '{"L", "M-M", "M", "M-S-S", "M-S", "S-S-S-S", "S-S-S", "S-S", "S",
                           "S-S-M", "S-M-S", "S-M"};
      foreach (pats[k]) check({"pattern seen ", pats[k]}, pat_seen.exists(pats[k]), 1);
    end
    check("mechanism PRE_IF > 0", n_pre_if > 0, 1);
    check("mechanism HALT count", n_halt, 5);
    check("mechanism mid-word decode > 0", n_midword > 0, 1);
    check("mechanism jump landing with NB != 0 > 0", n_land_nb > 0, 1);
    check("mechanism JMPS > 0", n_jmps > 0, 1);
    check("mechanism JMP > 0", n_jmp > 0, 1);
    check("mechanism cond jump taken > 0", n_jt_taken > 0, 1);
    check("mechanism cond jump not taken > 0", n_jt_not > 0, 1);
    check("mechanism call > 0", n_call > 0, 1);
    check("mechanism return without value > 0", n_ret > 0, 1);
    check("mechanism return with value > 0", n_retv > 0, 1);
    check("mechanism NEW > 0", n_new > 0, 1);
    $display("counts: fetch %0d pre_if %0d halt %0d midword %0d land_nb %0d jmps %0d jmp %0d jt %0d/%0d call %0d ret %0d retv %0d new %0d",
             n_fetch, n_pre_if, n_halt, n_midword, n_land_nb, n_jmps, n_jmp, n_jt_taken, n_jt_not,
             n_call, n_ret, n_retv, n_new);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
