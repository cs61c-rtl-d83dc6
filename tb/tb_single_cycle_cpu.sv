// tb_single_cycle_cpu: end-to-end test of the processor at its default sizes.
//
// An instruction-level reference model (written here from the MIPS definitions of add,
// sub, ori, lw, sw, beq and j) runs in lockstep with the processor: every clock it
// executes exactly one instruction, and the test compares the PC, the fetched word and,
// for register-writing instructions, the value on busW. The processor is observed only
// through its ports: a first program clears the data memory and the registers, and a
// dump program later streams every register and memory word over busW (writes to $0
// are discarded), so the complete state is compared with the model.
//
// Program 1 is a small hand-written loop (sum 5+4+3+2+1, store it, load it back, ...)
// whose final register values are also checked against numbers worked out by hand.
// Program 2 fills the whole instruction memory with random valid instructions.
// The test counts how often each mechanism occurs (each instruction, beq taken and not
// taken, negative load/store offsets, ori with immediate bit 15 set, writes to $0) and
// counts a failure for any that never happened. One instruction per clock (CPI = 1) is
// checked by the lockstep comparison itself.
module tb_single_cycle_cpu;
  import cpu_pkg::*;
  localparam int unsigned IW = 1024;   // default instruction memory depth
  localparam int unsigned DW = 1024;   // default data memory depth

  logic             clk = 0, rst_n;
  logic             prog_we;
  logic [9:0]       prog_addr;
  word_t            prog_data, pc, instruction, alu_out, bus_w;

  single_cycle_cpu dut (
    .clk(clk), .rst_n(rst_n), .prog_we(prog_we), .prog_addr(prog_addr),
    .prog_data(prog_data), .pc(pc), .instruction(instruction),
    .alu_out(alu_out), .bus_w(bus_w));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) cycles++;

  // ---------------- reference model ----------------
  word_t imem [IW];
  word_t r_rf [32];
  word_t r_dm [DW];
  word_t r_pc;

  typedef enum int {M_ADD, M_SUB, M_ORI, M_LW, M_SW, M_BEQ_T, M_BEQ_NT, M_J,
                    M_NEG_OFF, M_ORI_HI, M_WR_ZERO, M_NUM} mech_e;
  int mech [M_NUM];

  function automatic word_t enc_r(int fn, int s, int t, int d);
    return {6'b00_0000, 5'(s), 5'(t), 5'(d), 5'd0, 6'(fn)};
  endfunction
  function automatic word_t enc_i(int op, int s, int t, int imm);
    return {6'(op), 5'(s), 5'(t), 16'(imm)};
  endfunction
  function automatic word_t enc_j(int target_word);
    return {6'b00_0010, 26'(target_word)};
  endfunction
  function automatic word_t ADD(int d, int s, int t); return enc_r('h20, s, t, d); endfunction
  function automatic word_t SUB(int d, int s, int t); return enc_r('h22, s, t, d); endfunction
  function automatic word_t ORI(int t, int s, int imm); return enc_i('h0d, s, t, imm); endfunction
  function automatic word_t LW(int t, int imm, int s);  return enc_i('h23, s, t, imm); endfunction
  function automatic word_t SW(int t, int imm, int s);  return enc_i('h2b, s, t, imm); endfunction
  function automatic word_t BEQ(int s, int t, int off); return enc_i('h04, s, t, off); endfunction

  // execute one instruction in the model; returns whether it writes a register and the value
  task automatic model_step(output logic wr, output word_t val);
    word_t i, a, b, se, ad, npc;
    logic [5:0] op, fn;
    int s, t, d;
    i  = imem[(r_pc >> 2) % IW];
    op = i[31:26]; fn = i[5:0];
    s = int'(i[25:21]); t = int'(i[20:16]); d = int'(i[15:11]);
    a = r_rf[s]; b = r_rf[t];
    se = {{16{i[15]}}, i[15:0]};
    npc = r_pc + 4;
    wr = 0; val = 0;
    if (op == 6'h00 && (fn == 6'h20 || fn == 6'h22)) begin
      val = (fn == 6'h20) ? a + b : a - b;
      wr = 1;
      mech[fn == 6'h20 ? M_ADD : M_SUB]++;
      if (d == 0) mech[M_WR_ZERO]++; else r_rf[d] = val;
    end else if (op == 6'h0d) begin
      val = a | {16'h0, i[15:0]};
      wr = 1;
      mech[M_ORI]++;
      if (i[15]) mech[M_ORI_HI]++;
      if (t == 0) mech[M_WR_ZERO]++; else r_rf[t] = val;
    end else if (op == 6'h23) begin
      ad = a + se;
      val = r_dm[(ad >> 2) % DW];
      wr = 1;
      mech[M_LW]++;
      if (i[15]) mech[M_NEG_OFF]++;
      if (t == 0) mech[M_WR_ZERO]++; else r_rf[t] = val;
    end else if (op == 6'h2b) begin
      ad = a + se;
      r_dm[(ad >> 2) % DW] = b;
      mech[M_SW]++;
      if (i[15]) mech[M_NEG_OFF]++;
    end else if (op == 6'h04) begin
      if (a == b) begin npc = r_pc + 4 + (se << 2); mech[M_BEQ_T]++; end
      else mech[M_BEQ_NT]++;
    end else if (op == 6'h02) begin
      npc = {npc[31:28], i[25:0], 2'b00};
      mech[M_J]++;
    end
    r_pc = npc;
  endtask

  // ---------------- harness ----------------
  task automatic load_program(input int n);
    rst_n = 0;
    for (int w = 0; w < n; w++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 10'(w); prog_data = imem[w];
    end
    @(negedge clk); prog_we = 0;
    @(negedge clk);
    rst_n = 1;
    r_pc = 0;
  endtask

  // run n instructions in lockstep; we are at a negedge with rst_n just released
  task automatic run(input int n);
    logic  wr;
    word_t val;
    int    c0;
    c0 = cycles;
    for (int k = 0; k < n; k++) begin
      if (k > 0) @(negedge clk);
      checks++;
      if (pc !== r_pc || instruction !== imem[(r_pc >> 2) % IW]) begin
        failures++;
        $display("FAIL step %0d: pc=%h instr=%h, model pc=%h instr=%h", k, pc, instruction,
                 r_pc, imem[(r_pc >> 2) % IW]);
      end
      model_step(wr, val);
      if (wr) begin
        checks++;
        if (bus_w !== val) begin
          failures++; $display("FAIL step %0d: instr %h busW=%h expected %h", k, instruction, bus_w, val);
        end
      end
    end
    @(negedge clk);
    checks++;
    if (pc !== r_pc) begin failures++; $display("FAIL final pc=%h expected %h", pc, r_pc); end
    checks++;   // one instruction per clock
    if (cycles - c0 != n) begin
      failures++; $display("FAIL %0d instructions took %0d cycles", n, cycles - c0);
    end
  endtask

  // Stream the whole state out over busW, in lockstep with the model: "add $0, $r, $0"
  // puts register r on busW, "lw $0, 4w($0)" puts memory word w on busW; both
  // writes to $0 are discarded. The memory is read in two programs of half its size.
  task automatic dump_state();
    for (int half = 0; half < 2; half++) begin
      int n;
      n = 0;
      if (half == 0) for (int r = 1; r < 32; r++) imem[n++] = ADD(0, r, 0);
      for (int w = half * int'(DW) / 2; w < (half + 1) * int'(DW) / 2; w++) imem[n++] = LW(0, 4 * w, 0);
      imem[n] = enc_j(n);
      n++;
      load_program(n);
      run(n);
    end
  endtask

  task automatic expect_model(input string what, input word_t got, input word_t v);
    checks++;
    if (got !== v) begin
      failures++; $display("FAIL program 1: %s = %h expected %h", what, got, v);
    end
  endtask

  initial begin
    int n;
    rst_n = 0; prog_we = 0; prog_addr = 0; prog_data = 0;
    foreach (mech[m]) mech[m] = 0;
    // ---- program 0: clear the data memory and all registers ----
    // The model starts from zero everywhere; nothing that is still unknown is read.
    foreach (r_rf[r]) r_rf[r] = '0;
    foreach (r_dm[w]) r_dm[w] = '0;
    foreach (imem[w]) imem[w] = ORI(0, 0, 0);
    n = 0;
    imem[n++] = ORI(1, 0, 0);          //  0: $1 = 0 (address)
    imem[n++] = ORI(2, 0, 4);          //  4: $2 = 4
    imem[n++] = ORI(3, 0, 4 * DW);     //  8: $3 = end address
    imem[n++] = SW(0, 0, 1);           // 12: loop: mem[$1] = 0
    imem[n++] = ADD(1, 1, 2);          // 16: $1 += 4
    imem[n++] = BEQ(1, 3, 1);          // 20: if $1 == end goto 28
    imem[n++] = enc_j(3);              // 24: j 12
    for (int r = 1; r < 32; r++) imem[n++] = ORI(r, 0, 0);
    imem[n] = enc_j(n);
    n++;
    load_program(n);
    run(3 + 4 * DW - 1 + 31 + 1);

    // ---- program 1: hand-written ----
    foreach (imem[w]) imem[w] = ORI(0, 0, 0);
    n = 0;
    imem[n++] = ORI(1, 0, 5);          //  0: $1 = 5  (counter)
    imem[n++] = ORI(2, 0, 0);          //  4: $2 = 0  (sum)
    imem[n++] = ORI(3, 0, 1);          //  8: $3 = 1
    imem[n++] = ORI(4, 0, 'h100);      // 12: $4 = 0x100 (base address)
    imem[n++] = ADD(2, 2, 1);          // 16: loop: $2 += $1
    imem[n++] = SUB(1, 1, 3);          // 20: $1 -= 1
    imem[n++] = BEQ(1, 0, 2);          // 24: if $1 == 0 goto 36
    imem[n++] = enc_j(4);              // 28: j 16
    imem[n++] = ORI(9, 0, 'hbad);      // 32: never executed
    imem[n++] = SW(2, 0, 4);           // 36: mem[0x100] = $2
    imem[n++] = LW(5, 0, 4);           // 40: $5 = mem[0x100]
    imem[n++] = ADD(6, 5, 5);          // 44: $6 = 2 * $5
    imem[n++] = ORI(7, 0, 'hffff);     // 48: $7 = 0x0000ffff (zero extension)
    imem[n++] = SW(7, 'hfffc, 4);      // 52: mem[0xfc] = $7 (negative offset)
    imem[n++] = LW(8, 'hfffc, 4);      // 56: $8 = mem[0xfc]
    imem[n++] = SUB(10, 0, 3);         // 60: $10 = -1
    imem[n++] = ADD(0, 3, 3);          // 64: write to $0 is ignored
    imem[n++] = BEQ(0, 0, 1);          // 68: always taken, skip 72
    imem[n++] = ORI(9, 0, 'hbad);      // 72: never executed
    imem[n++] = ORI(11, 0, 'h8000);    // 76: $11 = 0x00008000
    imem[n] = enc_j(n);                // 80: j 80 (stay)
    n++;
    load_program(n);
    run(4 + 5 * 4 - 1 + 11 + 2);   // set-up, loop, tail, two turns of the final j
    dump_state();
    expect_model("$1", r_rf[1], 32'd0);
    expect_model("$2", r_rf[2], 32'd15);
    expect_model("$5", r_rf[5], 32'd15);
    expect_model("$6", r_rf[6], 32'd30);
    expect_model("$7", r_rf[7], 32'h0000_ffff);
    expect_model("$8", r_rf[8], 32'h0000_ffff);
    expect_model("$9", r_rf[9], 32'd0);
    expect_model("$10", r_rf[10], 32'hffff_ffff);
    expect_model("$11", r_rf[11], 32'h0000_8000);
    expect_model("mem[0x100]", r_dm[32'h100 >> 2], 32'd15);
    expect_model("mem[0xfc]", r_dm[32'hfc >> 2], 32'h0000_ffff);

    // ---- program 2: random instructions over the whole instruction memory, 10 times ----
    for (int p = 0; p < 10; p++) begin
      for (int w = 0; w < int'(IW); w++) begin
        int sel;
        sel = $urandom_range(99);
        if (sel < 15)      imem[w] = ADD($urandom_range(31), $urandom_range(31), $urandom_range(31));
        else if (sel < 30) imem[w] = SUB($urandom_range(31), $urandom_range(31), $urandom_range(31));
        else if (sel < 50) imem[w] = ORI($urandom_range(31), $urandom_range(31), $urandom_range(65535));
        else if (sel < 65) imem[w] = LW($urandom_range(31), $urandom_range(65535), $urandom_range(31));
        else if (sel < 80) imem[w] = SW($urandom_range(31), $urandom_range(65535), $urandom_range(31));
        else if (sel < 95) begin
          // equal registers a quarter of the time, so both outcomes occur; short offsets
          int s;
          s = $urandom_range(31);
          imem[w] = BEQ(s, ($urandom_range(3) == 0) ? s : $urandom_range(31), $urandom_range(16) - 8);
        end
        else               imem[w] = enc_j($urandom_range(IW - 1));
      end
      load_program(IW);
      run(2000);
    end
    dump_state();

    for (int m = 0; m < M_NUM; m++) begin
      mech_e e;
      e = mech_e'(m);
      $display("mechanism %-10s occurred %0d times", e.name(), mech[m]);
      checks++;
      if (mech[m] == 0) begin failures++; $display("FAIL mechanism %s never occurred", e.name()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
