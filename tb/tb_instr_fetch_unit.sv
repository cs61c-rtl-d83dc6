// tb_instr_fetch_unit: loads random instruction words, then drives nPC_sel, Zero and
// Jump at random for many cycles and checks every cycle that
//   - Instruction equals the word stored at PC,
//   - the next PC is PC+4, PC+4+SignExt(imm16)*4 (only when nPC_sel AND Zero) or the
//     jump target {(PC+4)<31:28>, target, 00},
// using a reference model of the PC. Also checks reset and that each PC update takes
// exactly one clock.
module tb_instr_fetch_unit;
  import cpu_pkg::*;
  localparam int unsigned WORDS = 64;
  logic                     clk = 0, rst_n;
  logic                     npc_sel, zero, jump;
  logic                     prog_we;
  logic [$clog2(WORDS)-1:0] prog_addr;
  word_t                    prog_data, pc, instruction;
  word_t                    model [WORDS];
  word_t                    ref_pc, exp_next, off;
  int checks = 0, failures = 0;
  int n_plus4 = 0, n_branch = 0, n_jump = 0, n_br_not_taken = 0;

  instr_fetch_unit #(.IMEM_WORDS(WORDS), .RESET_PC(32'h0000_0040)) dut (
    .clk(clk), .rst_n(rst_n), .npc_sel(npc_sel), .zero(zero), .jump(jump),
    .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data),
    .pc(pc), .instruction(instruction));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; npc_sel = 0; zero = 0; jump = 0; prog_we = 0; prog_addr = 0; prog_data = 0;
    for (int unsigned w = 0; w < WORDS; w++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = w[$clog2(WORDS)-1:0]; prog_data = $urandom;
      model[w] = prog_data;
    end
    @(negedge clk); prog_we = 0;
    @(posedge clk); #1;
    checks++;
    if (pc !== 32'h0000_0040) begin failures++; $display("FAIL reset pc=%h", pc); end
    @(negedge clk); rst_n = 1;
    ref_pc = 32'h0000_0040;
    for (int i = 0; i < 1000; i++) begin
      if (i > 0) @(negedge clk);
      npc_sel = 1'($urandom); zero = 1'($urandom); jump = ($urandom_range(7) == 0);
      #1;
      checks++;
      if (pc !== ref_pc || instruction !== model[(ref_pc >> 2) % WORDS]) begin
        failures++; $display("FAIL pc=%h ref=%h instr=%h", pc, ref_pc, instruction);
      end
      off = {{14{instruction[15]}}, instruction[15:0], 2'b00};
      if (jump) begin
        exp_next = {4'((ref_pc + 32'd4) >> 28), instruction[25:0], 2'b00};
        n_jump++;
      end else if (npc_sel && zero) begin
        exp_next = ref_pc + 32'd4 + off;
        n_branch++;
      end else begin
        exp_next = ref_pc + 32'd4;
        if (npc_sel) n_br_not_taken++; else n_plus4++;
      end
      @(posedge clk); #1;
      checks++;
      if (pc !== exp_next) begin
        failures++; $display("FAIL next pc=%h expected %h", pc, exp_next);
      end
      ref_pc = exp_next;
    end
    checks++;
    if (n_plus4 == 0 || n_branch == 0 || n_jump == 0 || n_br_not_taken == 0) begin
      failures++; $display("FAIL a next-PC case never occurred");
    end
    $display("plus4=%0d branch_taken=%0d branch_not_taken=%0d jump=%0d", n_plus4, n_branch, n_br_not_taken, n_jump);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
