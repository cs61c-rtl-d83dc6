// tb_datapath: drives the datapath with the control settings of add, sub, ori, lw, sw
// and beq (written out here from the control table, independently of the decoder) and
// random register numbers and immediates. A reference model of the 32 registers and the
// data memory predicts, for every instruction, the ALU output, Zero and busW before the
// clock edge, and the registers and memory afterwards. Registers and memory are first
// initialised through ori and sw, so every later value read is known.
module tb_datapath;
  import cpu_pkg::*;
  localparam int unsigned DWORDS = 64;
  logic        clk = 0;
  reg_idx_t    rs, rt, rd;
  logic [15:0] imm16;
  ctrl_t       ctrl;
  logic        zero;
  word_t       alu_out, bus_w;
  word_t       rf [32];
  word_t       dm [DWORDS];
  int checks = 0, failures = 0;
  int n_op [6];

  datapath #(.DMEM_WORDS(DWORDS)) dut (.clk(clk), .rs(rs), .rt(rt), .rd(rd), .imm16(imm16),
                                       .ctrl(ctrl), .zero(zero), .alu_out(alu_out), .bus_w(bus_w));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef enum int {I_ADD, I_SUB, I_ORI, I_LW, I_SW, I_BEQ} inst_e;

  function automatic ctrl_t ctrl_of(inst_e k);
    ctrl_t c;
    c = '{reg_dst: 0, alu_src: 0, mem_to_reg: 0, reg_wr: 0, mem_wr: 0, npc_sel: 0,
          jump: 0, ext_op: EXT_ZERO, alu_ctr: ALU_ADD};
    case (k)
      I_ADD: begin c.reg_dst = 1; c.reg_wr = 1; c.alu_ctr = ALU_ADD; end
      I_SUB: begin c.reg_dst = 1; c.reg_wr = 1; c.alu_ctr = ALU_SUB; end
      I_ORI: begin c.alu_src = 1; c.reg_wr = 1; c.ext_op = EXT_ZERO; c.alu_ctr = ALU_OR; end
      I_LW:  begin c.alu_src = 1; c.mem_to_reg = 1; c.reg_wr = 1; c.ext_op = EXT_SIGN; end
      I_SW:  begin c.alu_src = 1; c.mem_wr = 1; c.ext_op = EXT_SIGN; end
      I_BEQ: begin c.npc_sel = 1; c.alu_ctr = ALU_SUB; end
      default: ;
    endcase
    return c;
  endfunction

  task automatic exec(inst_e k, reg_idx_t s, reg_idx_t t, reg_idx_t d, logic [15:0] im);
    word_t a, b, se, ze, r, w;
    logic  z;
    @(negedge clk);
    rs = s; rt = t; rd = d; imm16 = im; ctrl = ctrl_of(k);
    a = rf[s]; b = rf[t];
    se = {{16{im[15]}}, im};
    ze = {16'h0, im};
    case (k)
      I_ADD: r = a + b;
      I_SUB: r = a - b;
      I_ORI: r = a | ze;
      I_LW, I_SW: r = a + se;
      default: r = a - b;
    endcase
    z = (r == 0);
    w = (k == I_LW) ? dm[(r >> 2) % DWORDS] : r;
    #1;
    checks++;
    if (alu_out !== r || zero !== z || (k != I_SW && k != I_BEQ && bus_w !== w)) begin
      failures++;
      $display("FAIL %s rs=%0d rt=%0d imm=%h: alu=%h zero=%b busW=%h expected %h %b %h",
               k.name(), s, t, im, alu_out, zero, bus_w, r, z, w);
    end
    @(posedge clk);
    n_op[k]++;
    case (k)
      I_ADD, I_SUB: if (d != 0) rf[d] = w;
      I_ORI, I_LW:  if (t != 0) rf[t] = w;
      I_SW:         dm[(r >> 2) % DWORDS] = b;
      default: ;
    endcase
  endtask

  initial begin
    inst_e k;
    foreach (rf[i]) rf[i] = '0;
    // initialise every register (ori from $0) and every memory word (sw from $0)
    for (int i = 1; i < 32; i++) exec(I_ORI, 5'd0, reg_idx_t'(i), 5'd0, 16'($urandom));
    for (int i = 0; i < int'(DWORDS); i++) exec(I_SW, 5'd0, reg_idx_t'($urandom), 5'd0, 16'(i * 4));
    for (int i = 0; i < 2000; i++) begin
      k = inst_e'($urandom_range(5));
      if (k == I_LW || k == I_SW)
        exec(k, 5'd0, reg_idx_t'($urandom), 5'd0, 16'($urandom_range(DWORDS * 4 - 1)));
      else if (k == I_BEQ && i[0])
        begin automatic reg_idx_t x = reg_idx_t'($urandom); exec(k, x, x, 5'd0, 16'($urandom)); end
      else
        exec(k, reg_idx_t'($urandom), reg_idx_t'($urandom), reg_idx_t'($urandom), 16'($urandom));
    end
    // negative offsets: lw/sw through a base register
    exec(I_ORI, 5'd0, 5'd1, 5'd0, 16'h0080);
    exec(I_SW, 5'd1, 5'd2, 5'd0, 16'hfffc);
    exec(I_LW, 5'd1, 5'd3, 5'd0, 16'hfffc);
    // read back every register through add with $0
    for (int i = 0; i < 32; i++) exec(I_ADD, reg_idx_t'(i), 5'd0, 5'd0, 16'h0);
    $display("add=%0d sub=%0d ori=%0d lw=%0d sw=%0d beq=%0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
