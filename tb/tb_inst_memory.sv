// tb_inst_memory: loads random words through the load port, then reads them back
// through the fetch port by byte address (low two bits ignored).
module tb_inst_memory;
  import cpu_pkg::*;
  localparam int unsigned WORDS = 64;
  logic                     clk = 0;
  logic                     prog_we;
  logic [$clog2(WORDS)-1:0] prog_addr;
  word_t                    prog_data, adr, instruction;
  word_t                    model [WORDS];
  int checks = 0, failures = 0;

  inst_memory #(.WORDS(WORDS)) dut (.clk(clk), .prog_we(prog_we), .prog_addr(prog_addr),
                                    .prog_data(prog_data), .adr(adr), .instruction(instruction));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prog_we = 0; prog_addr = 0; prog_data = 0; adr = 0;
    for (int unsigned w = 0; w < WORDS; w++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = w[$clog2(WORDS)-1:0]; prog_data = $urandom;
      model[w] = prog_data;
      @(posedge clk); #1 prog_we = 0;
    end
    for (int i = 0; i < 200; i++) begin
      int unsigned w;
      w = (i < WORDS) ? i : $urandom_range(WORDS - 1);
      adr = (w << 2) | ($urandom & 3);
      #1;
      checks++;
      if (instruction !== model[w]) begin
        failures++; $display("FAIL word %0d got %h expected %h", w, instruction, model[w]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
