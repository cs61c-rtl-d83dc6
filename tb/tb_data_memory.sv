// tb_data_memory: random writes and reads against a reference array. Checks that the
// read is combinational, that a write lands at the clock edge only when WrEn is 1, and
// that the two low address bits are ignored.
module tb_data_memory;
  import cpu_pkg::*;
  localparam int unsigned WORDS = 64;
  logic  clk = 0;
  logic  wr_en;
  word_t adr, data_in, data_out;
  word_t model [WORDS];
  int checks = 0, failures = 0;

  data_memory #(.WORDS(WORDS)) dut (.clk(clk), .wr_en(wr_en), .adr(adr),
                                    .data_in(data_in), .data_out(data_out));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(input int unsigned w);
    adr = (w << 2) | ($urandom & 3);
    #1;
    checks++;
    if (data_out !== model[w]) begin
      failures++; $display("FAIL read word %0d got %h expected %h", w, data_out, model[w]);
    end
  endtask

  initial begin
    wr_en = 0; adr = 0; data_in = 0;
    // fill every word
    for (int unsigned w = 0; w < WORDS; w++) begin
      @(negedge clk);
      wr_en = 1; adr = w << 2; data_in = $urandom;
      model[w] = data_in;
      @(posedge clk); #1 wr_en = 0;
    end
    for (int unsigned w = 0; w < WORDS; w++) check_read(w);
    for (int i = 0; i < 300; i++) begin
      int unsigned w;
      logic we;
      w = $urandom_range(WORDS - 1);
      we = 1'($urandom);
      @(negedge clk);
      wr_en = we; adr = w << 2; data_in = $urandom;
      #1;
      checks++;   // not written before the edge
      if (data_out !== model[w]) begin
        failures++; $display("FAIL early write word %0d", w);
      end
      @(posedge clk);
      if (we) model[w] = data_in;
      #1 wr_en = 0;
      check_read(w);
      check_read($urandom_range(WORDS - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
