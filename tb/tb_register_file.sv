// tb_register_file: writes every register, reads them back on both ports against a
// reference array, checks that register 0 stays zero, that RegWr = 0 writes nothing,
// and that a write becomes visible only after the clock edge.
module tb_register_file;
  import cpu_pkg::*;
  logic     clk = 0;
  logic     reg_wr;
  reg_idx_t rw, ra, rb;
  word_t    bus_w, bus_a, bus_b;
  word_t    model [32];
  logic     known [32];
  int checks = 0, failures = 0;

  register_file dut (.clk(clk), .reg_wr(reg_wr), .rw(rw), .bus_w(bus_w),
                     .ra(ra), .rb(rb), .bus_a(bus_a), .bus_b(bus_b));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input reg_idx_t r, input word_t v, input logic we);
    @(negedge clk);
    reg_wr = we; rw = r; bus_w = v;
    ra = r; rb = r;
    #1;
    // before the edge the old value is still read
    if (known[r]) begin
      checks++;
      if (bus_a !== model[r]) begin
        failures++; $display("FAIL write-through before edge r=%0d", r);
      end
    end
    @(posedge clk);
    if (we && r != 0) begin model[r] = v; known[r] = 1'b1; end
    #1 reg_wr = 0;
  endtask

  task automatic read_check(input reg_idx_t x, input reg_idx_t y);
    ra = x; rb = y;
    #1;
    checks++;
    if (bus_a !== model[x] || bus_b !== model[y]) begin
      failures++;
      $display("FAIL read ra=%0d rb=%0d got %h %h expected %h %h", x, y, bus_a, bus_b, model[x], model[y]);
    end
  endtask

  initial begin
    reg_wr = 0; rw = 0; bus_w = 0; ra = 0; rb = 0;
    foreach (known[i]) known[i] = 1'b0;
    model[0] = 0; known[0] = 1'b1;
    for (int r = 1; r < 32; r++) begin
      write(reg_idx_t'(r), $urandom, 1'b1);
    end
    write(5'd0, 32'hdead_beef, 1'b1);          // register 0 ignores writes
    for (int i = 0; i < 32; i++) read_check(reg_idx_t'(i), reg_idx_t'(31 - i));
    for (int i = 0; i < 100; i++) begin
      write(reg_idx_t'($urandom), $urandom, 1'($urandom));
      read_check(reg_idx_t'($urandom), reg_idx_t'($urandom));
    end
    for (int i = 0; i < 32; i++) read_check(reg_idx_t'(i), reg_idx_t'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
