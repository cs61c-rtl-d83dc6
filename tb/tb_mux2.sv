// tb_mux2: self-checking test of the 2:1 multiplexer with random operands on both
// select values, compared against a direct reference expression.
module tb_mux2;
  logic [31:0] in0, in1, out;
  logic        sel;
  int checks = 0, failures = 0;

  mux2 #(.WIDTH(32)) dut (.in0(in0), .in1(in1), .sel(sel), .out(out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      in0 = $urandom; in1 = $urandom; sel = i[0];
      #1;
      checks++;
      if (out !== (i[0] ? in1 : in0)) begin
        failures++;
        $display("FAIL sel=%0b in0=%h in1=%h out=%h", sel, in0, in1, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
