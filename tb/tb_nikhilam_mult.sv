// tb_nikhilam_mult: exhaustive test of the 8-bit Nikhilam multiplier (all
// 65536 operand pairs, including 0 and values far from the base) against the
// built-in product, plus random operands for a 5-bit instance.
module tb_nikhilam_mult;
  logic [7:0]  a, b;
  logic [15:0] p;
  logic [4:0]  a5, b5;
  logic [9:0]  p5;
  int checks = 0, failures = 0;

  nikhilam_mult #(.N(8)) dut  (.a(a), .b(b), .p(p));
  nikhilam_mult #(.N(5)) dut5 (.a(a5), .b(b5), .p(p5));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 65536; n++) begin
      {a, b} = 16'(n);
      {a5, b5} = 10'(n);
      #1;
      checks++;
      if (p !== 16'(a) * 16'(b) || p5 !== 10'(a5) * 10'(b5)) begin
        failures++;
        if (failures < 10) $display("mismatch %0d*%0d got %0d / %0d*%0d got %0d", a, b, p, a5, b5, p5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
