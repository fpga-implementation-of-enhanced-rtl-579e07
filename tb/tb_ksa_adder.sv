// tb_ksa_adder: checks the Kogge-Stone adder against the built-in '+' for
// three widths (16, 9 and 5 bits), exhaustively for 5 bits and with random
// and boundary operands and carry-in for the others.
module tb_ksa_adder;
  logic [15:0] a16, b16, s16;
  logic [8:0]  a9, b9, s9;
  logic [4:0]  a5, b5, s5;
  logic        cin, c16, c9, c5;
  int checks = 0, failures = 0;

  ksa_adder #(.W(16)) dut16 (.a(a16), .b(b16), .cin(cin), .s(s16), .cout(c16));
  ksa_adder #(.W(9))  dut9  (.a(a9),  .b(b9),  .cin(cin), .s(s9),  .cout(c9));
  ksa_adder #(.W(5))  dut5  (.a(a5),  .b(b5),  .cin(cin), .s(s5),  .cout(c5));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2048; n++) begin
      {cin, a5, b5} = 11'(n);
      if (n < 8) begin
        a16 = (n & 1) ? 16'hffff : 16'h0;  b16 = (n & 2) ? 16'hffff : 16'h0001;
        a9  = (n & 1) ? 9'h1ff : 9'h0;     b9  = (n & 2) ? 9'h1ff : 9'h001;
      end else begin
        a16 = 16'($urandom); b16 = 16'($urandom);
        a9  = 9'($urandom);  b9  = 9'($urandom);
      end
      #1;
      checks++;
      if ({c16, s16} !== 17'(a16) + 17'(b16) + 17'(cin) ||
          {c9, s9}   !== 10'(a9)  + 10'(b9)  + 10'(cin) ||
          {c5, s5}   !== 6'(a5)   + 6'(b5)   + 6'(cin)) begin
        failures++;
        if (failures < 10) $display("mismatch a16=%h b16=%h cin=%b s16=%h", a16, b16, cin, s16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
