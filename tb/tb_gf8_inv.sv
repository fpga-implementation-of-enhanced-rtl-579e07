// tb_gf8_inv: exhaustive test of the composite-field GF(2^8) inverter, in
// both its combinational (PIPE = 0) and its pipelined (PIPE = 1) form. For
// each byte the combinational output must equal the inverse found by search
// over the AES field; the pipelined copy is fed a new byte every clock and
// must give the same result exactly one clock later.
module tb_gf8_inv;
  import aes_ref_pkg::*;
  logic       clk = 0;
  logic [7:0] x, y0, y1, x_prev;
  int checks = 0, failures = 0;

  gf8_inv #(.PIPE(1'b0)) dut0 (.clk(clk), .x(x), .y(y0));
  gf8_inv #(.PIPE(1'b1)) dut1 (.clk(clk), .x(x), .y(y1));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 0;
    @(posedge clk);
    for (int v = 0; v < 257; v++) begin
      x_prev = x;
      @(negedge clk);
      // after the edge: pipelined output belongs to the previous byte
      checks++;
      if (y1 !== ginv(x_prev)) begin
        failures++;
        $display("PIPE=1 in=%02h got=%02h exp=%02h", x_prev, y1, ginv(x_prev));
      end
      x = 8'(v);
      #1;
      checks++;
      if (y0 !== ginv(x)) begin
        failures++;
        $display("PIPE=0 in=%02h got=%02h exp=%02h", x, y0, ginv(x));
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
