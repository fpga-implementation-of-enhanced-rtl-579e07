// tb_aes_sbox: exhaustive test of the integrated S-box in both modes and
// both pipeline settings. The combinational copy is compared with the
// FIPS-197 S-box and its inverse computed in aes_ref_pkg; the pipelined copy
// gets a new byte and a new mode every clock (the mode alternates) and must
// answer one clock later with the mode that came with the byte, and hold
// that answer while the next byte and mode are already applied.
module tb_aes_sbox;
  import aes_ref_pkg::*;
  logic       clk = 0;
  logic       dec, dec_prev;
  logic [7:0] x, y0, y1, x_prev, e;
  int checks = 0, failures = 0;

  aes_sbox #(.PIPE(1'b0)) dut0 (.clk(clk), .dec(dec), .x(x), .y(y0));
  aes_sbox #(.PIPE(1'b1)) dut1 (.clk(clk), .dec(dec), .x(x), .y(y1));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 0; dec = 0;
    @(posedge clk);
    for (int v = 0; v < 513; v++) begin
      x_prev = x; dec_prev = dec;
      @(negedge clk);
      if (v > 0) begin
        e = dec_prev ? inv_sbox(x_prev) : sbox(x_prev);
        checks++;
        if (y1 !== e) begin
          failures++;
          $display("PIPE=1 dec=%0d in=%02h got=%02h exp=%02h", dec_prev, x_prev, y1, e);
        end
      end
      x = 8'(v >> 1);
      dec = v[0];
      #1;
      // the pipelined output must not follow the new inputs before the clock
      if (v > 0) begin
        e = dec_prev ? inv_sbox(x_prev) : sbox(x_prev);
        checks++;
        if (y1 !== e) begin
          failures++;
          $display("PIPE=1 output changed before the clock: in=%02h got=%02h", x_prev, y1);
        end
      end
      e = dec ? inv_sbox(x) : sbox(x);
      checks++;
      if (y0 !== e) begin
        failures++;
        $display("PIPE=0 dec=%0d in=%02h got=%02h exp=%02h", dec, x, y0, e);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
