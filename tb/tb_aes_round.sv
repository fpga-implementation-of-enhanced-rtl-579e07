// tb_aes_round: streams random blocks with random modes, one per clock,
// into three round stages (round 1, round 2 and the last round 14) with
// the key pairs of random cipher keys, and compares every output two clocks
// later with the reference round (encryption or decryption order, MixColumns
// left out in the last round) and with the next key pair of the reference
// key expansion. The two-clock latency is checked through out_valid.
module tb_aes_round;
  import aes_ref_pkg::*;
  typedef struct {
    logic [127:0] st [3];
    logic [127:0] ka [3];
    logic [127:0] kb [3];
    logic         dec;
  } exp_t;

  logic         clk = 0, rst, in_valid, in_dec;
  logic [127:0] in_state, in_ka [3], in_kb [3];
  logic         out_valid [3], out_dec [3];
  logic [127:0] out_state [3], out_ka [3], out_kb [3];
  exp_t         q [$];
  int checks = 0, failures = 0;
  localparam int RND [3] = '{1, 2, 14};

  for (genvar i = 0; i < 3; i++) begin : g_dut
    aes_round #(.PIPE(1'b1), .ROUND(RND[i]), .LAST(RND[i] == 14)) dut (
      .clk(clk), .rst(rst), .in_valid(in_valid), .in_dec(in_dec), .in_state(in_state),
      .in_ka(in_ka[i]), .in_kb(in_kb[i]),
      .out_valid(out_valid[i]), .out_dec(out_dec[i]), .out_state(out_state[i]),
      .out_ka(out_ka[i]), .out_kb(out_kb[i]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] ref_round(logic [127:0] s, logic [127:0] k, bit dec, bit last);
    if (!dec) begin
      s = shift_rows_ref(sub_ref(s, 0), 0);
      if (!last) s = mix_ref(s, 0);
      return s ^ k;
    end
    s = sub_ref(shift_rows_ref(s, 1), 1) ^ k;
    return last ? s : mix_ref(s, 1);
  endfunction

  // compare the stage outputs with the head of the queue
  always @(negedge clk) begin
    if (!rst) begin
      if (out_valid[0]) begin
        exp_t e;
        e = q.pop_front();
        for (int i = 0; i < 3; i++) begin
          checks++;
          if (out_state[i] !== e.st[i] || out_ka[i] !== e.ka[i] || (RND[i] < 14 && out_kb[i] !== e.kb[i])
              || out_dec[i] !== e.dec || !out_valid[i]) begin
            failures++;
            $display("round %0d dec=%0d got=%032h exp=%032h", RND[i], e.dec, out_state[i], e.st[i]);
          end
        end
      end
    end
  end

  initial begin
    sched_t w;
    int     lat_fail = 0;
    rst = 1; in_valid = 0; in_dec = 0; in_state = 0;
    for (int i = 0; i < 3; i++) begin in_ka[i] = 0; in_kb[i] = 0; end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 300; n++) begin
      exp_t e;
      @(negedge clk);
      // the queue holds the blocks entered in the last two clocks
      if (n > 2 && q.size() != 2) lat_fail++;
      w = expand({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      in_valid = 1;
      in_dec   = $urandom_range(0, 1);
      in_state = {$urandom, $urandom, $urandom, $urandom};
      e.dec = in_dec;
      for (int i = 0; i < 3; i++) begin
        int r;
        r = RND[i];
        if (!in_dec) begin
          in_ka[i] = round_key(w, r - 1); in_kb[i] = round_key(w, r);
          e.st[i] = ref_round(in_state, round_key(w, r), 0, r == 14);
          e.ka[i] = round_key(w, r);
          e.kb[i] = (r < 14) ? round_key(w, r + 1) : 128'h0;
        end else begin
          in_ka[i] = round_key(w, 15 - r); in_kb[i] = round_key(w, 14 - r);
          e.st[i] = ref_round(in_state, round_key(w, 14 - r), 1, r == 14);
          e.ka[i] = round_key(w, 14 - r);
          e.kb[i] = (r < 14) ? round_key(w, 13 - r) : 128'h0;
        end
      end
      // the key pair after round 14 is never used: compare only what exists
      q.push_back(e);
    end
    @(negedge clk) in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (lat_fail != 0 || q.size() != 0) begin
      failures++;
      $display("latency: %0d clocks with a wrong number of blocks in flight, %0d left", lat_fail, q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
