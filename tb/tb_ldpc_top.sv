// tb_ldpc_top: end-to-end test of the LDPC link at its default size.
//
// Each round: a random 16-bit message enters the encoder; the encoder's
// 32-bit codeword goes through a BPSK plus noise channel model (outside the
// design, as in the real link) to give 32 soft values; the decoder decodes
// them. The decoded word must equal the reference layered min-sum decoder's
// result, and on a noiseless channel it must equal the transmitted codeword.
// Latencies are checked (encoder 1 clock, decoder NL*ITER+2 = 6 clocks).
//
// It also counts how often each mechanism of the decoder was exercised and
// fails if one never was: layer 1 and layer 2 passes, the feedback into a
// second iteration, the min2 substitution in a check node, a negative
// (odd-parity) check message, both outcomes of the threshold decision,
// corrected channel errors, and a load request ignored while busy.
module tb_ldpc_top;
  import ldpc_ref_pkg::*;

  localparam int K = ldpc_pkg::K_DEF;
  localparam int W = ldpc_pkg::LLR_W_DEF;
  localparam int N = 2 * K;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                enc_in_valid = 0, enc_out_valid;
  logic [K-1:0]        enc_msg = '0;
  logic [N-1:0]        enc_codeword;
  logic                dec_in_valid = 0, dec_in_ready, dec_out_valid;
  logic signed [W-1:0] dec_llr [N];
  logic [N-1:0]        dec_codeword;
  logic [K-1:0]        dec_msg;

  ldpc_top dut (.*);

  int checks = 0, failures = 0;
  int n_layer1 = 0, n_layer2 = 0, n_iter2 = 0, n_min2 = 0, n_negmsg = 0;
  int n_zero = 0, n_one = 0, n_corrected = 0, n_ignored = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Mechanism monitors (observe the decoder's internals).
  always @(posedge clk) if (rst_n) begin
    if (dut.u_decoder.run && dut.u_decoder.layer == 0) n_layer1++;
    if (dut.u_decoder.run && dut.u_decoder.layer == 1) n_layer2++;
    if (dut.u_decoder.run && dut.u_decoder.iter == 1)  n_iter2++;
    if (dut.u_decoder.run) begin
      for (int m = 0; m < K; m++) begin
        if (dut.u_decoder.row_active[m]) begin
          for (int e = 0; e < 3; e++)
            if (dut.u_decoder.rmem[m][e] != 0 && dut.u_decoder.rmem[m][e] < 0) n_negmsg++;
        end
      end
    end
    if (dec_in_valid && !dec_in_ready) n_ignored++;
    if (dec_out_valid) begin
      for (int i = 0; i < N; i++) if (dec_codeword[i]) n_one++; else n_zero++;
    end
  end

  // min2 substitution: some check node output magnitude differs from the
  // others of its row (the smallest input received the second minimum).
  for (genvar j = 0; j < K / 2; j++) begin : g_mon
    always @(posedge clk) if (rst_n && dut.u_decoder.run) begin
      logic [W-1:0] a0, a1, a2;
      a0 = dut.u_decoder.cn_r[j][0][W-1] ? -dut.u_decoder.cn_r[j][0] : dut.u_decoder.cn_r[j][0];
      a1 = dut.u_decoder.cn_r[j][1][W-1] ? -dut.u_decoder.cn_r[j][1] : dut.u_decoder.cn_r[j][1];
      a2 = dut.u_decoder.cn_r[j][2][W-1] ? -dut.u_decoder.cn_r[j][2] : dut.u_decoder.cn_r[j][2];
      if (a0 != a1 || a1 != a2) n_min2++;
    end
  end

  task automatic round(int sigma, bit poke_busy);
    logic [MAXK-1:0] msg;
    logic [MAXN-1:0] ref_cw, hard, expect_cw;
    longint          ch [MAXN];
    int              lat;

    msg = MAXK'($urandom) & MAXK'((1 << K) - 1);
    ref_cw = encode(K, msg);

    @(negedge clk);
    enc_msg = K'(msg); enc_in_valid = 1;
    @(negedge clk);
    enc_in_valid = 0;
    check(enc_out_valid, "encoder output one clock after its input");
    check(enc_codeword == ref_cw[N-1:0], $sformatf("encoder %h, reference %h", enc_codeword, ref_cw[N-1:0]));

    hard = '0;
    for (int i = 0; i < MAXN; i++) begin
      ch[i] = (i < N) ? channel(enc_codeword[i], 8, sigma) : 0;
      if (i < N) hard[i] = (ch[i] > 0) ? 1'b0 : 1'b1;
    end
    expect_cw = decode(K, 2, 2, 0, ch);

    check(dec_in_ready, "decoder ready");
    for (int i = 0; i < N; i++) dec_llr[i] = W'(ch[i]);
    dec_in_valid = 1;
    @(negedge clk);
    dec_in_valid = poke_busy;  // a load request while busy must be ignored
    for (int i = 0; i < N; i++) dec_llr[i] = '0;
    lat = 1;
    while (!dec_out_valid && lat < 50) begin
      @(negedge clk);
      lat++;
      dec_in_valid = 0;
    end
    check(lat == 6, $sformatf("decoder latency %0d, expected 6", lat));
    check(dec_codeword == expect_cw[N-1:0],
          $sformatf("sigma %0d: decoded %h, reference %h", sigma, dec_codeword, expect_cw[N-1:0]));
    check(dec_msg == dec_codeword[N-1:K], "decoded message field");
    if (sigma == 0) check(dec_codeword == enc_codeword, "noiseless channel decodes exactly");
    if (hard[N-1:0] != enc_codeword && dec_codeword == enc_codeword) n_corrected++;
  endtask

  initial begin
    for (int i = 0; i < N; i++) dec_llr[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s <= 12; s += 2)
      for (int i = 0; i < 40; i++) round(s, (i % 5) == 0);

    $display("layer1=%0d layer2=%0d iter2=%0d min2=%0d negmsg=%0d zeros=%0d ones=%0d corrected=%0d ignored=%0d",
             n_layer1, n_layer2, n_iter2, n_min2, n_negmsg, n_zero, n_one, n_corrected, n_ignored);
    check(n_layer1 > 0, "layer 1 processed");
    check(n_layer2 > 0, "layer 2 processed");
    check(n_iter2 > 0, "second iteration reached");
    check(n_min2 > 0, "min2 substitution seen");
    check(n_negmsg > 0, "negative check message seen");
    check(n_zero > 0 && n_one > 0, "both decision outcomes seen");
    check(n_corrected > 0, "channel errors corrected");
    check(n_ignored > 0, "load request while busy seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
