// tb_ldpc_decoder: self-checking test of the layered min-sum decoder.
//
// Random messages are encoded by the reference encoder, sent through a BPSK
// plus noise channel model at several noise levels, and decoded by two
// instances: the default 16-message-bit decoder (two layers, two
// iterations) and a 6-message-bit decoder on the 6 x 12 example matrix with
// three iterations. Every decoded word must equal the reference decoder's
// result bit for bit; the latency from load to out_valid must be NL*ITER+2
// clocks and in_ready must stay low while a decode is running. The test
// also counts words whose channel errors the decoder corrected.
module tb_ldpc_decoder;
  import ldpc_ref_pkg::*;

  localparam int K  = 16;
  localparam int W  = 32;
  localparam int K6 = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 in_valid = 0, in_ready, out_valid;
  logic signed [W-1:0]  llr [2*K];
  logic [2*K-1:0]       out_codeword;
  logic [K-1:0]         out_msg;

  logic                 in_valid6 = 0, in_ready6, out_valid6;
  logic signed [W-1:0]  llr6 [2*K6];
  logic [2*K6-1:0]      out_codeword6;
  logic [K6-1:0]        out_msg6;

  ldpc_decoder dut (
    .clk, .rst_n, .in_valid, .in_ready, .llr, .out_valid, .out_codeword, .out_msg);
  ldpc_decoder #(.K(K6), .ITER(3)) dut6 (
    .clk, .rst_n, .in_valid(in_valid6), .in_ready(in_ready6), .llr(llr6),
    .out_valid(out_valid6), .out_codeword(out_codeword6), .out_msg(out_msg6));

  int checks = 0, failures = 0;
  int corrected = 0, noisy = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_one(int k, int nl, int iters, int sigma);
    logic [MAXK-1:0] msg;
    logic [MAXN-1:0] cw, hard, expect_cw;
    longint          ch [MAXN];
    int              lat;
    logic [MAXN-1:0] got;
    logic [MAXK-1:0] got_msg;

    msg = {$urandom, $urandom};
    for (int i = k; i < MAXK; i++) msg[i] = 1'b0;
    cw   = encode(k, msg);
    hard = '0;
    for (int i = 0; i < MAXN; i++) begin
      ch[i] = (i < 2 * k) ? channel(cw[i], 8, sigma) : 0;
      if (i < 2 * k) hard[i] = (ch[i] > 0) ? 1'b0 : 1'b1;
    end
    expect_cw = decode(k, nl, iters, 0, ch);

    @(negedge clk);
    if (k == K) begin
      check(in_ready, "ready before load");
      for (int i = 0; i < 2 * K; i++) llr[i] = W'(ch[i]);
      in_valid = 1;
    end else begin
      check(in_ready6, "ready before load (K=6)");
      for (int i = 0; i < 2 * K6; i++) llr6[i] = W'(ch[i]);
      in_valid6 = 1;
    end
    @(negedge clk);
    in_valid = 0; in_valid6 = 0;
    lat = 1;
    while (!((k == K) ? out_valid : out_valid6)) begin
      check((k == K) ? !in_ready : !in_ready6, "not ready while decoding");
      @(negedge clk);
      lat++;
      if (lat > 100) break;
    end
    check(lat == nl * iters + 2, $sformatf("latency %0d, expected %0d", lat, nl * iters + 2));
    got = '0; got_msg = '0;
    if (k == K) begin
      got[2*K-1:0] = out_codeword; got_msg[K-1:0] = out_msg;
    end else begin
      got[2*K6-1:0] = out_codeword6; got_msg[K6-1:0] = out_msg6;
    end
    check(got == expect_cw,
          $sformatf("K=%0d sigma=%0d: decoded %h, reference %h", k, sigma, got, expect_cw));
    check(got_msg == MAXK'(expect_cw >> k), "message field is the upper half of the codeword");
    if (hard != cw) begin
      noisy++;
      if (got == cw) corrected++;
    end
  endtask

  initial begin
    for (int i = 0; i < 2 * K; i++) llr[i] = '0;
    for (int i = 0; i < 2 * K6; i++) llr6[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s <= 12; s += 3)
      for (int i = 0; i < 60; i++) begin
        run_one(K, 2, 2, s);
        run_one(K6, 2, 3, s);
      end
    $display("noisy words %0d, corrected %0d", noisy, corrected);
    check(corrected > 0, "some channel errors were corrected");
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
