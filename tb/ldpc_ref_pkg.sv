// ldpc_ref_pkg: behavioural reference for the testbenches.
//
// Builds the parity check matrix as an explicit bit matrix (row m has ones in
// columns m, m-1 mod K and K+m) and runs the layered min-sum procedure on it
// with plain integer arithmetic, scanning whole rows and columns of the
// matrix rather than using the RTL's edge tables. Also gives a systematic
// encoder, a syndrome check and a BPSK-plus-noise channel model that turns a
// codeword into soft values (positive favours 0).
package ldpc_ref_pkg;

  localparam int MAXK = 64;
  localparam int MAXN = 2 * MAXK;

  typedef bit hmat_t [MAXK][MAXN];

  function automatic hmat_t build_h(int k);
    hmat_t h;
    for (int m = 0; m < MAXK; m++)
      for (int n = 0; n < MAXN; n++) h[m][n] = 0;
    for (int m = 0; m < k; m++) begin
      h[m][m]               = 1;
      h[m][(m + k - 1) % k] = 1;
      h[m][k + m]           = 1;
    end
    return h;
  endfunction

  // Codeword bit position of matrix column n: codeword = {message, parity}.
  function automatic int pos(int k, int n);
    return (n < k) ? k + n : n - k;
  endfunction

  // Encode by solving each row for its parity column.
  function automatic logic [MAXN-1:0] encode(int k, logic [MAXK-1:0] msg);
    hmat_t h = build_h(k);
    logic [MAXN-1:0] cw = '0;
    for (int n = 0; n < k; n++) cw[pos(k, n)] = msg[n];
    for (int m = 0; m < k; m++) begin
      bit p = 0;
      for (int n = 0; n < k; n++) if (h[m][n]) p ^= msg[n];
      cw[pos(k, k + m)] = p;
    end
    return cw;
  endfunction

  // Number of unsatisfied checks of a codeword given in {message, parity} form.
  function automatic int syndrome_weight(int k, logic [MAXN-1:0] cw);
    hmat_t h = build_h(k);
    int w = 0;
    for (int m = 0; m < k; m++) begin
      bit s = 0;
      for (int n = 0; n < 2 * k; n++) if (h[m][n]) s ^= cw[pos(k, n)];
      w += s;
    end
    return w;
  endfunction

  // Layered min-sum decoding. llr[i] is the soft value of codeword bit i.
  // Returns the decided codeword in {message, parity} form.
  function automatic logic [MAXN-1:0] decode(int k, int nl, int iters, int thr,
                                             longint llr [MAXN]);
    hmat_t  h = build_h(k);
    longint sum  [MAXN];
    longint q    [MAXN];
    longint rmsg [MAXK][MAXN];
    longint rnew [MAXK][MAXN];
    int     rpl = k / nl;
    logic [MAXN-1:0] cw = '0;

    for (int n = 0; n < 2 * k; n++) sum[n] = llr[pos(k, n)];
    for (int m = 0; m < k; m++)
      for (int n = 0; n < 2 * k; n++) begin rmsg[m][n] = 0; rnew[m][n] = 0; end

    for (int it = 0; it < iters; it++) begin
      for (int l = 0; l < nl; l++) begin
        // remove this layer's old messages from each column
        for (int n = 0; n < 2 * k; n++) begin
          q[n] = sum[n];
          for (int m = l * rpl; m < (l + 1) * rpl; m++) if (h[m][n]) q[n] -= rmsg[m][n];
        end
        // min-sum on every row of the layer
        for (int m = l * rpl; m < (l + 1) * rpl; m++) begin
          for (int n = 0; n < 2 * k; n++) begin
            if (h[m][n]) begin
              longint best = 64'h7fff_ffff_ffff_ffff;
              bit     neg  = 0;
              for (int j = 0; j < 2 * k; j++) begin
                if (h[m][j] && j != n) begin
                  longint a = (q[j] < 0) ? -q[j] : q[j];
                  if (a < best) best = a;
                  if (q[j] < 0) neg = !neg;
                end
              end
              rnew[m][n] = neg ? -best : best;
            end
          end
        end
        // add the new messages back
        for (int n = 0; n < 2 * k; n++) begin
          sum[n] = q[n];
          for (int m = l * rpl; m < (l + 1) * rpl; m++)
            if (h[m][n]) begin
              sum[n] += rnew[m][n];
              rmsg[m][n] = rnew[m][n];
            end
        end
      end
    end
    for (int n = 0; n < 2 * k; n++) cw[pos(k, n)] = (sum[n] > longint'(thr)) ? 1'b0 : 1'b1;
    return cw;
  endfunction

  // Approximately Gaussian noise (sum of 12 uniforms, zero mean), std ~ sigma.
  function automatic int noise(int sigma);
    int acc = 0;
    for (int i = 0; i < 12; i++) acc += int'($urandom_range(0, 1000));
    return ((acc - 6000) * sigma) / 1000;
  endfunction

  // BPSK: bit 0 -> +amp, bit 1 -> -amp, plus noise.
  function automatic longint channel(bit b, int amp, int sigma);
    int s;
    s = b ? -amp : amp;
    return longint'(s) + longint'(noise(sigma));
  endfunction

endpackage
