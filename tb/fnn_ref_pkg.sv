// fnn_ref_pkg: floating-point reference model of the network computed by
// fnn_top, for the testbenches.
//
// It evaluates, in real arithmetic and with the exact exp/log functions, the
// same ensemble of networks from the same fixed-point parameter values the
// hardware is loaded with:
//   h = x * W0^T, hz/hr = PReLU(h, pz/pr), z/r = sum over hidden of hz*Wz, hr*Wr,
//   y_n = softplus(r) * (2*sigmoid(z_scale*z) - 1), y = mean_n clamp(y_n).
// It also counts how often the data takes the branches the testbenches must
// see: negative PReLU inputs and clipped predictions on either side.
package fnn_ref_pkg;

  localparam real SCALE = 65536.0;   // 2**FRAC of fnn_pkg

  function automatic real to_r(int v);
    return real'(v) / SCALE;
  endfunction

  function automatic int to_fix(real r);
    return $rtoi(r * SCALE);
  endfunction

  // uniform random fixed-point value in [lo, hi)
  function automatic int rand_fix(real lo, real hi);
    real u;
    u = real'($urandom % 1000000) / 1000000.0;
    return to_fix(lo + (hi - lo) * u);
  endfunction

  function automatic real sigmoid(real v);
    return 1.0 / (1.0 + $exp(-v));
  endfunction

  function automatic real softplus(real v);
    return $ln(1.0 + $exp(v));
  endfunction

  function automatic void fnn_ref(
    input  int  B, I, H, N,
    input  int  w0[], x[], pz[], pr[], wz[], wr[], zs[],
    input  real maxp,
    output real h[], output real y[],
    output int  n_neg, output int n_clip_hi, output int n_clip_lo
  );
    int NH;
    NH = N * H;
    h = new[B * NH];
    y = new[B];
    n_neg = 0;
    n_clip_hi = 0;
    n_clip_lo = 0;
    for (int b = 0; b < B; b++) begin
      real acc_y;
      acc_y = 0.0;
      for (int c = 0; c < NH; c++) begin
        real s;
        s = 0.0;
        for (int i = 0; i < I; i++) s += to_r(x[b*I + i]) * to_r(w0[c*I + i]);
        h[b*NH + c] = s;
        if (s < 0.0) n_neg++;
      end
      for (int n = 0; n < N; n++) begin
        real z, r, yn;
        z = 0.0;
        r = 0.0;
        for (int k = 0; k < H; k++) begin
          real hv, hz, hr;
          hv = h[b*NH + n*H + k];
          hz = (hv < 0.0) ? to_r(pz[n]) * hv : hv;
          hr = (hv < 0.0) ? to_r(pr[n]) * hv : hv;
          z += hz * to_r(wz[n*H + k]);
          r += hr * to_r(wr[n*H + k]);
        end
        yn = softplus(r) * (2.0 * sigmoid(to_r(zs[n]) * z) - 1.0);
        if (yn > maxp) begin
          yn = maxp;
          n_clip_hi++;
        end else if (yn < -maxp) begin
          yn = -maxp;
          n_clip_lo++;
        end
        acc_y += yn;
      end
      y[b] = acc_y / real'(N);
    end
  endfunction

endpackage
