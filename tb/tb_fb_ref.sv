// tb_fb_ref: reference model of the filter banks in plain 64-bit complex
// integer arithmetic, shared by the filter-bank testbenches.
//   subfilter(): v_p(n) = sum_t h[8t+p] x[8(n-t)+7-p], p = 0..7
//   idft_q():    quantised 8-point IDFT used by the design,
//                a_m = 256 (v_m + v_{m+4}), b_m = W_m (v_m - v_{m+4}),
//                W_m = 256 e^{j pi m/4} rounded (181 for 1/sqrt 2),
//                Y_2r = sum_m a_m j^(m r), Y_2r+1 = sum_m b_m j^(m r)
//   wrapm():     value in the signed range (-(M-1)/2 .. (M-1)/2) modulo M
package tb_fb_ref;
  localparam int NT = 367;
  localparam longint M7 = 64'd31432690549;   // 13*17*29*37*41*53*61
  localparam longint M5 = 64'd9722453;       // 13*17*29*37*41
  localparam longint M6 = 64'd515290009;     // 13*17*29*37*41*53

  function automatic longint wrapm(longint v, longint m);
    longint r = v % m;
    if (r < 0) r += m;
    if (r > (m - 1) / 2) r -= m;
    return r;
  endfunction

  function automatic void subfilter(input longint hr [NT], input longint hi [NT],
                                    input longint sr [$], input longint si [$], input int n,
                                    output longint vr [8], output longint vi [8]);
    for (int p = 0; p < 8; p++) begin
      vr[p] = 0; vi[p] = 0;
      for (int t = 0; 8 * t + p < NT && t <= n; t++) begin
        int k;
        k = 8 * (n - t) + 7 - p;
        vr[p] += hr[8*t+p] * sr[k] - hi[8*t+p] * si[k];
        vi[p] += hr[8*t+p] * si[k] + hi[8*t+p] * sr[k];
      end
    end
  endfunction

  function automatic void idft_q(input longint vr [8], input longint vi [8],
                                 output longint yr [8], output longint yi [8]);
    longint ar [4], ai [4], br [4], bi [4];
    longint twr [4], twi [4];
    twr = '{256, 181, 0, -181};
    twi = '{0, 181, 256, 181};
    for (int m = 0; m < 4; m++) begin
      longint dr, di;
      ar[m] = 256 * (vr[m] + vr[m+4]);
      ai[m] = 256 * (vi[m] + vi[m+4]);
      dr = vr[m] - vr[m+4];
      di = vi[m] - vi[m+4];
      br[m] = twr[m] * dr - twi[m] * di;
      bi[m] = twr[m] * di + twi[m] * dr;
    end
    for (int k = 0; k < 8; k++) begin
      yr[k] = 0; yi[k] = 0;
      for (int m = 0; m < 4; m++) begin
        longint ur, ui, tr;
        ur = (k % 2 == 0) ? ar[m] : br[m];
        ui = (k % 2 == 0) ? ai[m] : bi[m];
        for (int e = 0; e < (m * (k / 2)) % 4; e++) begin
          tr = ur; ur = -ui; ui = tr;      // times j
        end
        yr[k] += ur; yi[k] += ui;
      end
    end
  endfunction

  // expected outputs of the error-free bank for frame n
  function automatic void frame_errfree(input longint hr [NT], input longint hi [NT],
                                        input longint sr [$], input longint si [$], input int n,
                                        output longint yr [8], output longint yi [8]);
    longint vr [8], vi [8];
    subfilter(hr, hi, sr, si, n, vr, vi);
    idft_q(vr, vi, yr, yi);
    for (int k = 0; k < 8; k++) begin
      yr[k] = wrapm(yr[k], M7);
      yi[k] = wrapm(yi[k], M7);
    end
  endfunction

  // expected outputs of the truncated bank for frame n: sub-filter results
  // modulo the 5-moduli product, floor(v / 512) to 15 bits, IDFT modulo the
  // 6-moduli product
  function automatic void frame_truncated(input longint hr [NT], input longint hi [NT],
                                          input longint sr [$], input longint si [$], input int n,
                                          output longint yr [8], output longint yi [8]);
    longint vr [8], vi [8];
    subfilter(hr, hi, sr, si, n, vr, vi);
    for (int p = 0; p < 8; p++) begin
      vr[p] = wrapm(vr[p], M5) >>> 9;
      vi[p] = wrapm(vi[p], M5) >>> 9;
    end
    idft_q(vr, vi, yr, yi);
    for (int k = 0; k < 8; k++) begin
      yr[k] = wrapm(yr[k], M6);
      yi[k] = wrapm(yi[k], M6);
    end
  endfunction
endpackage
