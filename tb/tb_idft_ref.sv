// tb_idft_ref: reference model shared by the testbenches, written with plain
// integer arithmetic. rmod() is a non-negative remainder, find_q() searches
// for a root of q^2 + 1 = 0 mod m, and idft8_res() evaluates the quantised
// 8-point IDFT of the filter bank in one residue channel directly:
//   a_n = 256 (x_n + x_{n+4}),  b_n = W_n (x_n - x_{n+4}),  n = 0..3
//   Y_2r = sum_n a_n j^(n r),   Y_2r+1 = sum_n b_n j^(n r)
// with W_n = 256 e^{j pi n / 4} rounded (181 for 1/sqrt 2) and every complex
// constant c mapped to c_R + qs q c_I mod m.
package tb_idft_ref;
  function automatic int rmod(longint v, int m);
    longint r = v % m;
    return int'((r < 0) ? r + m : r);
  endfunction

  function automatic int find_q(int m);
    for (int q = 2; q < m; q++) if ((q * q + 1) % m == 0) return q;
    return -1;
  endfunction

  const int TWR [4] = '{256, 181, 0, -181};
  const int TWI [4] = '{0, 181, 256, 181};

  function automatic void idft8_res(input int x [8], input int m, input int qs, output int y [8]);
    int q, jj, a [4], b [4];
    q  = find_q(m);
    jj = rmod(qs * q, m);
    for (int n = 0; n < 4; n++) begin
      a[n] = rmod(256 * (x[n] + x[n+4]), m);
      b[n] = rmod(longint'(rmod(TWR[n] + qs * q * TWI[n], m)) * (x[n] - x[n+4]), m);
    end
    for (int r = 0; r < 4; r++) begin
      longint se = 0, so = 0;
      for (int n = 0; n < 4; n++) begin
        int jp = 1;
        for (int e = 0; e < (n * r) % 4; e++) jp = rmod(jp * jj, m);
        se += longint'(a[n]) * jp;
        so += longint'(b[n]) * jp;
      end
      y[2*r]   = rmod(se, m);
      y[2*r+1] = rmod(so, m);
    end
  endfunction
endpackage
