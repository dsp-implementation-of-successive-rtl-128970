// tb_wcdma_pkg: reference models shared by the testbenches.
//
// Written independently of the RTL: the long scrambling code is built from its definition (the
// second sequence by really advancing the two m-sequences 16777232 chips rather than by shift
// masks), OVSF codes from the recursive code tree, and the raised-cosine pulse from its formula
// in floating point. The transmitter model produces one user's chips, s[n] = (b C_d beta_d +
// j b_p beta_c) C_s[n], and the received samples at four times the chip rate through a multipath
// channel: r'[m] = sum_l alpha_l[m] * sum_t h(t) s'[m - tau_l - t], where a path's gain may turn
// at a constant Doppler frequency. The pulse h is the 9-tap raised cosine, or on request the
// cascade of two 33-tap root-raised-cosine filters.
package tb_wcdma_pkg;
  localparam int CHIPS_PER_FRAME = 38400;

  class scr_model;
    bit [24:0] x, y, x2, y2;
    int unsigned n;
    bit c2_even;
    function new(bit [23:0] code);
      x = {1'b1, code}; y = '1;
      x2 = x; y2 = y;
      for (int i = 0; i < 16777232; i++) begin
        x2 = {x2[3] ^ x2[0], x2[24:1]};
        y2 = {y2[3] ^ y2[2] ^ y2[1] ^ y2[0], y2[24:1]};
      end
      n = 0;
    endfunction
    // sign flags of C_s for the current chip, then advance
    function void next(output bit re_neg, output bit im_neg);
      bit c1, c2;
      c1 = x[0] ^ y[0];
      c2 = x2[0] ^ y2[0];
      if (n % 2 == 0) c2_even = c2;
      re_neg = c1;
      im_neg = c1 ^ bit'(n % 2) ^ c2_even;
      x  = {x[3] ^ x[0], x[24:1]};
      y  = {y[3] ^ y[2] ^ y[1] ^ y[0], y[24:1]};
      x2 = {x2[3] ^ x2[0], x2[24:1]};
      y2 = {y2[3] ^ y2[2] ^ y2[1] ^ y2[0], y2[24:1]};
      n++;
    endfunction
  endclass

  // OVSF chip C_{sf,k}[n] as a sign flag, from the code tree
  function automatic bit ovsf_neg(int sf, int k, int n);
    if (sf == 1) return 1'b0;
    if (n < sf / 2) return ovsf_neg(sf / 2, k / 2, n);
    return ovsf_neg(sf / 2, k / 2, n - sf / 2) ^ bit'(k % 2);
  endfunction

  // raised-cosine pulse, roll-off 0.22, at t = k/4 chips
  function automatic real rc_tap(int k);
    real t, s, d, pi;
    pi = 3.14159265358979;
    t = real'(k) / 4.0;
    if (k == 0) return 1.0;
    s = $sin(pi * t) / (pi * t);
    d = 1.0 - (0.44 * t) ** 2;
    return s * $cos(pi * 0.22 * t) / d;
  endfunction

  // root raised cosine, roll-off 0.22, t in chips
  function automatic real rrc(real t);
    real b, pi;
    b = 0.22; pi = 3.14159265358979;
    if (t == 0.0) return 1.0 - b + 4.0 * b / pi;
    if ((4.0 * b * t) ** 2 > 0.999999 && (4.0 * b * t) ** 2 < 1.000001)
      return b / $sqrt(2.0) * ((1.0 + 2.0 / pi) * $sin(pi / (4.0 * b)) +
                               (1.0 - 2.0 / pi) * $cos(pi / (4.0 * b)));
    return ($sin(pi * t * (1.0 - b)) + 4.0 * b * t * $cos(pi * t * (1.0 + b))) /
           (pi * t * (1.0 - (4.0 * b * t) ** 2));
  endfunction

  // zero-mean Gaussian sample of standard deviation sd (Box-Muller)
  function automatic real gauss(real sd);
    real u1, u2;
    u1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
    u2 = real'($urandom % 1000000) / 1000000.0;
    return sd * $sqrt(-2.0 * $ln(u1)) * $cos(6.28318530718 * u2);
  endfunction

  // one user: chips over nchips, and its received contribution
  class user_model;
    int sf, nchips;
    real bd, bc;
    bit  dbits [];          // data bit per data symbol of one frame (1 = -1)
    bit  cbits [];          // DPCCH bits of one frame
    real s_re [], s_im [];  // chip values
    int  npath;
    int  tau [32];
    real a_re [32], a_im [32];
    real fd [32];           // Doppler of each path, cycles per sample
    int  half;              // pulse spans -half..half samples
    real pt [65];           // pulse, pt[half + t]

    function new(int sf_i, int nchips_i, bit [23:0] code, real bd_i, real bc_i, int npilot,
                 bit pilot_neg [150]);
      scr_model scr;
      bit cr, ci, d, c, cd;
      real x, yy;
      sf = sf_i; nchips = nchips_i; bd = bd_i; bc = bc_i; npath = 0;
      half = 4;
      for (int t = -4; t <= 4; t++) pt[4 + t] = rc_tap(t);
      dbits = new[CHIPS_PER_FRAME / sf];
      cbits = new[150];
      foreach (dbits[i]) dbits[i] = bit'($urandom % 2);
      foreach (cbits[i]) cbits[i] = ((i % 10) < npilot) ? pilot_neg[i] : bit'($urandom % 2);
      s_re = new[nchips]; s_im = new[nchips];
      scr = new(code);
      for (int n = 0; n < nchips; n++) begin
        int f;
        f = n % CHIPS_PER_FRAME;
        if (f == 0 && n != 0) scr = new(code);
        scr.next(cr, ci);
        d  = dbits[f / sf];
        c  = cbits[f / 256];
        cd = ovsf_neg(sf, sf / 4, f % sf);
        x  = (d ^ cd) ? -bd : bd;
        yy = c ? -bc : bc;
        // (x + j yy)(cr + j ci)
        s_re[n] = (cr ? -x : x) - (ci ? -yy : yy);
        s_im[n] = (ci ? -x : x) + (cr ? -yy : yy);
      end
    endfunction

    function void add_path(int t, real mag, real ph);
      tau[npath] = t; a_re[npath] = mag * $cos(ph); a_im[npath] = mag * $sin(ph); fd[npath] = 0.0;
      npath++;
    endfunction

    // use the cascade of a 33-tap transmit and a 33-tap receive RRC filter (65 taps, peak 1)
    // instead of the 9-tap raised cosine
    function void use_rrc_cascade();
      real g [33], c;
      for (int k = 0; k < 33; k++) g[k] = rrc(real'(k - 16) / 4.0);
      for (int n = 0; n < 65; n++) begin
        c = 0.0;
        for (int i = 0; i < 33; i++) if (n - i >= 0 && n - i < 33) c += g[i] * g[n - i];
        pt[n] = c;
      end
      c = pt[32];
      for (int n = 0; n < 65; n++) pt[n] = pt[n] / c;
      half = 32;
    endfunction

    // a fading path: nsin equal rays at one delay, each with a random phase and a Doppler shift
    // fd_max * cos(angle of arrival); their sum fades roughly like a Rayleigh path of mean
    // power pwr
    function void add_fading(int t, real pwr, real fd_max, int nsin);
      real ph, th;
      for (int i = 0; i < nsin; i++) begin
        ph = 6.28318530718 * real'($urandom % 10000) / 10000.0;
        th = 6.28318530718 * (real'(i) + real'($urandom % 1000) / 1000.0) / real'(nsin);
        add_path(t, $sqrt(pwr / real'(nsin)), ph);
        fd[npath-1] = fd_max * $cos(th);
      end
    endfunction

    // received contribution at sample m (before quantisation)
    function void rx(int m, output real re, output real im);
      re = 0.0; im = 0.0;
      for (int l = 0; l < npath; l++) begin
        real fr, fi;
        fr = 0.0; fi = 0.0;
        for (int t = -half; t <= half; t++) begin
          int q;
          q = m - tau[l] - t;
          if (q >= 0 && q % 4 == 0 && q / 4 < nchips) begin
            fr += pt[half + t] * s_re[q / 4];
            fi += pt[half + t] * s_im[q / 4];
          end
        end
        if (fd[l] != 0.0) begin
          real c, sn, pr, pi;
          c = $cos(6.28318530718 * fd[l] * real'(m)); sn = $sin(6.28318530718 * fd[l] * real'(m));
          pr = a_re[l] * c - a_im[l] * sn; pi = a_re[l] * sn + a_im[l] * c;
          re += pr * fr - pi * fi;
          im += pr * fi + pi * fr;
        end else begin
          re += a_re[l] * fr - a_im[l] * fi;
          im += a_re[l] * fi + a_im[l] * fr;
        end
      end
    endfunction
  endclass
endpackage
