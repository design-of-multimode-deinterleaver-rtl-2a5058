// tb_ref_pkg: reference model for the testbenches.
//
// Evaluates the permutation equations directly, with integer division and
// modulo, independently of the address-generator hardware:
//   interleaver   m_k = (N/d)(k mod d) + floor(k/d)
//                 j_k = s floor(m_k/s) + (m_k + N - floor(d m_k/N)) mod s
//   deinterleaver m_j = s floor(j/s) + (j + floor(d j/N)) mod s
//                 k_j = d m_j - (N-1) floor(d m_j/N)
// with d = 16, N = 48/96/192/288 and s = max(N_BPSC/2, 1).
package tb_ref_pkg;

  localparam int D = 16;

  function automatic int ref_n(input int mode);
    case (mode)
      0: return 48;
      1: return 96;
      2: return 192;
      default: return 288;
    endcase
  endfunction

  function automatic int ref_nbpsc(input int mode);
    case (mode)
      0: return 1;
      1: return 2;
      2: return 4;
      default: return 6;
    endcase
  endfunction

  function automatic int ref_s(input int mode);
    int h;
    h = ref_nbpsc(mode) / 2;
    return (h < 1) ? 1 : h;
  endfunction

  function automatic int ref_jk(input int mode, input int k);
    int n, s, m;
    n = ref_n(mode);
    s = ref_s(mode);
    m = (n / D) * (k % D) + k / D;
    return s * (m / s) + (m + n - (D * m) / n) % s;
  endfunction

  function automatic int ref_kj(input int mode, input int j);
    int n, s, m;
    n = ref_n(mode);
    s = ref_s(mode);
    m = s * (j / s) + (j + (D * j) / n) % s;
    return D * m - (n - 1) * ((D * m) / n);
  endfunction

  // 802.11n frequency rotation of address j for stream iss (0..3).
  function automatic int ref_rot(input int j, input int n, input int nbpscs,
                                 input int iss, input bit bw40);
    int f, off, r;
    case (iss)
      0: f = 0;
      1: f = 2;
      2: f = 1;
      default: f = 3;
    endcase
    off = f * (bw40 ? 29 : 11) * nbpscs;
    r = (j - off) % n;
    if (r < 0) r += n;
    return r;
  endfunction

endpackage
