// bb_pkg: types, constants and constant functions shared by the IEEE 802.11a
// baseband processor.
//
// Number formats (this design's choice, the standard fixes none):
//   * complex samples are 16+16 bit two's complement (cplx_t);
//   * in the frequency domain 1.0 is 2**13 (FREQ_ONE), so a 64-QAM corner
//     point (7/sqrt(42)) still fits;
//   * the transmit IFFT divides by 64, so the time-domain samples are
//     x[n] = (FREQ_ONE/64) * sum_k X[k] exp(+j*2*pi*k*n/64);
//   * phases are 16-bit unsigned fractions of a full turn.
// The 802.11a tables (training sequences, pilot pattern, subcarrier
// allocation, rate table, interleaver permutation) follow the standard.
package bb_pkg;

  localparam int SW        = 16;          // sample component width
  localparam int FREQ_ONE  = 8192;        // 1.0 in the frequency domain
  localparam int NFFT      = 64;
  localparam int NDATA_SC  = 48;          // data subcarriers per symbol
  localparam int GI_LEN    = 16;          // cyclic prefix length
  localparam int PHW       = 16;          // phase width (full turn = 2**PHW)
  localparam real PI       = 3.14159265358979323846;

  typedef logic signed [SW-1:0] sample_t;
  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  // Modulation and code rate, from the 4-bit RATE field (R1 is bit 3)
  typedef enum logic [1:0] {MOD_BPSK, MOD_QPSK, MOD_QAM16, MOD_QAM64} mod_e;
  typedef enum logic [1:0] {CR_1_2, CR_2_3, CR_3_4} crate_e;

  typedef struct packed {
    mod_e          modu;
    crate_e        cr;
    logic [3:0]    nbpsc;   // coded bits per subcarrier
    logic [8:0]    ncbps;   // coded bits per OFDM symbol
    logic [7:0]    ndbps;   // data bits per OFDM symbol
    logic          valid;   // RATE code is one of the eight defined
  } rate_info_t;

  function automatic rate_info_t rate_info(input logic [3:0] rate);
    rate_info_t r;
    r.valid = 1'b1;
    unique case (rate)
      4'b1101: begin r.modu = MOD_BPSK;  r.cr = CR_1_2; r.ndbps = 24;  end  //  6 Mbit/s
      4'b1111: begin r.modu = MOD_BPSK;  r.cr = CR_3_4; r.ndbps = 36;  end  //  9
      4'b0101: begin r.modu = MOD_QPSK;  r.cr = CR_1_2; r.ndbps = 48;  end  // 12
      4'b0111: begin r.modu = MOD_QPSK;  r.cr = CR_3_4; r.ndbps = 72;  end  // 18
      4'b1001: begin r.modu = MOD_QAM16; r.cr = CR_1_2; r.ndbps = 96;  end  // 24
      4'b1011: begin r.modu = MOD_QAM16; r.cr = CR_3_4; r.ndbps = 144; end  // 36
      4'b0001: begin r.modu = MOD_QAM64; r.cr = CR_2_3; r.ndbps = 192; end  // 48
      4'b0011: begin r.modu = MOD_QAM64; r.cr = CR_3_4; r.ndbps = 216; end  // 54
      default: begin r.modu = MOD_BPSK;  r.cr = CR_1_2; r.ndbps = 24; r.valid = 1'b0; end
    endcase
    unique case (r.modu)
      MOD_BPSK:  r.nbpsc = 4'd1;
      MOD_QPSK:  r.nbpsc = 4'd2;
      MOD_QAM16: r.nbpsc = 4'd4;
      default:   r.nbpsc = 4'd6;
    endcase
    r.ncbps = 9'(48 * r.nbpsc);
    return r;
  endfunction

  // Subcarrier number k (-26..26, no 0, no pilot) of data subcarrier d (0..47)
  function automatic int data_sc(input int d);
    int k;
    k = d - 26;                 // d 0..4   -> -26..-22
    if (d >= 5)  k = k + 1;     // skip -21
    if (d >= 18) k = k + 1;     // skip -7
    if (d >= 24) k = k + 1;     // skip 0
    if (d >= 30) k = k + 1;     // skip 7
    if (d >= 43) k = k + 1;     // skip 21
    return k;
  endfunction

  // Interleaver: output position j of coded bit k in a symbol of ncbps bits
  function automatic int intlv_pos(input int k, input int ncbps, input int nbpsc);
    int i, s, j;
    s = (nbpsc / 2 > 1) ? nbpsc / 2 : 1;
    i = (ncbps / 16) * (k % 16) + k / 16;
    j = s * (i / s) + (i + ncbps - (16 * i) / ncbps) % s;
    return j;
  endfunction

  // Long training sequence L(-26..26), bit 52-(k+26) set for +1 (0 at DC)
  localparam logic [52:0] LTS_POS = 53'b11001101011111100110101111_0_10011010100000110010101111;

  function automatic int lts_val(input int k);   // +1, -1 or 0
    if (k < -26 || k > 26 || k == 0) return 0;
    return LTS_POS[52-(k+26)] ? 1 : -1;
  endfunction

  // Short training sequence, in units of sqrt(13/6)*(1+j): +1, -1 or 0
  function automatic int sts_val(input int k);
    case (k)
      -24, -16, -4, 12, 16, 20, 24: return 1;
      -20, -12, -8, 4, 8:            return -1;
      default:                       return 0;
    endcase
  endfunction

  function automatic sample_t rnd(input real x);
    return sample_t'($rtoi(x >= 0.0 ? x + 0.5 : x - 0.5));
  endfunction

  // Time-domain short training sample n (period 16), scaled like the IFFT output
  function automatic cplx_t sts_sample(input int n);
    real re, im, a, c;
    cplx_t s;
    re = 0.0; im = 0.0;
    c = $sqrt(13.0 / 6.0);
    for (int k = -26; k <= 26; k++) begin
      a = 2.0 * PI * k * n / 64.0;
      // (1+j)*c*exp(ja) = c*(cos a - sin a) + j c*(cos a + sin a)
      re = re + sts_val(k) * c * ($cos(a) - $sin(a));
      im = im + sts_val(k) * c * ($cos(a) + $sin(a));
    end
    s.re = rnd(re * FREQ_ONE / 64.0);
    s.im = rnd(im * FREQ_ONE / 64.0);
    return s;
  endfunction

  // Time-domain long training sample n (period 64)
  function automatic cplx_t lts_sample(input int n);
    real re, im, a;
    cplx_t s;
    re = 0.0; im = 0.0;
    for (int k = -26; k <= 26; k++) begin
      a = 2.0 * PI * k * n / 64.0;
      re = re + lts_val(k) * $cos(a);
      im = im + lts_val(k) * $sin(a);
    end
    s.re = rnd(re * FREQ_ONE / 64.0);
    s.im = rnd(im * FREQ_ONE / 64.0);
    return s;
  endfunction

  // Twiddle factor exp(-j*2*pi*k/64) in Q1.14
  localparam int TW_ONE = 16384;
  function automatic cplx_t twiddle(input int k);
    cplx_t w;
    w.re = rnd(TW_ONE * $cos(2.0 * PI * k / 64.0));
    w.im = rnd(-TW_ONE * $sin(2.0 * PI * k / 64.0));
    return w;
  endfunction

  // Scrambler step, S(x) = x^7 + x^4 + 1: returns the next 7-bit state;
  // the sequence bit is the new state's bit 0
  function automatic logic [6:0] scr_next(input logic [6:0] st);
    return {st[5:0], st[6] ^ st[3]};
  endfunction

  // Time-domain sample n (0..79, guard included) of a SIGNAL symbol with the
  // given RATE and LENGTH, built the way the transmitter builds it
  // (encode, interleave, BPSK, pilots with p_0 = +1, IFFT / 64).
  function automatic cplx_t signal_sample(input logic [3:0] rate, input logic [11:0] len, input int n);
    logic [23:0] f;
    logic [47:0] c, il;
    logic [5:0]  sr;
    int          x [64];
    real         re, im, a;
    int          t;
    cplx_t       s;
    f = '0;
    f[0] = rate[3]; f[1] = rate[2]; f[2] = rate[1]; f[3] = rate[0];
    f[16:5] = len;
    f[17] = ^f[16:0];
    sr = '0;
    for (int i = 0; i < 24; i++) begin
      c[2*i]   = f[i] ^ sr[1] ^ sr[2] ^ sr[4] ^ sr[5];
      c[2*i+1] = f[i] ^ sr[0] ^ sr[1] ^ sr[2] ^ sr[5];
      sr = {sr[4:0], f[i]};
    end
    for (int k = 0; k < 48; k++) il[intlv_pos(k, 48, 1)] = c[k];
    for (int k = 0; k < 64; k++) x[k] = 0;
    for (int d = 0; d < 48; d++) x[data_sc(d) + 32] = il[d] ? 1 : -1;
    x[-21 + 32] = 1; x[-7 + 32] = 1; x[7 + 32] = 1; x[21 + 32] = -1;
    t = (n < 16) ? n + 48 : n - 16;
    re = 0.0; im = 0.0;
    for (int k = -32; k < 32; k++) begin
      a = 2.0 * PI * k * t / 64.0;
      re = re + x[k + 32] * $cos(a);
      im = im + x[k + 32] * $sin(a);
    end
    s.re = rnd(re * FREQ_ONE / 64.0);
    s.im = rnd(im * FREQ_ONE / 64.0);
    return s;
  endfunction

endpackage
