// ham_ref_pkg: reference model of the extended Hamming code, used only by the testbenches.
//
// Works on words of up to MAXW bits held in fixed-size vectors, with the information length k
// passed at run time, so one model serves every configuration. It walks the packet position by
// position (numbered from 1): power-of-two positions are check bits, the others take the
// information bits in order, and position k+r+1 holds the even overall parity bit. The checks
// are computed by counting ones, independently of the RTL's XOR trees.
package ham_ref_pkg;

  localparam int MAXW = 512;
  typedef logic [MAXW-1:0] word_t;

  function automatic int ref_r(input int k);
    int r;
    r = 0;
    while ((2 ** r) < k + r + 1) r++;
    return r;
  endfunction

  function automatic int ref_n(input int k);  // packet width
    return k + ref_r(k) + 1;
  endfunction

  function automatic bit pow2(input int p);
    for (int j = 0; j < 16; j++) if (p == (1 << j)) return 1;
    return 0;
  endfunction

  // Information placed, check bits and parity left at zero.
  function automatic word_t ref_spread(input int k, input word_t info);
    word_t w;
    int i;
    w = '0;
    i = 0;
    for (int p = 1; p <= k + ref_r(k); p++) begin
      if (!pow2(p)) begin
        w[p-1] = info[i];
        i++;
      end
    end
    return w;
  endfunction

  // Syndrome of a packet: for each check j, the parity of the ones at positions having bit j set.
  function automatic int ref_syndrome(input int k, input word_t pkt);
    int s;
    s = 0;
    for (int j = 0; j < ref_r(k); j++) begin
      int ones;
      ones = 0;
      for (int p = 1; p <= k + ref_r(k); p++) if ((p / (2 ** j)) % 2 == 1 && pkt[p-1]) ones++;
      if (ones % 2 == 1) s += 2 ** j;
    end
    return s;
  endfunction

  function automatic bit ref_parity(input int n, input word_t pkt);
    int ones;
    ones = 0;
    for (int b = 0; b < n; b++) if (pkt[b]) ones++;
    return (ones % 2) == 1;
  endfunction

  function automatic word_t ref_encode(input int k, input word_t info);
    word_t w;
    int s;
    w = ref_spread(k, info);
    s = ref_syndrome(k, w);
    for (int j = 0; j < ref_r(k); j++) w[(2 ** j) - 1] = ((s >> j) & 1) == 1;
    w[k + ref_r(k)] = ref_parity(k + ref_r(k), w);
    return w;
  endfunction

  function automatic word_t ref_extract(input int k, input word_t pkt);
    word_t info;
    int i;
    info = '0;
    i = 0;
    for (int p = 1; p <= k + ref_r(k); p++) begin
      if (!pow2(p)) begin
        info[i] = pkt[p-1];
        i++;
      end
    end
    return info;
  endfunction

  // Full decode: corrected information, syndrome, parity check and the two flags.
  function automatic void ref_decode(input int k, input word_t pkt, output word_t info,
                                     output int syn, output bit par, output bit err,
                                     output bit one);
    word_t fixed;
    int n;
    n = ref_n(k);
    syn = ref_syndrome(k, pkt);
    par = ref_parity(n, pkt);
    err = (syn != 0) || par;
    one = (syn != 0) && (syn < n) && par;
    fixed = pkt;
    if (one) fixed[syn-1] = !fixed[syn-1];
    info = ref_extract(k, fixed);
  endfunction

  function automatic word_t rand_word(input int nbits);
    word_t w;
    for (int b = 0; b < MAXW; b += 32) w[b +: 32] = $urandom;
    for (int b = nbits; b < MAXW; b++) w[b] = 1'b0;
    return w;
  endfunction

endpackage
