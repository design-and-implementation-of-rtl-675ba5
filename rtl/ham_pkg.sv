// ham_pkg: shared constants and elaboration-time helpers of the Hamming SEC-DED codec.
//
// The packet layout follows the classic extended Hamming code: positions are numbered from 1,
// every power-of-two position (1, 2, 4, 8, ...) holds a Hamming check bit, all other positions
// hold information bits in ascending order (information bit 0 at position 3), and one overall
// parity bit is appended after the last position. Position p is stored in packet bit p-1, so
// the overall parity bit is the packet MSB.
//
// The number of Hamming bits r is the smallest value with 2^r >= k + r + 1 for k information
// bits; the packet is k + r + 1 bits wide. All functions here are constant functions, used to
// size ports and to build the fixed wiring of the encoder and decoder. The layout and the formula
// for r follow the description of the design; which vector bit holds which position is read from
// its worked example (17'h1AA00 encodes to 23'h75208B).
package ham_pkg;

  // Smallest r with 2^r >= k + r + 1.
  function automatic int unsigned ham_bits_for(input int unsigned k);
    int unsigned r;
    r = 1;
    while ((1 << r) < (k + r + 1)) r++;
    return r;
  endfunction

  // Packet width: information bits + Hamming bits + one overall parity bit.
  function automatic int unsigned packet_bits_for(input int unsigned k);
    return k + ham_bits_for(k) + 1;
  endfunction

  function automatic bit is_pow2(input int unsigned p);
    return (p != 0) && ((p & (p - 1)) == 0);
  endfunction

  // 1-based packet position of information bit i (the (i+1)-th position that is not a power of two).
  function automatic int unsigned info_pos(input int unsigned i);
    int unsigned p;
    int unsigned n;
    p = 0;
    n = 0;
    do begin
      p++;
      if (!is_pow2(p)) n++;
    end while (n <= i);
    return p;
  endfunction

endpackage
