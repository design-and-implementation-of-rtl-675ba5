// ham_calc: "Calculated Hamming Bits and Parity Bit Values" stage of the encoder (combinational).
//
// Hamming bit j (at position 2^j) is the XOR of every packet position, 1 .. PACKET_BITS-1, whose
// index has bit j set ("check 2^j bits, skip 2^j bits"); since the Hamming positions of
// data_encode are zero, the bit's own position does not disturb the sum. The overall parity bit
// is the XOR of all other packet bits, so the finished packet has even weight. ham_code collects
// the Hamming bits, bit j being the one at position 2^j.
//
// Example (17 information bits): data_encode 23'h352000 gives data_packet_out 23'h75208B and
// ham_code 5'h0F. The coverage rule, even parity and the final parity bit follow the description
// of the design; the result is registered by ham_encoder one clock after done_encode.
module ham_calc
  import ham_pkg::*;
#(
  parameter int unsigned INFORMATION_BITS = 248,
  localparam int unsigned HAM_BITS        = ham_bits_for(INFORMATION_BITS),
  localparam int unsigned PACKET_BITS     = packet_bits_for(INFORMATION_BITS)
) (
  input  logic [PACKET_BITS-1:0] data_encode,
  output logic [PACKET_BITS-1:0] data_packet_out,
  output logic [HAM_BITS-1:0]    ham_code
);

  always_comb begin
    logic [PACKET_BITS-1:0] pkt;
    ham_code = '0;
    for (int unsigned j = 0; j < HAM_BITS; j++) begin
      for (int unsigned p = 1; p < PACKET_BITS; p++) begin
        if (((p >> j) & 1) != 0) ham_code[j] ^= data_encode[p-1];
      end
    end
    pkt = data_encode;
    for (int unsigned j = 0; j < HAM_BITS; j++) pkt[(1 << j) - 1] = ham_code[j];
    pkt[PACKET_BITS-1] = ^pkt[PACKET_BITS-2:0];
    data_packet_out = pkt;
  end

endmodule
