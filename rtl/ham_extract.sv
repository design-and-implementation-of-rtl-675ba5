// ham_extract: "Extract Information and Calculated Hamming Code and Parity Bit Values" stage of
// the decoder (combinational).
//
// From a received packet it forms
//   - data_information: the bits at the non-power-of-two positions, in order (the inverse of
//     ham_insert), still uncorrected;
//   - ham_test: the syndrome; bit j is the XOR of every position 1 .. PACKET_BITS-1 whose index
//     has bit j set, this time including the Hamming bit at 2^j. With one flipped bit at position
//     p (p < PACKET_BITS) the syndrome equals p; for a clean packet it is zero;
//   - parity_test: the XOR of all packet bits, parity bit included; 1 means an odd number of bits
//     is wrong.
//
// Examples (17 information bits): 23'h75208B gives 1AA00, ham_test 0, parity_test 0;
// 23'h75008B gives ham_test 5'h0E; 23'h55008B gives ham_test 5'h18, parity_test 0.
// All three results follow the description of the design; they are combinational and are
// registered, after correction, by ham_decoder.
module ham_extract
  import ham_pkg::*;
#(
  parameter int unsigned INFORMATION_BITS = 248,
  localparam int unsigned HAM_BITS        = ham_bits_for(INFORMATION_BITS),
  localparam int unsigned PACKET_BITS     = packet_bits_for(INFORMATION_BITS)
) (
  input  logic [PACKET_BITS-1:0]      data_packet,
  output logic [INFORMATION_BITS-1:0] data_information,
  output logic [HAM_BITS-1:0]         ham_test,
  output logic                        parity_test
);

  for (genvar i = 0; i < INFORMATION_BITS; i++) begin : g_info
    assign data_information[i] = data_packet[info_pos(i) - 1];
  end

  always_comb begin
    ham_test = '0;
    for (int unsigned j = 0; j < HAM_BITS; j++) begin
      for (int unsigned p = 1; p < PACKET_BITS; p++) begin
        if (((p >> j) & 1) != 0) ham_test[j] ^= data_packet[p-1];
      end
    end
  end

  assign parity_test = ^data_packet;

endmodule
