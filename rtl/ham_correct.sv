// ham_correct: "Check Error and Correction one bit Error if found" stage of the decoder
// (combinational).
//
// Classifies the received packet from the syndrome ham_test and the overall parity check
// parity_test and repairs a single error:
//   ham_test == 0, parity_test == 0                      no error: error_flag 0, one_error_bit 0
//   0 < ham_test < PACKET_BITS, parity_test == 1         single error at position ham_test:
//                                                        error_flag 1, one_error_bit 1, and the
//                                                        information bit at that position is
//                                                        inverted (if the position holds a Hamming
//                                                        bit the information is already right)
//   ham_test != 0, parity_test == 0                      even number of errors: error_flag 1,
//                                                        one_error_bit 0, no correction
//   ham_test >= PACKET_BITS                              uncorrectable: error_flag 1,
//                                                        one_error_bit 0, no correction
//   ham_test == 0, parity_test == 1                      only the parity bit is wrong: error_flag
//                                                        1, one_error_bit 0; the information is
//                                                        intact
// The single-error case requires parity_test == 1, as for any extended Hamming code; this is the
// reading that matches the worked examples of the design. Pure logic, no clock.
module ham_correct
  import ham_pkg::*;
#(
  parameter int unsigned INFORMATION_BITS = 248,
  localparam int unsigned HAM_BITS        = ham_bits_for(INFORMATION_BITS),
  localparam int unsigned PACKET_BITS     = packet_bits_for(INFORMATION_BITS)
) (
  input  logic [INFORMATION_BITS-1:0] data_information,  // extracted, uncorrected
  input  logic [HAM_BITS-1:0]         ham_test,
  input  logic                        parity_test,
  output logic [INFORMATION_BITS-1:0] data_information_out,
  output logic                        error_flag,
  output logic                        one_error_bit
);

  logic syndrome_zero, syndrome_in_range;

  assign syndrome_zero     = (ham_test == '0);
  assign syndrome_in_range = (32'(ham_test) < PACKET_BITS);
  assign error_flag        = !syndrome_zero || parity_test;
  assign one_error_bit     = !syndrome_zero && syndrome_in_range && parity_test;

  for (genvar i = 0; i < INFORMATION_BITS; i++) begin : g_fix
    localparam int unsigned POS = info_pos(i);
    assign data_information_out[i] =
      data_information[i] ^ (one_error_bit && (32'(ham_test) == POS));
  end

endmodule
