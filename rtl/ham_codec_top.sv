// ham_codec_top: configurable single-error-correcting, double-error-detecting Hamming codec.
//
// One set of control pins drives an encoder and a decoder that share the data_in bus:
//   new_info_packet = 1   encode: information slices in, packet slices out on data_out_packet
//   new_info_packet = 0   decode: packet slices in, checked and corrected information slices out
//                         on data_out_info, with error_flag / one_error_bit / parity_test /
//                         ham_test describing what was found
//   new_data_flag   = 0   initialise counters and flags of the selected side on the next clock
//   new_data_flag   = 1   run the selected operation
//   request_info_packet_out  permission to send result slices (one per clock while high)
// The unselected side holds its state. info_packet_read and info_packet_write report the
// selected side. The widths come from three parameters: INFORMATION_BITS, and the input and
// output bus widths; the Hamming and packet widths follow from INFORMATION_BITS
// (2^r >= k + r + 1, packet = k + r + 1).
//
// Timing with request held high: encode = ceil(k/IN) + 2 + ceil(packet/OUT) clocks after the
// initialising clock; decode = ceil(packet/IN) + 1 + ceil(k/OUT) clocks. With the default 248
// information bits and 8-bit buses the packet is 258 bits (9 Hamming bits + parity): 31 + 2 + 33
// clocks to encode, 33 + 1 + 31 clocks to decode.
//
// Separate encoder and decoder state (rather than one shared set of counters) and the
// *_valid strobes are this design's choices.
module ham_codec_top
  import ham_pkg::*;
#(
  parameter int unsigned INFORMATION_BITS     = 248,
  parameter int unsigned DATA_WIDTH_SLICE_IN  = 8,
  parameter int unsigned DATA_WIDTH_SLICE_OUT = 8,
  localparam int unsigned HAM_BITS            = ham_bits_for(INFORMATION_BITS)
) (
  input  logic                            clk,
  input  logic                            new_data_flag,
  input  logic                            new_info_packet,
  input  logic                            request_info_packet_out,
  input  logic [DATA_WIDTH_SLICE_IN-1:0]  data_in,
  output logic [DATA_WIDTH_SLICE_OUT-1:0] data_out_packet,
  output logic                            data_out_packet_valid,
  output logic [DATA_WIDTH_SLICE_OUT-1:0] data_out_info,
  output logic                            data_out_info_valid,
  output logic                            info_packet_read,
  output logic                            done_encode,
  output logic                            test_done,
  output logic                            info_packet_write,
  output logic                            error_flag,
  output logic                            one_error_bit,
  output logic                            parity_test,
  output logic [HAM_BITS-1:0]             ham_code,
  output logic [HAM_BITS-1:0]             ham_test
);

  logic enc_read, enc_write, dec_read, dec_write;

  ham_encoder #(
    .INFORMATION_BITS(INFORMATION_BITS),
    .DATA_WIDTH_SLICE_IN(DATA_WIDTH_SLICE_IN),
    .DATA_WIDTH_SLICE_OUT(DATA_WIDTH_SLICE_OUT)
  ) u_enc (
    .clk, .enable(new_info_packet), .new_data_flag, .request_info_packet_out, .data_in,
    .data_out_packet, .data_out_valid(data_out_packet_valid),
    .info_packet_read(enc_read), .done_encode, .packet_ready(),
    .info_packet_write(enc_write), .ham_code, .data_packet_out()
  );

  ham_decoder #(
    .INFORMATION_BITS(INFORMATION_BITS),
    .DATA_WIDTH_SLICE_IN(DATA_WIDTH_SLICE_IN),
    .DATA_WIDTH_SLICE_OUT(DATA_WIDTH_SLICE_OUT)
  ) u_dec (
    .clk, .enable(!new_info_packet), .new_data_flag, .request_info_packet_out, .data_in,
    .data_out_info, .data_out_valid(data_out_info_valid),
    .info_packet_read(dec_read), .test_done, .info_packet_write(dec_write),
    .error_flag, .one_error_bit, .parity_test, .ham_test, .data_information_out()
  );

  assign info_packet_read  = new_info_packet ? enc_read  : dec_read;
  assign info_packet_write = new_info_packet ? enc_write : dec_write;

endmodule
