// ham_decoder: the decoding system. Takes a PACKET_BITS-wide extended Hamming packet in slices,
// checks it, corrects a single bit error and sends the INFORMATION_BITS of information back out
// in slices.
//
// Chain:
//   slice_deserializer -> ham_extract -> ham_correct -> [result reg, test_done] -> slice_serializer
// While `enable` (decode mode, new_info_packet = 0) is high, new_data_flag = 0 initialises the
// counters and flags on the next clock and new_data_flag = 1 lets the operation run. With
// request_info_packet_out held high the operation takes ceil(PACKET_BITS/DATA_WIDTH_SLICE_IN)
// input clocks, one clock for the check (test_done rises), then
// ceil(INFORMATION_BITS/DATA_WIDTH_SLICE_OUT) output clocks. error_flag, one_error_bit,
// ham_test and parity_test are registered with the corrected information and stay valid while
// test_done is high. When the packet holds more than one error the information is sent out
// uncorrected, with error_flag = 1 and one_error_bit = 0. data_out_valid is this design's
// addition.
module ham_decoder
  import ham_pkg::*;
#(
  parameter int unsigned INFORMATION_BITS     = 248,
  parameter int unsigned DATA_WIDTH_SLICE_IN  = 8,
  parameter int unsigned DATA_WIDTH_SLICE_OUT = 8,
  localparam int unsigned HAM_BITS            = ham_bits_for(INFORMATION_BITS),
  localparam int unsigned PACKET_BITS         = packet_bits_for(INFORMATION_BITS)
) (
  input  logic                            clk,
  input  logic                            enable,                  // decode mode selected
  input  logic                            new_data_flag,           // 0: initialise, 1: run
  input  logic                            request_info_packet_out, // permission to send
  input  logic [DATA_WIDTH_SLICE_IN-1:0]  data_in,
  output logic [DATA_WIDTH_SLICE_OUT-1:0] data_out_info,
  output logic                            data_out_valid,          // data_out_info holds a new slice
  output logic                            info_packet_read,        // packet fully read
  output logic                            test_done,               // check finished
  output logic                            info_packet_write,       // information fully sent
  output logic                            error_flag,              // any error detected
  output logic                            one_error_bit,           // single error, corrected
  output logic                            parity_test,             // overall parity check failed
  output logic [HAM_BITS-1:0]             ham_test,                // syndrome
  output logic [INFORMATION_BITS-1:0]     data_information_out     // corrected information
);

  logic init, run;
  assign init = enable && !new_data_flag;
  assign run  = enable &&  new_data_flag;

  logic [PACKET_BITS-1:0]      data_packet_new;
  logic [INFORMATION_BITS-1:0] info_raw, info_fixed;
  logic [HAM_BITS-1:0]         syn_comb;
  logic                        par_comb, err_comb, one_comb;

  slice_deserializer #(.TOTAL_BITS(PACKET_BITS), .SLICE_W(DATA_WIDTH_SLICE_IN)) u_in (
    .clk, .init, .run, .data_in,
    .data(data_packet_new), .in_count(), .location(), .done(info_packet_read)
  );

  ham_extract #(.INFORMATION_BITS(INFORMATION_BITS)) u_extract (
    .data_packet(data_packet_new), .data_information(info_raw),
    .ham_test(syn_comb), .parity_test(par_comb)
  );

  ham_correct #(.INFORMATION_BITS(INFORMATION_BITS)) u_correct (
    .data_information(info_raw), .ham_test(syn_comb), .parity_test(par_comb),
    .data_information_out(info_fixed), .error_flag(err_comb), .one_error_bit(one_comb)
  );

  always_ff @(posedge clk) begin
    if (init) begin
      test_done     <= 1'b0;
      error_flag    <= 1'b0;
      one_error_bit <= 1'b0;
      parity_test   <= 1'b0;
      ham_test      <= '0;
    end else if (run && info_packet_read && !test_done) begin
      data_information_out <= info_fixed;
      ham_test             <= syn_comb;
      parity_test          <= par_comb;
      error_flag           <= err_comb;
      one_error_bit        <= one_comb;
      test_done            <= 1'b1;
    end
  end

  slice_serializer #(.TOTAL_BITS(INFORMATION_BITS), .SLICE_W(DATA_WIDTH_SLICE_OUT)) u_out (
    .clk, .init, .ready(test_done), .request(run && request_info_packet_out),
    .data(data_information_out), .data_out(data_out_info), .slice_valid(data_out_valid),
    .out_count(), .location(), .done(info_packet_write)
  );

endmodule
