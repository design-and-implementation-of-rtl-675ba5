// ham_encoder: the encoding system. Takes INFORMATION_BITS of information in slices, builds the
// extended Hamming packet (information + Hamming bits + overall parity bit) and sends it back
// out in slices.
//
// Chain (one clock per stage):
//   slice_deserializer  ->  ham_insert (registers data_encode, done_encode)
//                       ->  ham_calc    ->  [data_packet_out/ham_code reg]  ->  slice_serializer
// Control follows the original scheme: while `enable` (encode mode, new_info_packet = 1) is high,
// new_data_flag = 0 initialises the counters and flags on the next clock, and new_data_flag = 1
// lets the operation run. With request_info_packet_out held high the whole operation takes
// ceil(INFORMATION_BITS/DATA_WIDTH_SLICE_IN) input clocks, one clock to build data_encode, one
// clock to compute the packet, then ceil(PACKET_BITS/DATA_WIDTH_SLICE_OUT) output clocks.
// When `enable` is low the block holds its state, so a decode operation run next to it leaves
// the last packet untouched. The register between insertion and calculation mirrors the
// described two-clock encode; packet_ready and data_out_valid are this design's additions.
module ham_encoder
  import ham_pkg::*;
#(
  parameter int unsigned INFORMATION_BITS     = 248,
  parameter int unsigned DATA_WIDTH_SLICE_IN  = 8,
  parameter int unsigned DATA_WIDTH_SLICE_OUT = 8,
  localparam int unsigned HAM_BITS            = ham_bits_for(INFORMATION_BITS),
  localparam int unsigned PACKET_BITS         = packet_bits_for(INFORMATION_BITS)
) (
  input  logic                            clk,
  input  logic                            enable,                  // encode mode selected
  input  logic                            new_data_flag,           // 0: initialise, 1: run
  input  logic                            request_info_packet_out, // permission to send
  input  logic [DATA_WIDTH_SLICE_IN-1:0]  data_in,
  output logic [DATA_WIDTH_SLICE_OUT-1:0] data_out_packet,
  output logic                            data_out_valid,          // data_out_packet holds a new slice
  output logic                            info_packet_read,        // information fully read
  output logic                            done_encode,             // data_encode built
  output logic                            packet_ready,            // data_packet_out computed
  output logic                            info_packet_write,       // packet fully sent
  output logic [HAM_BITS-1:0]             ham_code,
  output logic [PACKET_BITS-1:0]          data_packet_out
);

  logic init, run;
  assign init = enable && !new_data_flag;
  assign run  = enable &&  new_data_flag;

  logic [INFORMATION_BITS-1:0] data_info_new;
  logic [PACKET_BITS-1:0]      data_encode, packet_comb;
  logic [HAM_BITS-1:0]         ham_comb;

  slice_deserializer #(.TOTAL_BITS(INFORMATION_BITS), .SLICE_W(DATA_WIDTH_SLICE_IN)) u_in (
    .clk, .init, .run, .data_in,
    .data(data_info_new), .in_count(), .location(), .done(info_packet_read)
  );

  ham_insert #(.INFORMATION_BITS(INFORMATION_BITS)) u_insert (
    .clk, .init, .start(run && info_packet_read), .data_info(data_info_new),
    .data_encode, .done_encode
  );

  ham_calc #(.INFORMATION_BITS(INFORMATION_BITS)) u_calc (
    .data_encode, .data_packet_out(packet_comb), .ham_code(ham_comb)
  );

  always_ff @(posedge clk) begin
    if (init) begin
      packet_ready <= 1'b0;
    end else if (run && done_encode && !packet_ready) begin
      data_packet_out <= packet_comb;
      ham_code        <= ham_comb;
      packet_ready    <= 1'b1;
    end
  end

  slice_serializer #(.TOTAL_BITS(PACKET_BITS), .SLICE_W(DATA_WIDTH_SLICE_OUT)) u_out (
    .clk, .init, .ready(packet_ready), .request(run && request_info_packet_out),
    .data(data_packet_out), .data_out(data_out_packet), .slice_valid(data_out_valid),
    .out_count(), .location(), .done(info_packet_write)
  );

endmodule
