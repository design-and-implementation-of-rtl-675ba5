// ham_insert: "Insertion Hamming Bits Locations" stage of the encoder, one clock long.
//
// On the clock where `start` is high (the information word is complete) and the stage has not
// yet fired, it registers data_encode and raises done_encode. data_encode holds information bit
// i at packet position info_pos(i) (the (i+1)-th position, counted from 1, that is not a power
// of two), stored at bit info_pos(i)-1; the Hamming positions 1, 2, 4, ... and the overall
// parity bit (the MSB) are zero, to be filled by ham_calc. `init` clears data_encode and
// done_encode. The placement and the one-clock stage with its done_encode flag follow the
// description of the design; the register clearing on init is this design's choice.
//
// Example (17 information bits): 17'h1AA00 becomes 23'h352000.
module ham_insert
  import ham_pkg::*;
#(
  parameter int unsigned INFORMATION_BITS = 248,
  localparam int unsigned PACKET_BITS     = packet_bits_for(INFORMATION_BITS)
) (
  input  logic                        clk,
  input  logic                        init,         // synchronous clear
  input  logic                        start,        // information word complete
  input  logic [INFORMATION_BITS-1:0] data_info,
  output logic [PACKET_BITS-1:0]      data_encode,
  output logic                        done_encode
);

  localparam int unsigned HAM_BITS = ham_bits_for(INFORMATION_BITS);

  logic [PACKET_BITS-1:0] spread;

  // Hamming bits and the overall parity bit stay zero.
  for (genvar j = 0; j < HAM_BITS; j++) begin : g_ham
    assign spread[(1 << j) - 1] = 1'b0;
  end
  assign spread[PACKET_BITS-1] = 1'b0;

  for (genvar i = 0; i < INFORMATION_BITS; i++) begin : g_info
    assign spread[info_pos(i) - 1] = data_info[i];
  end

  always_ff @(posedge clk) begin
    if (init) begin
      data_encode <= '0;
      done_encode <= 1'b0;
    end else if (start && !done_encode) begin
      data_encode <= spread;
      done_encode <= 1'b1;
    end
  end

endmodule
