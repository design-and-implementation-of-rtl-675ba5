// slice_serializer: sends a TOTAL_BITS-wide word out over a SLICE_W-wide output bus.
//
// This is the "Output Packet" / "Output Information" stage of the codec. A down-counter
// (out_count) starts at TOTAL_BITS and a slice counter (location) at 1. On each clock with
// `ready` and `request` (request_info_packet_out) high, while the word is not yet fully sent,
// bits [(location-1)*SLICE_W +: SLICE_W] of `data` are registered onto data_out. When no more
// than SLICE_W bits remain, only those bits are driven in the low part of data_out and the
// unused high bits are zero; out_count becomes 0 and `done` (info_packet_write) goes high and
// stays high. With request held high the word leaves in ceil(TOTAL_BITS/SLICE_W) consecutive
// clocks; a low request simply pauses the transfer. data_out holds its last value between
// slices.
//
// `slice_valid` is high for the clock after each slice was registered, i.e. while data_out holds
// a new slice. It is an addition of this design: the original interface relies on the receiver
// counting clocks. `init` reloads the counters and clears the flags and data_out.
module slice_serializer #(
  parameter int unsigned TOTAL_BITS = 248,
  parameter int unsigned SLICE_W    = 8,
  localparam int unsigned NSLICES   = (TOTAL_BITS + SLICE_W - 1) / SLICE_W,
  localparam int unsigned CW        = $clog2(TOTAL_BITS + 1),
  localparam int unsigned LW        = $clog2(NSLICES + 1)
) (
  input  logic                  clk,
  input  logic                  init,        // synchronous reload of counters and flags
  input  logic                  ready,       // `data` is complete and may be sent
  input  logic                  request,     // request_info_packet_out
  input  logic [TOTAL_BITS-1:0] data,
  output logic [SLICE_W-1:0]    data_out,
  output logic                  slice_valid, // data_out holds a slice registered on the last clock
  output logic [CW-1:0]         out_count,   // bits still to be sent (info_packet_output_count)
  output logic [LW-1:0]         location,    // 1-based slice index (info_packet_location_out_count)
  output logic                  done         // whole word sent (info_packet_write)
);

  logic [SLICE_W-1:0] slice;

  always_comb begin
    slice = '0;
    for (int unsigned b = 0; b < SLICE_W; b++) begin
      int unsigned idx;
      idx = (int'(location) - 1) * SLICE_W + b;
      if (b < out_count && idx < TOTAL_BITS) slice[b] = data[idx];
    end
  end

  always_ff @(posedge clk) begin
    if (init) begin
      out_count   <= CW'(TOTAL_BITS);
      location    <= LW'(1);
      done        <= 1'b0;
      slice_valid <= 1'b0;
      data_out    <= '0;
    end else begin
      slice_valid <= 1'b0;
      if (ready && request && !done) begin
        data_out    <= slice;
        slice_valid <= 1'b1;
        if (out_count > CW'(SLICE_W)) begin
          out_count <= out_count - CW'(SLICE_W);
          location  <= location + LW'(1);
        end else begin
          out_count <= '0;
          done      <= 1'b1;
        end
      end
    end
  end

endmodule
