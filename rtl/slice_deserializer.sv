// slice_deserializer: collects a TOTAL_BITS-wide word from a SLICE_W-wide input bus.
//
// This is the "Input Information" / "Input Packet" stage of the codec. A down-counter
// (in_count) starts at TOTAL_BITS and a slice counter (location) starts at 1. On each clock with
// `run` high, while the word is incomplete, the slice on data_in is stored at bits
// [(location-1)*SLICE_W +: SLICE_W] of `data`. If more than SLICE_W bits are still missing, the
// counter drops by SLICE_W and location advances; otherwise only the low in_count bits of data_in
// are stored (the excess high bits of the bus are ignored), in_count becomes 0 and `done`
// (info_packet_read) goes high and stays high. Collecting a word takes ceil(TOTAL_BITS/SLICE_W)
// clocks.
//
// `init` is a synchronous initialisation (the codec drives it while new_data_flag is low): it
// reloads both counters, clears `done` and clears the collected word. The counting scheme, the
// reload values and the placement of the last partial slice follow the description of the
// design; clearing the word on init and having no other reset are choices of this design.
module slice_deserializer #(
  parameter int unsigned TOTAL_BITS = 248,
  parameter int unsigned SLICE_W    = 8,
  localparam int unsigned NSLICES   = (TOTAL_BITS + SLICE_W - 1) / SLICE_W,
  localparam int unsigned CW        = $clog2(TOTAL_BITS + 1),
  localparam int unsigned LW        = $clog2(NSLICES + 1)
) (
  input  logic                  clk,
  input  logic                  init,      // synchronous reload of counters and flag
  input  logic                  run,       // take one slice per clock while high
  input  logic [SLICE_W-1:0]    data_in,
  output logic [TOTAL_BITS-1:0] data,      // collected word (data_info_new / data_packet_new)
  output logic [CW-1:0]         in_count,  // bits still to be read (info_packet_in_count)
  output logic [LW-1:0]         location,  // 1-based slice index (info_packet_location_in_count)
  output logic                  done       // whole word collected (info_packet_read)
);

  logic [TOTAL_BITS-1:0] data_next;

  // Place the current slice; bits past in_count (last partial slice) or past the word are dropped.
  always_comb begin
    data_next = data;
    for (int unsigned b = 0; b < SLICE_W; b++) begin
      int unsigned idx;
      idx = (int'(location) - 1) * SLICE_W + b;
      if (b < in_count && idx < TOTAL_BITS) data_next[idx] = data_in[b];
    end
  end

  always_ff @(posedge clk) begin
    if (init) begin
      in_count <= CW'(TOTAL_BITS);
      location <= LW'(1);
      done     <= 1'b0;
      data     <= '0;
    end else if (run && !done) begin
      data <= data_next;
      if (in_count > CW'(SLICE_W)) begin
        in_count <= in_count - CW'(SLICE_W);
        location <= location + LW'(1);
      end else begin
        in_count <= '0;
        done     <= 1'b1;
      end
    end
  end

endmodule
