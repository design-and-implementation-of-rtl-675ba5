// codec_harness: drives one ham_codec_top of a given configuration through TRIALS
// encode/corrupt/decode rounds and reports its check and failure counts.
//
// Parameters: K information bits, WI input bus width, WO output bus width. Each round encodes a
// random word (for K = 17 the first round uses the worked example 1AA00 -> 75208B), compares the
// packet with the reference encoder, flips 0, 1 or 2 random packet bits, decodes and compares
// information and flags with the reference decoder. Latencies are checked against
// ceil(K/WI) + 2 + ceil(N/WO) clocks to encode and ceil(N/WI) + 1 + ceil(K/WO) to decode,
// N being the packet width. Unused high bits of the last input slice carry random values that
// the design must ignore. `finished` rises when all rounds are done.
module codec_harness
  import ham_ref_pkg::*;
#(
  parameter int K      = 17,
  parameter int WI     = 8,
  parameter int WO     = 8,
  parameter int TRIALS = 10
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic finished
);

  localparam int N   = ham_ref_pkg::ref_n(K);
  localparam int R   = ham_ref_pkg::ref_r(K);
  localparam int NIE = (K + WI - 1) / WI;   // input slices, encode
  localparam int NID = (N + WI - 1) / WI;   // input slices, decode
  localparam int NOE = (N + WO - 1) / WO;   // output slices, encode
  localparam int NOD = (K + WO - 1) / WO;   // output slices, decode

  logic          new_data_flag, new_info_packet, request_info_packet_out;
  logic [WI-1:0] data_in;
  logic [WO-1:0] data_out_packet, data_out_info;
  logic          data_out_packet_valid, data_out_info_valid;
  logic          info_packet_read, done_encode, test_done, info_packet_write;
  logic          error_flag, one_error_bit, parity_test;
  logic [R-1:0]  ham_code, ham_test;

  ham_codec_top #(.INFORMATION_BITS(K), .DATA_WIDTH_SLICE_IN(WI), .DATA_WIDTH_SLICE_OUT(WO)) dut (
    .clk, .new_data_flag, .new_info_packet, .request_info_packet_out, .data_in,
    .data_out_packet, .data_out_packet_valid, .data_out_info, .data_out_info_valid,
    .info_packet_read, .done_encode, .test_done, .info_packet_write,
    .error_flag, .one_error_bit, .parity_test, .ham_code, .ham_test
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (K=%0d WI=%0d WO=%0d): %s", K, WI, WO, what);
    end
  endtask

  // Slice `s` of a word of `len` bits, random beyond the word.
  function automatic logic [WI-1:0] in_slice(input word_t w, input int s, input int len);
    logic [WI-1:0] v;
    for (int b = 0; b < WI; b++) v[b] = (s * WI + b < len) ? w[s * WI + b] : 1'($urandom);
    return v;
  endfunction

  task automatic run(input bit enc, input word_t src, input int in_len, input int out_len,
                     output word_t dst, output int cyc, output int nout);
    int nin;
    dst = '0;
    new_info_packet = enc; new_data_flag = 1'b0; request_info_packet_out = 1'b0;
    @(posedge clk); #1;
    new_data_flag = 1'b1; request_info_packet_out = 1'b1;
    cyc = 0; nin = 0; nout = 0;
    while (!info_packet_write && cyc < 4 * (N + K) + 20) begin
      data_in = in_slice(src, nin, in_len);
      nin++;
      @(posedge clk); #1;
      cyc++;
      if (enc ? data_out_packet_valid : data_out_info_valid) begin
        for (int b = 0; b < WO; b++) begin
          if (nout * WO + b < out_len) dst[nout * WO + b] = enc ? data_out_packet[b] : data_out_info[b];
          else check(!(enc ? data_out_packet[b] : data_out_info[b]), "padding bits are zero");
        end
        nout++;
      end
    end
  endtask

  initial begin
    word_t info, pkt, bad, got, ri;
    int cyc, nout, rs;
    bit rq, re, ro;
    checks = 0; failures = 0; finished = 1'b0;
    new_data_flag = 1'b0; new_info_packet = 1'b1; request_info_packet_out = 1'b0; data_in = '0;
    for (int t = 0; t < TRIALS; t++) begin
      info = (K == 17 && t == 0) ? word_t'(17'h1AA00) : rand_word(K);
      run(1'b1, info, K, N, pkt, cyc, nout);
      check(nout == NOE && cyc == NIE + 2 + NOE, $sformatf("encode: %0d slices, %0d clocks", nout, cyc));
      check(pkt[N-1:0] == ref_encode(K, info)[N-1:0], "packet matches the reference");
      if (K == 17 && t == 0) check(pkt[22:0] == 23'h75208B && ham_code == R'(5'h0F), "worked example packet");
      bad = pkt;
      for (int e = 0; e < t % 3; e++) bad[$urandom_range(N - 1, 0)] ^= 1'b1;
      run(1'b0, bad, N, K, got, cyc, nout);
      check(nout == NOD && cyc == NID + 1 + NOD, $sformatf("decode: %0d slices, %0d clocks", nout, cyc));
      ref_decode(K, bad, ri, rs, rq, re, ro);
      check(got[K-1:0] == ri[K-1:0], "information matches the reference");
      check(32'(ham_test) == rs && parity_test == rq && error_flag == re && one_error_bit == ro,
            "flags match the reference");
      if (ro) check(got[K-1:0] == info[K-1:0], "single error corrected");
    end
    finished = 1'b1;
  end

endmodule
