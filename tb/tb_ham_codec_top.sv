// tb_ham_codec_top: end-to-end test of ham_codec_top at its default configuration
// (248 information bits, 9 Hamming bits, 258-bit packet, 8-bit input and output buses).
//
// Each round encodes a random information word through the pins, checks the packet against the
// reference encoder, corrupts the packet in one of several ways, decodes it through the pins and
// checks the information and flags against the reference decoder. Cycle counts are checked:
// 31 + 2 + 33 = 66 clocks to encode and 33 + 1 + 31 = 65 clocks to decode with the request held
// high. Every mechanism of the design is counted and must occur at least once: encode and
// decode operations, the partial last input slice (258 = 32*8 + 2), the partial last output
// slice, an output stall (request low), a clean packet, a corrected single error on an
// information bit and on a Hamming bit, a parity-bit-only error, a detected double error, a
// syndrome beyond the packet, and the encoder keeping its result across a decode.
module tb_ham_codec_top;
  import ham_ref_pkg::*;

  localparam int K = 248;
  localparam int N = 258;

  logic clk = 1'b0;
  always #5 clk = !clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic       new_data_flag, new_info_packet, request_info_packet_out;
  logic [7:0] data_in, data_out_packet, data_out_info;
  logic       data_out_packet_valid, data_out_info_valid;
  logic       info_packet_read, done_encode, test_done, info_packet_write;
  logic       error_flag, one_error_bit, parity_test;
  logic [8:0] ham_code, ham_test;

  ham_codec_top dut (
    .clk, .new_data_flag, .new_info_packet, .request_info_packet_out, .data_in,
    .data_out_packet, .data_out_packet_valid, .data_out_info, .data_out_info_valid,
    .info_packet_read, .done_encode, .test_done, .info_packet_write,
    .error_flag, .one_error_bit, .parity_test, .ham_code, .ham_test
  );

  // mechanism counters
  int n_enc, n_dec, n_part_in, n_part_out, n_stall, n_clean, n_fix_info, n_fix_ham,
      n_par_only, n_double, n_range, n_hold;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Encode `info`; the request is withheld for `stall` clocks after the run starts.
  task automatic encode(input word_t info, input int stall, output word_t pkt);
    int cyc, nin, nout;
    pkt = '0;
    new_info_packet = 1'b1; new_data_flag = 1'b0; request_info_packet_out = 1'b0;
    @(posedge clk); #1;
    new_data_flag = 1'b1;
    request_info_packet_out = (stall == 0);
    cyc = 0; nin = 0; nout = 0;
    while (!info_packet_write && cyc < 1000) begin
      data_in = (nin < 31) ? info[nin*8 +: 8] : 8'($urandom);
      nin++;
      if (stall != 0 && cyc == 35 + stall) request_info_packet_out = 1'b1;
      @(posedge clk); #1;
      cyc++;
      if (stall != 0 && cyc > 33 && !request_info_packet_out) begin
        check(!data_out_packet_valid, "no output while the request is low");
        if (cyc == 34) n_stall++;
      end
      if (data_out_packet_valid) begin
        pkt[nout*8 +: 8] = data_out_packet;
        if (nout == 32) begin
          check(data_out_packet[7:2] == '0, "partial last packet slice padded with zeros");
          n_part_out++;
        end
        nout++;
      end
    end
    check(nout == 33, $sformatf("encode: %0d slices", nout));
    if (stall == 0) check(cyc == 66, $sformatf("encode latency %0d, expected 66", cyc));
    else check(cyc == 35 + stall + 33, $sformatf("stalled encode latency %0d", cyc));
    n_enc++;
  endtask

  task automatic decode(input word_t pkt, output word_t info, output int cyc);
    int nin, nout;
    info = '0;
    new_info_packet = 1'b0; new_data_flag = 1'b0; request_info_packet_out = 1'b0;
    @(posedge clk); #1;
    new_data_flag = 1'b1; request_info_packet_out = 1'b1;
    cyc = 0; nin = 0; nout = 0;
    while (!info_packet_write && cyc < 1000) begin
      if (nin == 32) begin
        data_in = {6'($urandom), pkt[257:256]};   // high bits of the last slice are ignored
        n_part_in++;
      end else data_in = (nin < 32) ? pkt[nin*8 +: 8] : 8'($urandom);
      nin++;
      @(posedge clk); #1;
      cyc++;
      if (data_out_info_valid) begin
        info[nout*8 +: 8] = data_out_info;
        nout++;
      end
    end
    check(nout == 31, $sformatf("decode: %0d slices", nout));
    n_dec++;
  endtask

  // One round: encode, corrupt with `mode`, decode, compare.
  //   0 clean, 1 one error on an information bit, 2 one error on a Hamming bit,
  //   3 parity bit only, 4 two errors, 5 three errors with syndrome 258
  task automatic round(input int mode, input int stall);
    word_t info, pkt, bad, got, ri;
    int rs, cyc, p1, p2;
    bit rq, re, ro;
    logic [8:0] ham_before;
    info = rand_word(K);
    encode(info, stall, pkt);
    check(pkt[N-1:0] == ref_encode(K, info)[N-1:0], "encoded packet matches the reference");
    check(32'(ham_code) == ref_syndrome(K, ref_spread(K, info)), "ham_code");
    ham_before = ham_code;
    bad = pkt;
    case (mode)
      1: begin
        do p1 = $urandom_range(N - 1, 1); while (pow2(p1));
        bad[p1-1] ^= 1'b1;
      end
      2: begin
        p1 = 2 ** int'($urandom_range(8, 0));
        bad[p1-1] ^= 1'b1;
      end
      3: bad[N-1] ^= 1'b1;
      4: begin
        p1 = $urandom_range(N, 1);
        do p2 = $urandom_range(N, 1); while (p2 == p1);
        bad[p1-1] ^= 1'b1;
        bad[p2-1] ^= 1'b1;
      end
      5: begin
        bad[256] ^= 1'b1;  // positions 257, 2 and 1: syndrome 257^2^1 = 258
        bad[1]   ^= 1'b1;
        bad[0]   ^= 1'b1;
      end
      default: ;
    endcase
    decode(bad, got, cyc);
    check(cyc == 65, $sformatf("decode latency %0d, expected 65", cyc));
    ref_decode(K, bad, ri, rs, rq, re, ro);
    check(got[K-1:0] == ri[K-1:0], $sformatf("mode %0d: information matches the reference", mode));
    check(32'(ham_test) == rs && parity_test == rq && error_flag == re && one_error_bit == ro,
          $sformatf("mode %0d: flags ham_test %0d parity %b error %b one %b", mode, ham_test,
                    parity_test, error_flag, one_error_bit));
    check(ham_code == ham_before, "encoder result kept across a decode");
    if (ham_code == ham_before) n_hold++;
    case (mode)
      0: begin
        check(!error_flag && got[K-1:0] == info[K-1:0], "clean packet");
        n_clean += int'(!error_flag);
      end
      1: begin
        check(one_error_bit && got[K-1:0] == info[K-1:0], "information-bit error corrected");
        n_fix_info += int'(one_error_bit);
      end
      2: begin
        check(one_error_bit && got[K-1:0] == info[K-1:0], "Hamming-bit error corrected");
        n_fix_ham += int'(one_error_bit);
      end
      3: begin
        check(error_flag && !one_error_bit && ham_test == 0 && got[K-1:0] == info[K-1:0],
              "parity-bit error flagged, information intact");
        n_par_only += int'(error_flag && ham_test == 0);
      end
      4: begin
        check(error_flag && !one_error_bit && !parity_test, "double error detected");
        n_double += int'(error_flag && !one_error_bit);
      end
      5: begin
        check(error_flag && !one_error_bit && ham_test == 9'd258, "syndrome beyond the packet");
        n_range += int'(error_flag && !one_error_bit && ham_test >= 9'(N));
      end
      default: ;
    endcase
  endtask

  initial begin
    n_enc = 0; n_dec = 0; n_part_in = 0; n_part_out = 0; n_stall = 0; n_clean = 0;
    n_fix_info = 0; n_fix_ham = 0; n_par_only = 0; n_double = 0; n_range = 0; n_hold = 0;
    new_data_flag = 1'b0; new_info_packet = 1'b1; request_info_packet_out = 1'b0; data_in = '0;
    for (int t = 0; t < 36; t++) round(t % 6, (t % 7 == 3) ? 5 : 0);
    $display("mechanisms: encode %0d decode %0d partial_in %0d partial_out %0d stall %0d",
             n_enc, n_dec, n_part_in, n_part_out, n_stall);
    $display("            clean %0d fix_info %0d fix_ham %0d parity_only %0d double %0d out_of_range %0d hold %0d",
             n_clean, n_fix_info, n_fix_ham, n_par_only, n_double, n_range, n_hold);
    check(n_enc > 0 && n_dec > 0, "encode and decode happened");
    check(n_part_in > 0 && n_part_out > 0, "partial slices happened");
    check(n_stall > 0, "an output stall happened");
    check(n_clean > 0 && n_fix_info > 0 && n_fix_ham > 0, "clean and corrected packets happened");
    check(n_par_only > 0 && n_double > 0 && n_range > 0, "uncorrectable cases happened");
    check(n_hold > 0, "encoder state kept across decode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
