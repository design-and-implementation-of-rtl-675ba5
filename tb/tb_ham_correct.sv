// tb_ham_correct: self-checking test of ham_correct.
//
// k = 17: each of the five outcomes is forced by hand (clean; single error at information
// position 14; single error at Hamming position 8, information untouched; double error;
// syndrome beyond the packet; parity-bit-only error). k = 248: random packets with 0 to 3
// flipped bits are run through the reference extraction and the block's corrected output and
// flags are compared with the reference decoder.
module tb_ham_correct;
  import ham_ref_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [16:0]  i17, o17;
  logic [4:0]   s17;
  logic         q17, e17, one17;
  logic [247:0] i248, o248;
  logic [8:0]   s248;
  logic         q248, e248, one248;

  ham_correct #(.INFORMATION_BITS(17)) dut17 (
    .data_information(i17), .ham_test(s17), .parity_test(q17),
    .data_information_out(o17), .error_flag(e17), .one_error_bit(one17));
  ham_correct dut248 (
    .data_information(i248), .ham_test(s248), .parity_test(q248),
    .data_information_out(o248), .error_flag(e248), .one_error_bit(one248));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t w, pk, ri;
    int rs;
    bit rq, re, ro;
    i248 = '0; s248 = '0; q248 = 1'b0;
    i17 = 17'h1A800; s17 = 5'd0;  q17 = 1'b0; #1;
    check(o17 == 17'h1A800 && !e17 && !one17, "clean");
    // Position 14 holds information bit 9.
    s17 = 5'd14; q17 = 1'b1; #1;
    check(o17 == 17'h1AA00 && e17 && one17, $sformatf("single error corrected: %h", o17));
    s17 = 5'd8;  q17 = 1'b1; #1;
    check(o17 == 17'h1A800 && e17 && one17, "single error on a Hamming bit");
    s17 = 5'd24; q17 = 1'b0; #1;
    check(o17 == 17'h1A800 && e17 && !one17, "double error detected, not corrected");
    s17 = 5'd14; q17 = 1'b0; #1;
    check(o17 == 17'h1A800 && e17 && !one17, "double error with in-range syndrome");
    s17 = 5'd25; q17 = 1'b1; #1;
    check(o17 == 17'h1A800 && e17 && !one17, "syndrome beyond the packet");
    s17 = 5'd23; q17 = 1'b1; #1;
    check(o17 == 17'h1A800 && e17 && !one17, "syndrome equal to the packet width");
    s17 = 5'd0;  q17 = 1'b1; #1;
    check(o17 == 17'h1A800 && e17 && !one17, "parity bit alone wrong");
    for (int t = 0; t < 300; t++) begin
      w = rand_word(248);
      pk = ref_encode(248, w);
      for (int e = 0; e < t % 4; e++) pk[$urandom_range(257, 0)] ^= 1'b1;
      i248 = ref_extract(248, pk)[247:0];
      s248 = 9'(ref_syndrome(248, pk));
      q248 = ref_parity(258, pk);
      #1;
      ref_decode(248, pk, ri, rs, rq, re, ro);
      check(o248 == ri[247:0], "k=248 corrected information");
      check(e248 == re && one248 == ro, "k=248 flags");
      if (t % 4 <= 1 && ro) check(o248 == w[247:0], "k=248 single error restores the original");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
