// tb_ham_extract: self-checking test of ham_extract.
//
// Known vectors (k = 17): 23'h75208B -> 1AA00, syndrome 0, parity 0; 23'h75008B (position 14
// flipped) -> syndrome 0E, parity 1; 23'h55008B (positions 14 and 22 flipped) -> syndrome 18,
// parity 0, information 0A800. k = 8: 13'h1C6 (position 7 flipped) -> syndrome 7, parity 1.
// Random packets at k = 248 with 0 to 3 flipped bits are compared with the reference model.
module tb_ham_extract;
  import ham_ref_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [22:0]  p17;
  logic [16:0]  i17;
  logic [4:0]   s17;
  logic         q17;
  logic [12:0]  p8;
  logic [7:0]   i8;
  logic [3:0]   s8;
  logic         q8;
  logic [257:0] p248;
  logic [247:0] i248;
  logic [8:0]   s248;
  logic         q248;

  ham_extract #(.INFORMATION_BITS(17)) dut17 (.data_packet(p17), .data_information(i17), .ham_test(s17), .parity_test(q17));
  ham_extract #(.INFORMATION_BITS(8))  dut8  (.data_packet(p8),  .data_information(i8),  .ham_test(s8),  .parity_test(q8));
  ham_extract                          dut248 (.data_packet(p248), .data_information(i248), .ham_test(s248), .parity_test(q248));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t w, pk;
    p248 = '0;
    p17 = 23'h75208B; p8 = 13'h1C6; #1;
    check(i17 == 17'h1AA00 && s17 == 0 && q17 == 0, $sformatf("clean %h %h %b", i17, s17, q17));
    check(s8 == 4'd7 && q8 == 1'b1, $sformatf("k=8 one error: syndrome %0d parity %b", s8, q8));
    p17 = 23'h75008B; #1;
    check(s17 == 5'h0E && q17 == 1'b1, $sformatf("one error: syndrome %h parity %b", s17, q17));
    p17 = 23'h55008B; #1;
    check(s17 == 5'h18 && q17 == 1'b0 && i17 == 17'h0A800,
          $sformatf("two errors: syndrome %h parity %b info %h", s17, q17, i17));
    for (int t = 0; t < 200; t++) begin
      w = rand_word(248);
      pk = ref_encode(248, w);
      for (int e = 0; e < t % 4; e++) pk[$urandom_range(257, 0)] ^= 1'b1;
      p248 = pk[257:0];
      #1;
      check(i248 == ref_extract(248, pk)[247:0], "k=248 information");
      check(32'(s248) == ref_syndrome(248, pk), "k=248 syndrome");
      check(q248 == ref_parity(258, pk), "k=248 parity");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
