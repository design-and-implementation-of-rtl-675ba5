// tb_ham_calc: self-checking test of ham_calc.
//
// Known vectors: k = 17, data_encode 23'h352000 -> packet 23'h75208B, ham_code 5'h0F; k = 8,
// information 0x11 -> check bits P1=0, P2=1, P4=0, P8=1 and parity 0 (packet 13'h186). Random
// words at k = 17 and k = 248 are compared with the reference encoder.
module tb_ham_calc;
  import ham_ref_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [22:0]  e17, p17;
  logic [4:0]   h17;
  logic [12:0]  e8, p8;
  logic [3:0]   h8;
  logic [257:0] e248, p248;
  logic [8:0]   h248;

  ham_calc #(.INFORMATION_BITS(17)) dut17 (.data_encode(e17), .data_packet_out(p17), .ham_code(h17));
  ham_calc #(.INFORMATION_BITS(8))  dut8  (.data_encode(e8),  .data_packet_out(p8),  .ham_code(h8));
  ham_calc                          dut248 (.data_encode(e248), .data_packet_out(p248), .ham_code(h248));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t w, pk;
    e17 = 23'h352000; e8 = 13'h104; e248 = '0;
    #1;
    check(p17 == 23'h75208B, $sformatf("k=17 packet %h", p17));
    check(h17 == 5'h0F, $sformatf("k=17 ham_code %h", h17));
    check(p8 == 13'h186 && h8 == 4'b1010, $sformatf("k=8 packet %h ham %b", p8, h8));
    for (int t = 0; t < 200; t++) begin
      w = rand_word(248);
      e248 = ref_spread(248, w)[257:0];
      e17 = ref_spread(17, w)[22:0];
      #1;
      pk = ref_encode(248, w);
      check(p248 == pk[257:0], "k=248 random packet");
      check(h248 == 9'(ref_syndrome(248, ref_spread(248, w))), "k=248 ham_code");
      pk = ref_encode(17, w);
      check(p17 == pk[22:0], "k=17 random packet");
      check(ref_parity(258, word_t'(p248)) == 0, "k=248 packet has even weight");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
