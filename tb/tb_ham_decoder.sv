// tb_ham_decoder: self-checking test of ham_decoder.
//
// Instance S: 17 information bits, 8-bit buses, the worked examples: packet slices 8B 20 75
// (clean), 8B 00 75 (one error at position 14, corrected) and 8B 00 55 (two errors, syndrome 18,
// detected, information 0A800 passed through). With the request held high each operation takes
// 3 input + 1 check + 3 output = 7 clocks. Instance L: the default 248 bits; random packets with
// 0, 1, 2 or 3 flipped bits are checked against the reference decoder, with the 33 + 1 + 31 = 65
// clock latency.
module tb_ham_decoder;
  import ham_ref_pkg::*;

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

  logic        s_en, s_flag, s_req, s_valid, s_read, s_tdone, s_write, s_err, s_one, s_par;
  logic [7:0]  s_din, s_dout;
  logic [4:0]  s_ham;
  logic [16:0] s_info;
  ham_decoder #(.INFORMATION_BITS(17)) dut_s (
    .clk, .enable(s_en), .new_data_flag(s_flag), .request_info_packet_out(s_req), .data_in(s_din),
    .data_out_info(s_dout), .data_out_valid(s_valid), .info_packet_read(s_read),
    .test_done(s_tdone), .info_packet_write(s_write), .error_flag(s_err),
    .one_error_bit(s_one), .parity_test(s_par), .ham_test(s_ham), .data_information_out(s_info)
  );

  logic         l_en, l_flag, l_req, l_valid, l_read, l_tdone, l_write, l_err, l_one, l_par;
  logic [7:0]   l_din, l_dout;
  logic [8:0]   l_ham;
  logic [247:0] l_info;
  ham_decoder dut_l (
    .clk, .enable(l_en), .new_data_flag(l_flag), .request_info_packet_out(l_req), .data_in(l_din),
    .data_out_info(l_dout), .data_out_valid(l_valid), .info_packet_read(l_read),
    .test_done(l_tdone), .info_packet_write(l_write), .error_flag(l_err),
    .one_error_bit(l_one), .parity_test(l_par), .ham_test(l_ham), .data_information_out(l_info)
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic example_17(input logic [22:0] pkt, input logic [16:0] exp_info,
                            input logic [7:0] exp_code);  // {parity, error, one, ham_test}
    logic [16:0] got;
    logic [4:0] exp_ham;
    logic exp_par, exp_err, exp_one;
    int nout, cyc;
    {exp_par, exp_err, exp_one, exp_ham} = exp_code;
    s_en = 1'b1; s_flag = 1'b0; s_req = 1'b0;
    @(posedge clk); #1;
    check(!s_read && !s_tdone && !s_err && !s_one, "S flags cleared by initialisation");
    s_flag = 1'b1; s_req = 1'b1;
    nout = 0; cyc = 0; got = '0;
    while (!s_write && cyc < 50) begin
      s_din = (cyc < 3) ? 8'(pkt >> (cyc * 8)) : 8'hEE;
      @(posedge clk); #1;
      cyc++;
      if (cyc == 3) check(s_read && !s_tdone, "S packet read after 3 clocks");
      if (cyc == 4) check(s_tdone && s_ham == exp_ham && s_par == exp_par && s_err == exp_err &&
                          s_one == exp_one,
                          $sformatf("S %h: done %b ham_test %h parity %b error %b one %b exp %h %b %b %b", pkt, s_tdone, s_ham,
                                    s_par, s_err, s_one, exp_ham, exp_par, exp_err, exp_one));
      if (s_valid) begin
        if (nout < 3) got[nout*8 +: 8] = 8'(s_dout);
        if (nout == 2) check(s_dout[7:1] == '0, "S last slice padded with zeros");
        nout++;
      end
    end
    check(nout == 3 && got == exp_info, $sformatf("S information %h expected %h", got, exp_info));
    check(cyc == 7, $sformatf("S latency %0d clocks, expected 7", cyc));
  endtask

  task automatic random_248(input int nerr);
    word_t w, pk, ri, got;
    int rs, nout, cyc, nin;
    bit rq, re, ro;
    w = rand_word(248);
    pk = ref_encode(248, w);
    for (int e = 0; e < nerr; e++) pk[$urandom_range(257, 0)] ^= 1'b1;
    ref_decode(248, pk, ri, rs, rq, re, ro);
    l_en = 1'b1; l_flag = 1'b0; l_req = 1'b0;
    @(posedge clk); #1;
    l_flag = 1'b1; l_req = 1'b1;
    nout = 0; cyc = 0; nin = 0; got = '0;
    while (!l_write && cyc < 500) begin
      l_din = (nin < 33) ? pk[nin*8 +: 8] : 8'($urandom);
      nin++;
      @(posedge clk); #1;
      cyc++;
      if (cyc == 34) check(l_tdone && 32'(l_ham) == rs && l_par == rq && l_err == re && l_one == ro,
                           "L flags match the reference");
      if (l_valid) begin
        got[nout*8 +: 8] = l_dout;
        nout++;
      end
    end
    check(nout == 31 && got[247:0] == ri[247:0], "L information matches the reference");
    if (nerr == 1) check(got[247:0] == w[247:0] && l_one, "L single error corrected");
    check(cyc == 65, $sformatf("L latency %0d clocks, expected 65", cyc));
  endtask

  initial begin
    s_en = 1'b0; s_flag = 1'b0; s_req = 1'b0; s_din = '0;
    l_en = 1'b0; l_flag = 1'b0; l_req = 1'b0; l_din = '0;
    example_17(23'h75208B, 17'h1AA00, {3'b000, 5'h00});
    example_17(23'h75008B, 17'h1AA00, {3'b111, 5'h0E});
    example_17(23'h55008B, 17'h0A800, {3'b010, 5'h18});
    example_17(23'h35208B, 17'h1AA00, {3'b110, 5'h00});  // parity bit alone flipped
    for (int t = 0; t < 40; t++) random_248(t % 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
