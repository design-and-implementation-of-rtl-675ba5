// tb_ham_encoder: self-checking test of ham_encoder.
//
// Instance S: 17 information bits, 8-bit buses. The worked example: slices 00, AA, 01 in must
// give data_encode-stage flag, ham_code 0F and packet slices 8B, 20, 75 out. With the request
// held high the operation must take 3 input + 2 encode + 3 output = 8 clocks after the
// initialising clock. Instance L: the default 248 bits, 8-bit buses; random information is
// checked against the reference encoder, with the 31 + 2 + 33 = 66 clock latency, and once with
// the request withheld for a while. The `enable` input is also checked: with it low the block
// ignores new_data_flag and keeps its result.
module tb_ham_encoder;
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

  // ---- S: 17 bits
  logic       s_en, s_flag, s_req, s_valid, s_read, s_denc, s_rdy, s_write;
  logic [7:0] s_din, s_dout;
  logic [4:0] s_ham;
  logic [22:0] s_pkt;
  ham_encoder #(.INFORMATION_BITS(17)) dut_s (
    .clk, .enable(s_en), .new_data_flag(s_flag), .request_info_packet_out(s_req), .data_in(s_din),
    .data_out_packet(s_dout), .data_out_valid(s_valid), .info_packet_read(s_read),
    .done_encode(s_denc), .packet_ready(s_rdy), .info_packet_write(s_write),
    .ham_code(s_ham), .data_packet_out(s_pkt)
  );

  // ---- L: default 248 bits
  logic       l_en, l_flag, l_req, l_valid, l_read, l_denc, l_rdy, l_write;
  logic [7:0] l_din, l_dout;
  logic [8:0] l_ham;
  logic [257:0] l_pkt;
  ham_encoder dut_l (
    .clk, .enable(l_en), .new_data_flag(l_flag), .request_info_packet_out(l_req), .data_in(l_din),
    .data_out_packet(l_dout), .data_out_valid(l_valid), .info_packet_read(l_read),
    .done_encode(l_denc), .packet_ready(l_rdy), .info_packet_write(l_write),
    .ham_code(l_ham), .data_packet_out(l_pkt)
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic example_17();
    logic [7:0] in_sl [3] = '{8'h00, 8'hAA, 8'h01};
    logic [7:0] out_sl [3] = '{8'h8B, 8'h20, 8'h75};
    int nout, cyc;
    s_en = 1'b1; s_flag = 1'b0; s_req = 1'b0;
    @(posedge clk); #1;
    check(!s_read && !s_denc && !s_write, "S flags cleared by initialisation");
    s_flag = 1'b1; s_req = 1'b1;
    nout = 0; cyc = 0;
    while (!s_write && cyc < 50) begin
      s_din = (cyc < 3) ? in_sl[cyc] : 8'hEE;
      @(posedge clk); #1;
      cyc++;
      if (cyc == 3) check(s_read, "S information read after 3 clocks");
      if (cyc == 4) check(s_denc && !s_rdy, "S done_encode one clock later");
      if (cyc == 5) check(s_rdy && s_ham == 5'h0F && s_pkt == 23'h75208B,
                          $sformatf("S packet %h ham %h", s_pkt, s_ham));
      if (s_valid) begin
        check(nout < 3 && s_dout == out_sl[nout], $sformatf("S out slice %0d = %h", nout, s_dout));
        nout++;
      end
    end
    check(nout == 3, "S three output slices");
    check(cyc == 8, $sformatf("S latency %0d clocks, expected 8", cyc));
    // enable low: new_data_flag is ignored and the result is kept
    s_en = 1'b0; s_flag = 1'b0;
    repeat (2) @(posedge clk); #1;
    check(s_write && s_pkt == 23'h75208B && s_ham == 5'h0F, "S holds its result while disabled");
    s_en = 1'b1;
    @(posedge clk); #1;
    check(!s_write && !s_rdy, "S re-initialised when enabled with new_data_flag low");
  endtask

  task automatic random_248(input bit pause);
    word_t w, pk, got;
    int nout, cyc, nin;
    w = rand_word(248);
    pk = ref_encode(248, w);
    got = '0;
    l_en = 1'b1; l_flag = 1'b0; l_req = 1'b0;
    @(posedge clk); #1;
    l_flag = 1'b1; l_req = !pause;
    nout = 0; cyc = 0; nin = 0;
    while (!l_write && cyc < 500) begin
      l_din = (nin < 31) ? w[nin*8 +: 8] : 8'($urandom);
      nin++;
      if (pause && cyc == 60) l_req = 1'b1;
      @(posedge clk); #1;
      cyc++;
      if (l_valid) begin
        got[nout*8 +: 8] = l_dout;
        if (nout == 32) check(l_dout[7:2] == '0, "L last slice padded with zeros");
        nout++;
      end
    end
    check(nout == 33, $sformatf("L %0d output slices", nout));
    check(got[257:0] == pk[257:0], "L packet matches the reference");
    check(l_pkt == pk[257:0] && 32'(l_ham) == ref_syndrome(248, ref_spread(248, w)), "L stored packet and ham_code");
    if (!pause) check(cyc == 66, $sformatf("L latency %0d clocks, expected 66", cyc));
    else        check(cyc == 60 + 33, $sformatf("L paused latency %0d clocks", cyc));
  endtask

  initial begin
    s_en = 1'b0; s_flag = 1'b0; s_req = 1'b0; s_din = '0;
    l_en = 1'b0; l_flag = 1'b0; l_req = 1'b0; l_din = '0;
    example_17();
    for (int t = 0; t < 20; t++) random_248(t == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
