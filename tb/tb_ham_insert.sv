// tb_ham_insert: self-checking test of ham_insert.
//
// k = 17: the worked example 17'h1AA00 must give 23'h352000. k = 8: the information 0x11
// (D1 = 1, D5 = 1) must land on positions 3 and 9 (13'h104). k = 248 (default): random words are
// compared with the reference model's placement. Checked as well: data_encode and done_encode
// change on the clock after `start` and not before, the stage fires once (later input changes
// are ignored until init), and init clears both.
module tb_ham_insert;
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

  logic         init, start;
  logic [16:0]  i17;
  logic [22:0]  e17;
  logic         d17;
  logic [7:0]   i8;
  logic [12:0]  e8;
  logic         d8;
  logic [247:0] i248;
  logic [257:0] e248;
  logic         d248;

  ham_insert #(.INFORMATION_BITS(17)) dut17 (.clk, .init, .start, .data_info(i17), .data_encode(e17), .done_encode(d17));
  ham_insert #(.INFORMATION_BITS(8))  dut8  (.clk, .init, .start, .data_info(i8),  .data_encode(e8),  .done_encode(d8));
  ham_insert                          dut248 (.clk, .init, .start, .data_info(i248), .data_encode(e248), .done_encode(d248));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fire();
    init = 1'b1; start = 1'b0;
    @(posedge clk); #1;
    init = 1'b0;
    check(!d17 && !d8 && !d248 && e17 == '0 && e248 == '0, "init clears the stage");
    @(posedge clk); #1;
    check(!d17 && !d248, "nothing happens without start");
    start = 1'b1;
    @(posedge clk); #1;
    check(d17 && d8 && d248, "done_encode one clock after start");
  endtask

  initial begin
    word_t w;
    logic [22:0] hold17;
    init = 1'b0; start = 1'b0;
    i17 = 17'h1AA00; i8 = 8'h11; i248 = '0;
    fire();
    check(e17 == 23'h352000, $sformatf("k=17 example: %h", e17));
    check(e8 == 13'h104, $sformatf("k=8 example: %h", e8));
    hold17 = e17;
    i17 = 17'h00001;
    @(posedge clk); #1;
    check(e17 == hold17, "stage fires once");
    for (int t = 0; t < 100; t++) begin
      w = rand_word(248);
      i248 = w[247:0];
      i17 = 17'($urandom);
      fire();
      check(e248 == ref_spread(248, w)[257:0], "k=248 random placement");
      check(e17 == ref_spread(17, word_t'(i17))[22:0], "k=17 random placement");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
