// tb_slice_deserializer: self-checking test of slice_deserializer.
//
// Two instances: 17 bits over an 8-bit bus (the 17-bit worked example: counter 17 -> 9 -> 1 -> 0,
// location 1 -> 2 -> 3, last slice 1 bit wide) and 23 bits over a 5-bit bus. Random words are
// fed slice by slice, the unused high bits of the last slice filled with ones that must be
// ignored. Checked: the collected word, the counter and location sequences, that `done` rises
// after exactly ceil(TOTAL/W) clocks, that a low `run` pauses collection and that `init` clears.
module tb_slice_deserializer;
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

  // ---- instance A: 17 bits, 8-bit slices
  logic        a_init, a_run;
  logic [7:0]  a_din;
  logic [16:0] a_data;
  logic [4:0]  a_cnt;
  logic [1:0]  a_loc;
  logic        a_done;
  slice_deserializer #(.TOTAL_BITS(17), .SLICE_W(8)) dut_a (
    .clk, .init(a_init), .run(a_run), .data_in(a_din),
    .data(a_data), .in_count(a_cnt), .location(a_loc), .done(a_done)
  );

  // ---- instance B: 23 bits, 5-bit slices
  logic        b_init, b_run;
  logic [4:0]  b_din;
  logic [22:0] b_data;
  logic [4:0]  b_cnt;
  logic [2:0]  b_loc;
  logic        b_done;
  slice_deserializer #(.TOTAL_BITS(23), .SLICE_W(5)) dut_b (
    .clk, .init(b_init), .run(b_run), .data_in(b_din),
    .data(b_data), .in_count(b_cnt), .location(b_loc), .done(b_done)
  );

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_a(input logic [16:0] w, input bit with_pause);
    int k;
    int exp_cnt [4] = '{17, 9, 1, 0};
    a_run = 1'b0; a_init = 1'b1;
    @(posedge clk); #1;
    a_init = 1'b0;
    check(a_cnt == 17 && a_loc == 1 && !a_done && a_data == '0, "A init values");
    for (k = 0; k < 3; k++) begin
      if (with_pause && k == 1) begin
        a_run = 1'b0; a_din = 8'hA5;
        @(posedge clk); #1;
        check(a_cnt == 9 && a_loc == 2, "A holds while run low");
      end
      a_run = 1'b1;
      a_din = (k < 2) ? w[k*8 +: 8] : {7'h7F, w[16]};
      @(posedge clk); #1;
      check(int'(a_cnt) == exp_cnt[k+1], $sformatf("A count after slice %0d: %0d", k, a_cnt));
      check(int'(a_loc) == ((k < 2) ? k + 2 : 3), $sformatf("A location after slice %0d", k));
      check(a_done == (k == 2), $sformatf("A done after slice %0d", k));
    end
    a_din = 8'hFF;
    @(posedge clk); #1;
    a_run = 1'b0;
    check(a_data == w, $sformatf("A word %h expected %h", a_data, w));
  endtask

  task automatic run_b(input logic [22:0] w);
    b_run = 1'b0; b_init = 1'b1;
    @(posedge clk); #1;
    b_init = 1'b0;
    check(b_cnt == 23 && b_loc == 1 && !b_done, "B init values");
    b_run = 1'b1;
    for (int k = 0; k < 5; k++) begin
      b_din = (k < 4) ? w[k*5 +: 5] : {2'b11, w[22:20]};
      @(posedge clk); #1;
      check(b_done == (k == 4), $sformatf("B done after slice %0d", k));
    end
    b_run = 1'b0;
    check(b_data == w, $sformatf("B word %h expected %h", b_data, w));
    check(b_cnt == 0 && b_loc == 5, "B final counters");
  endtask

  initial begin
    a_init = 1'b0; a_run = 1'b0; a_din = '0;
    b_init = 1'b0; b_run = 1'b0; b_din = '0;
    run_a(17'h1AA00, 1'b0);   // the worked example: slices 00, AA, 01
    for (int t = 0; t < 20; t++) run_a(17'($urandom), t[0]);
    for (int t = 0; t < 20; t++) run_b(23'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
