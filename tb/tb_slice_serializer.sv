// tb_slice_serializer: self-checking test of slice_serializer.
//
// Two instances: 23 bits over an 8-bit bus (the worked example: 23'h75208B leaves as 8B, 20, 75,
// counter 23 -> 15 -> 7 -> 0) and 17 bits over a 5-bit bus. Checked: each slice and the zero
// padding of the last one, the counter and location values, slice_valid, that nothing moves
// before `ready` or while `request` is low, and that `done` rises with the last slice.
module tb_slice_serializer;

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

  logic        a_init, a_ready, a_req, a_valid, a_done;
  logic [22:0] a_data;
  logic [7:0]  a_out;
  logic [4:0]  a_cnt;
  logic [1:0]  a_loc;
  slice_serializer #(.TOTAL_BITS(23), .SLICE_W(8)) dut_a (
    .clk, .init(a_init), .ready(a_ready), .request(a_req), .data(a_data),
    .data_out(a_out), .slice_valid(a_valid), .out_count(a_cnt), .location(a_loc), .done(a_done)
  );

  logic        b_init, b_ready, b_req, b_valid, b_done;
  logic [16:0] b_data;
  logic [4:0]  b_out;
  logic [4:0]  b_cnt;
  logic [2:0]  b_loc;
  slice_serializer #(.TOTAL_BITS(17), .SLICE_W(5)) dut_b (
    .clk, .init(b_init), .ready(b_ready), .request(b_req), .data(b_data),
    .data_out(b_out), .slice_valid(b_valid), .out_count(b_cnt), .location(b_loc), .done(b_done)
  );

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_a(input logic [22:0] w, input bit pause);
    logic [7:0] exp [3];
    int exp_cnt [3] = '{15, 7, 0};
    exp[0] = w[7:0]; exp[1] = w[15:8]; exp[2] = {1'b0, w[22:16]};
    a_init = 1'b1; a_ready = 1'b0; a_req = 1'b0;
    @(posedge clk); #1;
    a_init = 1'b0; a_data = w;
    check(a_cnt == 23 && a_loc == 1 && !a_done && !a_valid, "A init values");
    a_req = 1'b1;                       // request but not ready: nothing moves
    @(posedge clk); #1;
    check(!a_valid && a_cnt == 23, "A waits for ready");
    a_ready = 1'b1;
    for (int k = 0; k < 3; k++) begin
      if (pause && k == 1) begin
        a_req = 1'b0;
        @(posedge clk); #1;
        check(!a_valid && a_cnt == 15, "A pauses while request low");
        a_req = 1'b1;
      end
      @(posedge clk); #1;
      check(a_valid, $sformatf("A valid slice %0d", k));
      check(a_out == exp[k], $sformatf("A slice %0d = %h expected %h", k, a_out, exp[k]));
      check(int'(a_cnt) == exp_cnt[k], $sformatf("A count after slice %0d", k));
      check(a_done == (k == 2), $sformatf("A done after slice %0d", k));
    end
    @(posedge clk); #1;
    check(!a_valid && a_out == exp[2], "A idle and holding after the last slice");
    a_req = 1'b0;
  endtask

  task automatic run_b(input logic [16:0] w);
    logic [4:0] exp;
    b_init = 1'b1; b_ready = 1'b1; b_req = 1'b0;
    @(posedge clk); #1;
    b_init = 1'b0; b_data = w; b_req = 1'b1;
    for (int k = 0; k < 4; k++) begin
      @(posedge clk); #1;
      exp = (k < 3) ? w[k*5 +: 5] : {3'b000, w[16:15]};
      check(b_valid && b_out == exp, $sformatf("B slice %0d = %h expected %h", k, b_out, exp));
      check(int'(b_loc) == ((k < 3) ? k + 2 : 4), $sformatf("B location after slice %0d", k));
      check(b_done == (k == 3), $sformatf("B done after slice %0d", k));
    end
    b_req = 1'b0;
  endtask

  initial begin
    a_init = 1'b0; a_ready = 1'b0; a_req = 1'b0; a_data = '0;
    b_init = 1'b0; b_ready = 1'b0; b_req = 1'b0; b_data = '0;
    run_a(23'h75208B, 1'b0);
    for (int t = 0; t < 20; t++) run_a(23'($urandom), t[0]);
    for (int t = 0; t < 20; t++) run_b(17'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
