// tb_ham_codec_workloads: runs the codec in the configurations the design was evaluated with,
// side by side: 22, 107 and 248 information bits on 8-bit buses, the 17-bit worked example on
// 8-bit buses, 17 bits with a 17-bit input bus and a 23-bit output bus (the bus-width example),
// and 22 bits over 1-bit serial buses. Each configuration runs encode/corrupt/decode rounds
// through codec_harness.
module tb_ham_codec_workloads;

  logic clk = 1'b0;
  always #5 clk = !clk;

  localparam int NH = 6;
  int   c [NH];
  int   f [NH];
  logic d [NH];

  codec_harness #(.K(22),  .WI(8),  .WO(8),  .TRIALS(12)) h22  (.clk, .checks(c[0]), .failures(f[0]), .finished(d[0]));
  codec_harness #(.K(107), .WI(8),  .WO(8),  .TRIALS(12)) h107 (.clk, .checks(c[1]), .failures(f[1]), .finished(d[1]));
  codec_harness #(.K(248), .WI(8),  .WO(8),  .TRIALS(12)) h248 (.clk, .checks(c[2]), .failures(f[2]), .finished(d[2]));
  codec_harness #(.K(17),  .WI(8),  .WO(8),  .TRIALS(12)) h17  (.clk, .checks(c[3]), .failures(f[3]), .finished(d[3]));
  codec_harness #(.K(17),  .WI(17), .WO(23), .TRIALS(12)) h17w (.clk, .checks(c[4]), .failures(f[4]), .finished(d[4]));
  codec_harness #(.K(22),  .WI(1),  .WO(1),  .TRIALS(12)) h22s (.clk, .checks(c[5]), .failures(f[5]), .finished(d[5]));

  int checks, failures;

  task automatic report();
    checks = 0; failures = 0;
    for (int i = 0; i < NH; i++) begin
      checks += c[i];
      failures += f[i];
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    report();
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    wait (d[0] && d[1] && d[2] && d[3] && d[4] && d[5]);
    #1;
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
