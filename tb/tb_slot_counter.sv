// tb_slot_counter: checks that the SRR slot counter counts 0 .. N-1 and
// wraps, raises frame_start exactly when the count is 0, and restarts from
// 0 on reset, against a counter kept by the testbench. Runs the default
// N = 16 and a small N = 5 that is not a power of two.
module tb_slot_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] s16;
  logic [2:0] s5;
  logic f16, f5;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  slot_counter            dut16 (.clk, .rst_n, .s(s16), .frame_start(f16));
  slot_counter #(.N(5))   dut5  (.clk, .rst_n, .s(s5),  .frame_start(f5));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference counters, advanced at every clock edge
  int exp16 = 0, exp5 = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      exp16 <= 0;
      exp5  <= 0;
    end else begin
      exp16 <= (exp16 + 1) % 16;
      exp5  <= (exp5 + 1) % 5;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      check(s16 == 4'(exp16), $sformatf("N=16 slot %0d: s=%0d expected %0d", t, s16, exp16));
      check(s5 == 3'(exp5),   $sformatf("N=5 slot %0d: s=%0d expected %0d", t, s5, exp5));
      check(f16 == (exp16 == 0) && f5 == (exp5 == 0), "frame_start");
      if (t == 60) rst_n = 1'b0;
      if (t == 62) rst_n = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
