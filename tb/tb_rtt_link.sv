// tb_rtt_link: drives random words into link models of delay 0, 2 (the
// default, half of the default 4-slot round trip) and 10, and checks that
// each word comes out exactly DELAY slots later, and that reset empties the
// pipeline (zeros come out afterwards).
module tb_rtt_link;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] d, q0, q2, q10;
  logic [7:0] hist [$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rtt_link #(.W(8), .DELAY(0))  u0  (.clk, .rst_n, .d, .q(q0));
  rtt_link #(.W(8))             u2  (.clk, .rst_n, .d, .q(q2));
  rtt_link #(.W(8), .DELAY(10)) u10 (.clk, .rst_n, .d, .q(q10));

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

  initial begin
    d = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // after reset the pipeline holds zeros
    for (int k = 0; k < 10; k++) hist.push_back(8'h00);
    for (int t = 0; t < 300; t++) begin
      d = 8'($urandom);
      hist.push_back(d);
      #1;
      check(q0 == d, "delay 0 is a wire");
      // hist[$] is this slot's word; hist[$-k] the one k slots ago
      check(q2  == hist[$-2],  $sformatf("slot %0d: delay 2 gave %h expected %h", t, q2, hist[$-2]));
      check(q10 == hist[$-10], $sformatf("slot %0d: delay 10 gave %h expected %h", t, q10, hist[$-10]));
      @(negedge clk);
    end
    // reset flushes the pipeline
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    d = 8'h5A;
    #1;
    check(q2 == 8'h00 && q10 == 8'h00, "pipeline cleared by reset");
    @(negedge clk);
    @(negedge clk);
    check(q2 == 8'h5A, "first word after reset arrives after 2 slots");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
