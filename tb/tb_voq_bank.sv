// tb_voq_bank: random arrivals and grant-driven departures on a small line
// card (4 queues of 4 cells, 16-bit cells), compared with a reference
// model made of one SystemVerilog queue per VOQ. Checks the departing cell
// and its valid flag in the slot of the grant, the wasted flag for grants
// to empty queues, drops at full queues and every queue length. Counts
// drops, wasted grants and simultaneous arrival/departure on one queue,
// and fails if any of them never happened.
module tb_voq_bank;
  localparam int N = 4, DEPTH = 4, W = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic          in_valid, deq_valid, in_drop, out_valid, wasted;
  logic [1:0]    in_dest, deq_dest;
  logic [W-1:0]  in_data, out_data;
  logic [N-1:0][2:0] qlen;
  logic [W-1:0]  model [N][$];
  int checks = 0, failures = 0;
  int n_drop = 0, n_wasted = 0, n_same = 0, n_deq = 0;

  always #5 clk = ~clk;

  voq_bank #(.N(N), .DEPTH(DEPTH), .CELL_W(W)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; deq_valid = 0; in_dest = 0; deq_dest = 0; in_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      bit full_before;
      // arrival rate varies so that queues both fill and empty
      in_valid  = ($urandom % 100) < ((t / 500) % 2 ? 80 : 30);
      in_dest   = 2'($urandom);
      in_data   = 16'($urandom);
      deq_valid = ($urandom % 100) < 55;
      deq_dest  = 2'($urandom);
      #1;
      for (int q = 0; q < N; q++)
        check(qlen[q] == 3'(model[q].size()), $sformatf("slot %0d qlen[%0d]=%0d expected %0d", t, q, qlen[q], model[q].size()));
      // departure
      if (deq_valid && model[deq_dest].size() > 0) begin
        check(out_valid && !wasted, $sformatf("slot %0d departure missing", t));
        check(out_data == model[deq_dest][0], $sformatf("slot %0d data %h expected %h", t, out_data, model[deq_dest][0]));
        if (in_valid && in_dest == deq_dest) n_same++;
      end else begin
        check(!out_valid, $sformatf("slot %0d unexpected departure", t));
        check(wasted == deq_valid, $sformatf("slot %0d wasted flag", t));
        if (deq_valid) n_wasted++;
      end
      // arrival
      check(in_drop == (in_valid && model[in_dest].size() == DEPTH), $sformatf("slot %0d drop flag", t));
      // update the model as the clock edge will update the block; a full
      // queue refuses the arrival even if it also sends a cell this slot
      full_before = model[in_dest].size() == DEPTH;
      if (deq_valid && model[deq_dest].size() > 0) begin
        void'(model[deq_dest].pop_front());
        n_deq++;
      end
      if (in_valid) begin
        if (in_drop) n_drop++;
        if (!full_before) model[in_dest].push_back(in_data);
      end
      @(negedge clk);
    end
    $display("drops=%0d wasted=%0d departures=%0d same-queue arrival+departure=%0d", n_drop, n_wasted, n_deq, n_same);
    check(n_drop > 0 && n_wasted > 0 && n_same > 0 && n_deq > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
