// tb_input_selector: random slot numbers and VOQ lengths (small values, so
// that empty queues and ties are frequent) drive the SRR input selector of
// input 5 in a 16-port switch. A reference model computes the expected
// request: the preferential output (5 + s) mod 16 if its queue is not
// empty, otherwise the longest queue, ties going to the first queue at or
// after the model's own round-robin pointer. Counts preferential requests,
// longest-queue requests, ties and idle slots, and fails if any is missing.
module tb_input_selector;
  localparam int N = 16, LW = 7, ID = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0]            s;
  logic [N-1:0][LW-1:0]  qlen;
  logic                  req_valid, req_pref, tie;
  logic [3:0]            req_dest;
  int checks = 0, failures = 0;
  int n_pref = 0, n_lq = 0, n_tie = 0, n_idle = 0;
  int rr = 0;

  always #5 clk = ~clk;

  input_selector #(.N(N), .LEN_W(LW), .INPUT_ID(ID)) dut (.*);

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
    s = '0; qlen = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      int pd, best, bestlen, ncand;
      bit ev, ep, et;
      int ed;
      s = 4'($urandom);
      for (int q = 0; q < N; q++)
        qlen[q] = (($urandom % 100) < ((t % 3 == 0) ? 90 : 50)) ? '0 : LW'(1 + $urandom % 3);
      if (t % 97 == 0) qlen = '0;
      #1;
      // reference
      pd = (ID + s) % N;
      bestlen = 0; best = 0; ncand = 0;
      for (int q = 0; q < N; q++) if (qlen[q] > bestlen) bestlen = qlen[q];
      for (int k = N - 1; k >= 0; k--) begin
        int q;
        q = (rr + k) % N;
        if (bestlen > 0 && qlen[q] == bestlen) begin
          best = q;
          ncand++;
        end
      end
      if (qlen[pd] != 0) begin
        ev = 1; ep = 1; ed = pd; et = 0;
      end else begin
        ev = bestlen > 0; ep = 0; ed = best; et = ev && ncand > 1;
      end
      check(req_valid == ev, $sformatf("slot %0d valid %0d expected %0d", t, req_valid, ev));
      if (ev) begin
        check(req_pref == ep, $sformatf("slot %0d pref %0d expected %0d", t, req_pref, ep));
        check(req_dest == 4'(ed), $sformatf("slot %0d dest %0d expected %0d", t, req_dest, ed));
        check(tie == et, $sformatf("slot %0d tie %0d expected %0d", t, tie, et));
      end
      if (!ev) n_idle++;
      else if (ep) n_pref++;
      else begin
        n_lq++;
        if (et) n_tie++;
        rr = (ed + 1) % N;
      end
      @(negedge clk);
    end
    $display("preferential=%0d longest-queue=%0d ties=%0d idle=%0d", n_pref, n_lq, n_tie, n_idle);
    check(n_pref > 0 && n_lq > 0 && n_tie > 0 && n_idle > 0, "every case exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
