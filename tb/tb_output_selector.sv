// tb_output_selector: random request patterns, with at most one
// preferential request per slot, drive one SRR output selector of a
// 16-port switch. Checks that a preferential request is always granted,
// that otherwise the grant goes to the first requester at or after a
// random start taken from a reference copy of the 16-bit LFSR, that the
// one-hot grant, grant index and flags agree, and that contention flags
// two or more requests. A final phase with all 16 inputs requesting checks
// that the random choice spreads grants over all inputs (each gets between
// half and twice its fair share).
module tb_output_selector;
  localparam int N = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] req_valid, req_pref, grant;
  logic         grant_valid, grant_pref, contention;
  logic [3:0]   grant_idx;
  logic [15:0]  ref_lfsr;
  int checks = 0, failures = 0;
  int n_pref = 0, n_rand = 0, n_cont = 0;
  int share [N];

  always #5 clk = ~clk;

  output_selector dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // reference LFSR: Galois form of x^16 + x^14 + x^13 + x^11 + 1
  always @(posedge clk)
    if (!rst_n) ref_lfsr <= 16'hACE1;
    else        ref_lfsr <= {1'b0, ref_lfsr[15:1]} ^ (ref_lfsr[0] ? 16'hB400 : 16'h0000);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req_valid = '0; req_pref = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 8000; t++) begin
      int exp_idx, nreq;
      bit exp_v, exp_p;
      if (t < 4000) begin
        for (int k = 0; k < N; k++) req_valid[k] = ($urandom % 100) < ((t % 2) ? 15 : 45);
        req_pref = '0;
        if (($urandom % 3) == 0) begin
          int p;
          p = $urandom % N;
          req_valid[p] = 1'b1;
          req_pref[p]  = 1'b1;
        end
      end else begin
        req_valid = '1;
        req_pref  = '0;
      end
      #1;
      nreq = $countones(req_valid);
      exp_v = nreq > 0;
      exp_p = req_pref != '0;
      exp_idx = 0;
      if (exp_p) begin
        for (int k = 0; k < N; k++) if (req_pref[k]) exp_idx = k;
      end else begin
        for (int k = N - 1; k >= 0; k--)
          if (req_valid[(ref_lfsr % N + k) % N]) exp_idx = (ref_lfsr % N + k) % N;
      end
      check(grant_valid == exp_v, $sformatf("slot %0d grant_valid", t));
      check(contention == (nreq > 1), $sformatf("slot %0d contention", t));
      if (exp_v) begin
        check(grant_idx == 4'(exp_idx), $sformatf("slot %0d grant %0d expected %0d", t, grant_idx, exp_idx));
        check(grant_pref == exp_p, $sformatf("slot %0d grant_pref", t));
        check(grant == (N'(1) << exp_idx), $sformatf("slot %0d one-hot grant", t));
        if (exp_p) n_pref++; else n_rand++;
        if (!exp_p && nreq > 1) n_cont++;
      end else
        check(grant == '0, "no grant without requests");
      if (t >= 4000) share[grant_idx]++;
      @(negedge clk);
    end
    for (int k = 0; k < N; k++)
      check(share[k] > 4000 / N / 2 && share[k] < 4000 / N * 2, $sformatf("input %0d share %0d", k, share[k]));
    $display("preferential=%0d random=%0d random-with-contention=%0d", n_pref, n_rand, n_cont);
    check(n_pref > 0 && n_cont > 0, "every case exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
