// tb_srr_scheduler: the distributed SRR scheduler at its defaults (16
// ports, round trip time 4 slots), driven with VOQ lengths by the
// testbench. Three phases:
//  1. Latency: a single non-empty VOQ; its grant must reach the input,
//     and the crossbar setting the output, exactly RTT slots after the
//     slot in which the request was made.
//  2. Saturation: every VOQ non-empty. Every input must receive a grant in
//     every slot, for output (i + s) mod 16 where s is the slot number RTT
//     slots earlier (the TDMA behaviour of SRR under full load).
//  3. Random lengths: a reference model of the input selectors gives the
//     requests of each slot; RTT slots later every output that had
//     requests must have granted exactly one of them, the preferential one
//     if there was one, and every grant must answer a request.
module tb_srr_scheduler;
  localparam int N = 16, RTT = 4, LW = 7;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0][N-1:0][LW-1:0] qlen;
  logic [N-1:0]        in_grant_valid, xbar_valid;
  logic [N-1:0][3:0]   in_grant_dest, xbar_sel;
  logic [N-1:0]        stat_req, stat_req_pref, stat_tie, stat_grant, stat_grant_pref, stat_contention;
  int checks = 0, failures = 0;
  int slot = 0;          // slots since reset release = slot number s mod N
  int rr [N];
  // model requests of each slot: dest or -1, and pref flag
  int req_d [$][N];
  bit req_p [$][N];
  int n_cont = 0, n_pref = 0, n_npref = 0, n_sat = 0;

  always #5 clk = ~clk;

  srr_scheduler dut (.*);

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

  // reference input selectors for the current slot and qlen
  task automatic model_requests(output int d [N], output bit p [N]);
    for (int i = 0; i < N; i++) begin
      int pd, best, bl;
      pd = (i + slot) % N;
      if (qlen[i][pd] != 0) begin
        d[i] = pd; p[i] = 1;
      end else begin
        bl = 0; best = -1;
        for (int k = 0; k < N; k++) begin
          int q;
          q = (rr[i] + k) % N;
          if (qlen[i][q] > bl) begin bl = qlen[i][q]; best = q; end
        end
        d[i] = best; p[i] = 0;
        if (best >= 0) rr[i] = (best + 1) % N;
      end
    end
  endtask

  // check the grants of this slot against the requests of RTT slots ago
  task automatic check_grants(input int d [N], input bit p [N], input string ph);
    for (int j = 0; j < N; j++) begin
      int nreq, npref, pin;
      nreq = 0; npref = 0; pin = -1;
      for (int i = 0; i < N; i++)
        if (d[i] == j) begin
          nreq++;
          if (p[i]) begin npref++; pin = i; end
        end
      check(xbar_valid[j] == (nreq > 0), $sformatf("%s slot %0d output %0d grant presence (%0d requests)", ph, slot, j, nreq));
      if (xbar_valid[j]) begin
        check(d[xbar_sel[j]] == j, $sformatf("%s slot %0d output %0d granted a non-requester", ph, slot, j));
        if (npref > 0) check(xbar_sel[j] == 4'(pin), $sformatf("%s slot %0d output %0d missed the preferential request", ph, slot, j));
        check(in_grant_valid[xbar_sel[j]] && in_grant_dest[xbar_sel[j]] == 4'(j), $sformatf("%s slot %0d grant delivery", ph, slot));
        if (nreq > 1) n_cont++;
        if (npref > 0) n_pref++; else n_npref++;
      end
    end
    for (int i = 0; i < N; i++)
      if (in_grant_valid[i])
        check(xbar_valid[in_grant_dest[i]] && xbar_sel[in_grant_dest[i]] == 4'(i), "input grant matches crossbar");
  endtask

  task automatic step(input string ph);
    int d [N];
    bit p [N];
    #1;
    model_requests(d, p);
    req_d.push_back(d);
    req_p.push_back(p);
    if (req_d.size() > RTT) begin
      check_grants(req_d[0], req_p[0], ph);
      req_d.pop_front();
      req_p.pop_front();
    end else begin
      check(in_grant_valid == '0 && xbar_valid == '0, "no grant before one round trip");
    end
    @(negedge clk);
    slot++;
  endtask

  initial begin
    int t0;
    qlen = '0;
    for (int i = 0; i < N; i++) rr[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // ---- phase 1: latency of one request ----
    repeat (3) step("idle");
    qlen[2][9] = 7'd1;
    t0 = slot;
    step("latency");
    qlen = '0;
    for (int k = 1; k <= RTT + 2; k++) begin
      if (k == RTT) begin
        #1;
        check(in_grant_valid == 16'h0004 && in_grant_dest[2] == 4'd9 && xbar_valid == 16'h0200 && xbar_sel[9] == 4'd2,
              $sformatf("grant exactly RTT=%0d slots after the request", RTT));
      end
      step("latency");
    end
    // ---- phase 2: saturation ----
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) qlen[i][j] = 7'(5 + $urandom % 50);
    for (int k = 0; k < 200; k++) begin
      #1;
      if (k >= RTT) begin
        for (int i = 0; i < N; i++)
          check(in_grant_valid[i] && in_grant_dest[i] == 4'((i + slot - RTT) % N),
                $sformatf("saturation slot %0d input %0d", slot, i));
        n_sat++;
      end
      step("saturation");
    end
    // ---- phase 3: random lengths ----
    for (int k = 0; k < 3000; k++) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          qlen[i][j] = (($urandom % 100) < ((k / 300) % 2 ? 85 : 97)) ? '0 : 7'(1 + $urandom % 4);
      step("random");
    end
    $display("grants: preferential=%0d non-preferential=%0d contended=%0d saturated slots=%0d", n_pref, n_npref, n_cont, n_sat);
    check(n_pref > 0 && n_npref > 0 && n_cont > 0 && n_sat > 0, "every case exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
