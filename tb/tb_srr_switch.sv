// tb_srr_switch: end-to-end test of the SRR switch at its default size
// (16 x 16, round trip time 4 slots, 64-cell VOQs, 512-bit cells).
//
// Every cell carries its source, destination and a per-flow sequence
// number spread over all 512 bits, so the testbench can tell, for every
// cell leaving an output, that it belongs there, that it is intact and
// that each flow (input, output) stays in order with nothing lost except
// cells the switch reported as dropped. The testbench also keeps its own
// count of every VOQ (cells accepted minus cells delivered). Phases:
//  1. a lone cell: it must leave exactly RTT + 1 slots after arriving, and
//     the RTT grants that follow for its by then empty queue are wasted;
//  2. uniform Bernoulli traffic at load 0.3 (as in the low-load points of
//     the delay curves);
//  3. bursty traffic, geometric bursts of mean 10 cells to one output, load
//     0.6;
//  4. a hot spot: every input sends to output 0, so VOQs fill and drop;
//  5. full load: every input receives a cell every slot, sent to its
//     least-filled VOQ so that every VOQ gets the same share; after a
//     warm-up of 500 slots the outputs must deliver at least 99% of the
//     offered cells (SRR reaches full throughput under full uniform load,
//     working like a TDMA schedule once its queues are backlogged);
// each phase ends by draining the switch completely. Counted mechanisms:
// preferential and non-preferential grants, output contention, ties in
// the longest-queue choice, wasted grants, drops and saturated slots;
// each must occur at least once. A saturated slot is one in which all 16
// outputs deliver a cell.
module tb_srr_switch;
  localparam int N = srr_pkg::PORTS_DEF;
  localparam int RTT = srr_pkg::RTT_DEF;
  localparam int DEPTH = srr_pkg::DEPTH_DEF;
  localparam int W = srr_pkg::CELL_W_DEF;
  localparam int DW = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0]          in_valid, in_drop, out_valid;
  logic [N-1:0][DW-1:0]  in_dest, out_src;
  logic [N-1:0][W-1:0]   in_data, out_data;
  logic [N-1:0]          stat_req, stat_req_pref, stat_tie, stat_grant, stat_grant_pref, stat_contention, stat_wasted;

  int checks = 0, failures = 0;
  int slot = 0;
  int sent_seq [N][N];      // next sequence number per flow
  int exp_seq  [N][N];      // next expected sequence number per flow
  int occ      [N][N];      // testbench count of VOQ contents
  int dropped_seq [N][N][$];
  int burst_left [N], burst_dest [N];
  int n_pref = 0, n_npref = 0, n_cont = 0, n_tie = 0, n_wasted = 0, n_drop = 0, n_sat = 0, n_deliv = 0;

  always #5 clk = ~clk;

  srr_switch dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] mk_cell(int src, int dst, int seq);
    logic [W-1:0] c;
    for (int w = 0; w < W / 32; w++)
      c[w*32 +: 32] = {8'(src), 8'(dst), 16'(seq)} ^ (32'(w) * 32'h9E37_79B9);
    return c;
  endfunction

  // Offer a cell from input i to output j in the coming slot.
  task automatic offer(int i, int j);
    in_valid[i] = 1'b1;
    in_dest[i]  = DW'(j);
    in_data[i]  = mk_cell(i, j, sent_seq[i][j]);
  endtask

  // One slot: sample everything the switch shows for the offered inputs,
  // check it, then let the clock edge pass.
  task automatic slot_end();
    int used [N];
    #1;
    // arrivals
    for (int i = 0; i < N; i++)
      if (in_valid[i]) begin
        int j;
        j = int'(in_dest[i]);
        check(in_drop[i] == (occ[i][j] == DEPTH), $sformatf("slot %0d input %0d drop flag", slot, i));
        if (in_drop[i]) begin
          dropped_seq[i][j].push_back(sent_seq[i][j]);
          n_drop++;
        end
      end
    // departures
    for (int i = 0; i < N; i++) used[i] = 0;
    for (int j = 0; j < N; j++)
      if (out_valid[j]) begin
        int i;
        i = int'(out_src[j]);
        used[i]++;
        while (dropped_seq[i][j].size() > 0 && dropped_seq[i][j][0] == exp_seq[i][j]) begin
          void'(dropped_seq[i][j].pop_front());
          exp_seq[i][j]++;
        end
        check(occ[i][j] > 0, $sformatf("slot %0d output %0d: cell from empty VOQ %0d", slot, j, i));
        check(out_data[j] == mk_cell(i, j, exp_seq[i][j]),
              $sformatf("slot %0d output %0d: wrong cell from input %0d (expected seq %0d)", slot, j, i, exp_seq[i][j]));
        exp_seq[i][j]++;
        occ[i][j]--;
        n_deliv++;
      end
    for (int i = 0; i < N; i++) check(used[i] <= 1, $sformatf("slot %0d input %0d sent twice", slot, i));
    if (out_valid == '1) n_sat++;
    // accepted arrivals enter the count after the departures of this slot
    for (int i = 0; i < N; i++)
      if (in_valid[i]) begin
        if (!in_drop[i]) occ[i][int'(in_dest[i])]++;
        sent_seq[i][int'(in_dest[i])]++;
      end
    // event counters
    n_pref   += $countones(stat_grant_pref);
    n_npref  += $countones(stat_grant & ~stat_grant_pref);
    n_cont   += $countones(stat_contention);
    n_tie    += $countones(stat_tie);
    n_wasted += $countones(stat_wasted);
    @(negedge clk);
    slot++;
    in_valid = '0;
  endtask

  function automatic int backlog();
    int b;
    b = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) b += occ[i][j];
    return b;
  endfunction

  task automatic drain(string ph);
    int k;
    k = 0;
    while (backlog() > 0 && k < 5000) begin
      slot_end();
      k++;
    end
    repeat (RTT + 2) slot_end();
    check(backlog() == 0, $sformatf("%s: switch did not drain", ph));
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        check(exp_seq[i][j] + dropped_seq[i][j].size() == sent_seq[i][j],
              $sformatf("%s: flow %0d->%0d lost cells", ph, i, j));
  endtask

  initial begin
    int t0, w0, lat, d0;
    in_valid = '0; in_dest = '0; in_data = '0;
    for (int i = 0; i < N; i++) begin
      burst_left[i] = 0;
      for (int j = 0; j < N; j++) begin
        sent_seq[i][j] = 0; exp_seq[i][j] = 0; occ[i][j] = 0;
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) slot_end();

    // ---- 1: lone cell latency and wasted grants ----
    offer(3, 7);
    t0 = slot;
    w0 = n_wasted;
    lat = -1;
    slot_end();
    for (int k = 0; k < 3 * RTT + 4; k++) begin
      #1;
      if (out_valid[7] && lat < 0) lat = slot - t0;
      slot_end();
    end
    check(lat == RTT + 1, $sformatf("lone cell latency %0d slots, expected %0d", lat, RTT + 1));
    check(n_wasted - w0 == RTT, $sformatf("lone cell: %0d wasted grants, expected %0d", n_wasted - w0, RTT));
    $display("lone cell: latency %0d slots, %0d wasted grants", lat, n_wasted - w0);
    drain("lone");

    // ---- 2: Bernoulli uniform, load 0.3 ----
    for (int k = 0; k < 2000; k++) begin
      for (int i = 0; i < N; i++)
        if (($urandom % 1000) < 300) offer(i, $urandom % N);
      slot_end();
    end
    drain("bernoulli");
    $display("after bernoulli: delivered=%0d", n_deliv);

    // ---- 3: bursty, mean burst 10, load 0.6 ----
    for (int k = 0; k < 3000; k++) begin
      for (int i = 0; i < N; i++) begin
        if (burst_left[i] == 0 && ($urandom % 1000) < 60) begin
          // new burst: geometric length with mean 10
          burst_left[i] = 1;
          while (($urandom % 10) != 0) burst_left[i]++;
          burst_dest[i] = $urandom % N;
        end
        if (burst_left[i] > 0) begin
          offer(i, burst_dest[i]);
          burst_left[i]--;
        end
      end
      slot_end();
    end
    drain("bursty");
    $display("after bursty: delivered=%0d", n_deliv);

    // ---- 4: hot spot on output 0 ----
    for (int k = 0; k < 150; k++) begin
      for (int i = 0; i < N; i++) offer(i, 0);
      slot_end();
    end
    drain("hotspot");
    $display("after hotspot: delivered=%0d dropped=%0d", n_deliv, n_drop);

    // ---- 5: full load spread over all VOQs ----
    for (int k = 0; k < 3000; k++) begin
      for (int i = 0; i < N; i++) begin
        int m;
        m = $urandom % N;
        for (int j = 0; j < N; j++) if (occ[i][j] < occ[i][m]) m = j;
        offer(i, m);
      end
      if (k == 500) d0 = n_deliv;
      slot_end();
    end
    $display("full load: %0d cells delivered in %0d slots, backlog %0d", n_deliv - d0, 2500, backlog());
    check(n_deliv - d0 >= 2500 * N * 99 / 100, $sformatf("full load throughput %0d of %0d cells", n_deliv - d0, 2500 * N));
    drain("full load");

    $display("delivered=%0d preferential grants=%0d non-preferential grants=%0d contention=%0d ties=%0d wasted=%0d drops=%0d saturated slots=%0d",
             n_deliv, n_pref, n_npref, n_cont, n_tie, n_wasted, n_drop, n_sat);
    check(n_pref > 0,   "preferential grants happened");
    check(n_npref > 0,  "non-preferential grants happened");
    check(n_cont > 0,   "output contention happened");
    check(n_tie > 0,    "longest-queue ties happened");
    check(n_wasted > 0, "wasted grants happened");
    check(n_drop > 0,   "drops happened");
    check(n_sat > 0,    "saturated slots happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
