// tb_srr_workloads: runs the traffic used to evaluate SRR on 16 x 16
// switches with the round trip times 0, 2, 4, 10 and 20 slots, side by
// side (one switch per RTT, 64-cell VOQs; the cells are cut to 64 bits,
// enough to carry the arrival slot, source, destination and sequence
// number that the testbench needs). Workloads, each followed by a drain:
//  * uniform Bernoulli arrivals at loads 0.2, 0.6 and 0.9;
//  * bursty arrivals, bursts of geometric length with mean 10 cells to one
//    output, at load 0.5;
//  * uniform Bernoulli arrivals at load 1.0 (overload: VOQs fill and drop),
//    where the throughput over the second half of the run must reach 0.97.
// For every cell delivered the testbench checks the output, the source and
// the per-flow order, and measures the delay from arrival to departure.
// Checks: no cell is lost, none is dropped below load 1.0, every offered cell
// leaves, the mean delay at load 0.2 lies between RTT + 1 and RTT + 3
// slots and grows with the RTT, and the smallest delay is one slot (a
// grant requested for an earlier cell of the same VOQ can carry a cell
// that arrived after the request). The mean delays are printed per RTT and load.
module tb_srr_workloads;
  localparam int N = 16, DEPTH = 64, W = 64, DW = 4;
  localparam int NR = 5;
  localparam int RTTS [NR] = '{0, 2, 4, 10, 20};
  localparam int NW = 5;
  localparam int LOAD [NW] = '{200, 600, 900, 500, 1000};   // per mille
  localparam int SLOTS = 2500;
  localparam int OVL_SLOTS = 12000;   // overload run, long enough for the VOQs to fill

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  int slot = 0;
  real mean_delay [NR][NW];
  real thr [NR][NW];
  int  min_delay  [NR];
  int  done = 0;

  always #5 clk = ~clk;
  always @(posedge clk) slot <= slot + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar r = 0; r < NR; r++) begin : g_rtt
    localparam int RTT = RTTS[r];
    logic [N-1:0]          in_valid, in_drop, out_valid;
    logic [N-1:0][DW-1:0]  in_dest, out_src;
    logic [N-1:0][W-1:0]   in_data, out_data;
    logic [N-1:0]          stat_req, stat_req_pref, stat_tie, stat_grant, stat_grant_pref, stat_contention, stat_wasted;

    srr_switch #(.N(N), .RTT(RTT), .DEPTH(DEPTH), .CELL_W(W)) dut (.*);

    initial begin
      int seq [N][N], exp [N][N];
      int burst_left [N], burst_dest [N];
      int backlog, nd, k, offered, delivered, win, len;
      real sum;
      min_delay[r] = 1 << 30;
      for (int i = 0; i < N; i++) begin
        burst_left[i] = 0;
        for (int j = 0; j < N; j++) begin seq[i][j] = 0; exp[i][j] = 0; end
      end
      in_valid = '0; in_dest = '0; in_data = '0;
      wait (rst_n);
      for (int wl = 0; wl < NW; wl++) begin
        sum = 0.0; nd = 0; backlog = 0; offered = 0; delivered = 0; win = 0;
        k = 0;
        len = (LOAD[wl] == 1000) ? OVL_SLOTS : SLOTS;
        while (k < len || backlog > 0) begin
          @(negedge clk);
          in_valid = '0;
          if (k < len)
            for (int i = 0; i < N; i++) begin
              if (wl != 3) begin
                if (($urandom % 1000) < LOAD[wl]) begin
                  in_valid[i] = 1'b1;
                  in_dest[i]  = DW'($urandom % N);
                end
              end else begin
                // bursty: on/off source, mean burst 10, mean load LOAD[wl]
                if (burst_left[i] == 0 && ($urandom % 1000) < LOAD[wl] / 10) begin
                  burst_left[i] = 1;
                  while (($urandom % 10) != 0) burst_left[i]++;
                  burst_dest[i] = $urandom % N;
                end
                if (burst_left[i] > 0) begin
                  in_valid[i] = 1'b1;
                  in_dest[i]  = DW'(burst_dest[i]);
                  burst_left[i]--;
                end
              end
              if (in_valid[i])
                in_data[i] = {16'(slot), 8'(i), 8'(in_dest[i]), 32'(seq[i][in_dest[i]])};
            end
          #1;   // sample the slot's outputs before the clock edge
          for (int i = 0; i < N; i++)
            if (in_valid[i]) begin
              if (LOAD[wl] < 1000) check(!in_drop[i], $sformatf("RTT %0d: drop at input %0d", RTT, i));
              // sequence numbers count accepted cells only
              if (!in_drop[i]) begin
                seq[i][in_dest[i]]++;
                backlog++;
                offered++;
              end
            end
          for (int j = 0; j < N; j++)
            if (out_valid[j]) begin
              int i, d;
              i = int'(out_src[j]);
              d = int'(16'(slot) - out_data[j][63:48]);
              check(out_data[j][47:40] == 8'(i) && out_data[j][39:32] == 8'(j), $sformatf("RTT %0d: misrouted cell", RTT));
              check(out_data[j][31:0] == 32'(exp[i][j]), $sformatf("RTT %0d: flow %0d->%0d out of order", RTT, i, j));
              exp[i][j]++;
              sum += real'(d);
              nd++;
              if (d < min_delay[r]) min_delay[r] = d;
              backlog--;
              delivered++;
              if (k >= len / 2 && k < len) win++;
            end
          k++;
          if (k > len + 20000) begin
            check(0, $sformatf("RTT %0d: workload %0d did not drain", RTT, wl));
            break;
          end
        end
        check(offered == delivered, $sformatf("RTT %0d: offered %0d delivered %0d", RTT, offered, delivered));
        mean_delay[r][wl] = (nd > 0) ? sum / real'(nd) : 0.0;
        thr[r][wl] = real'(win) / real'(N * (len - len / 2));
        if (LOAD[wl] == 1000)
          check(thr[r][wl] >= 0.97, $sformatf("RTT %0d: overload throughput %f", RTT, thr[r][wl]));
      end
      // A cell can leave after a single slot even with a long RTT, on a
      // grant that was requested for an earlier cell of the same VOQ.
      check(min_delay[r] == 1, $sformatf("RTT %0d: smallest delay %0d, expected 1", RTT, min_delay[r]));
      done++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done == NR);
    $display("mean delay in slots (arrival to departure)");
    $display("  RTT  Bernoulli 0.2  Bernoulli 0.6  Bernoulli 0.9  bursty 0.5  | throughput at load 1.0");
    for (int r = 0; r < NR; r++)
      $display("  %3d  %13.2f  %13.2f  %13.2f  %10.2f  | %6.4f", RTTS[r], mean_delay[r][0], mean_delay[r][1], mean_delay[r][2], mean_delay[r][3], thr[r][4]);
    for (int r = 1; r < NR; r++)
      check(mean_delay[r][0] > mean_delay[r-1][0], "low-load delay grows with RTT");
    for (int r = 0; r < NR; r++)
      check(mean_delay[r][0] >= real'(RTTS[r] + 1) && mean_delay[r][0] <= real'(RTTS[r] + 3),
            $sformatf("RTT %0d: mean delay %f at load 0.2", RTTS[r], mean_delay[r][0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
