// tb_crossbar: sets random matchings (random permutations with some
// outputs left unconnected and some inputs idle) on a 16 x 16, 512-bit
// crossbar and checks every output against the input it is set to.
module tb_crossbar;
  localparam int N = 16, W = 512;
  logic [N-1:0]          in_valid, cfg_valid, out_valid;
  logic [N-1:0][W-1:0]   in_data, out_data;
  logic [N-1:0][3:0]     cfg_sel;
  int checks = 0, failures = 0;

  crossbar dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm [N];
    for (int t = 0; t < 200; t++) begin
      for (int k = 0; k < N; k++) perm[k] = k;
      perm.shuffle();
      for (int i = 0; i < N; i++) begin
        in_valid[i] = ($urandom % 4) != 0;
        for (int w = 0; w < W / 32; w++) in_data[i][w*32 +: 32] = $urandom;
      end
      for (int j = 0; j < N; j++) begin
        cfg_valid[j] = ($urandom % 5) != 0;
        cfg_sel[j]   = 4'(perm[j]);
      end
      #1;
      for (int j = 0; j < N; j++) begin
        bit ev;
        ev = cfg_valid[j] && in_valid[perm[j]];
        check(out_valid[j] == ev, $sformatf("trial %0d output %0d valid", t, j));
        if (ev) check(out_data[j] == in_data[perm[j]], $sformatf("trial %0d output %0d data", t, j));
      end
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
