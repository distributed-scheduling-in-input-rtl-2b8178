// output_selector: the SRR output selector (OS) of one output.
//
// In each slot the selector sees the requests that reach it (after the
// link delay) from the N input selectors, each marked preferential or not.
// It grants the preferential request if there is one; otherwise it grants
// one of the non-preferential requests chosen at random. With synchronous
// slot counters at most one input can make a preferential request to a
// given output in a slot. No pointer or history is kept: apart from the
// random generator the selector has no state, so its cost does not depend
// on the round trip time.
//
// Random choice: a 16-bit maximal-length LFSR (seeded with SEED, advanced
// every slot) supplies a random starting input; the first requesting input
// from there, in round-robin order, is granted.
//
// Interface and timing: the grant (one-hot grant, and grant_valid,
// grant_idx, grant_pref) is combinational from the requests of the same
// slot. grant_idx is also the crossbar configuration for this output.
// contention is high when more than one request arrived. rst_n is an
// active-low synchronous reset that reloads the LFSR. The preferential
// rule follows SRR; the LFSR and its start-position scheme are choices of
// this design (the choice is close to, but not exactly, uniform).
module output_selector #(
  parameter int unsigned N     = srr_pkg::PORTS_DEF,
  parameter logic [15:0] SEED  = 16'hACE1,
  localparam int unsigned DW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req_valid,
  input  logic [N-1:0]  req_pref,
  output logic [N-1:0]  grant,
  output logic          grant_valid,
  output logic [DW-1:0] grant_idx,
  output logic          grant_pref,
  output logic          contention
);

  logic [15:0]   lfsr;
  logic [DW-1:0] start;
  logic [N-1:0]  pref_req;

  always_ff @(posedge clk) begin
    if (!rst_n) lfsr <= (SEED == '0) ? 16'h0001 : SEED;
    else        lfsr <= srr_pkg::lfsr16_next(lfsr);
  end

  assign start    = DW'(32'(lfsr) % N);
  assign pref_req = req_valid & req_pref;

  always_comb begin
    int unsigned idx;
    idx         = 0;
    grant_valid = 1'b0;
    grant_idx   = '0;
    grant_pref  = 1'b0;
    if (pref_req != '0) begin
      // preferential request: lowest-numbered one (only one can exist)
      for (int k = N - 1; k >= 0; k--)
        if (pref_req[k]) grant_idx = DW'(k);
      grant_valid = 1'b1;
      grant_pref  = 1'b1;
    end else begin
      // random choice among the non-preferential requests
      for (int unsigned k = 0; k < N; k++) begin
        idx = srr_pkg::mod_add(32'(start), k, N);
        if (!grant_valid && req_valid[idx]) begin
          grant_valid = 1'b1;
          grant_idx   = DW'(idx);
        end
      end
    end
  end

  always_comb begin
    grant = '0;
    if (grant_valid) grant[grant_idx] = 1'b1;
  end

  assign contention = (req_valid & (req_valid - 1'b1)) != '0;  // two or more requests

  // Synchronous slot counters make preferential requests to one output unique.
  a_one_pref: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(pref_req));

endmodule
