// input_selector: the SRR input selector (IS) of input INPUT_ID.
//
// Every slot the selector issues at most one request, to a single output:
//  1. Preferential request: in slot s it asks for output (INPUT_ID + s) mod
//     N if that VOQ holds a cell. Because every input uses a different
//     offset, the N inputs' preferential outputs in one slot are all
//     different; when all queues are backlogged the inputs therefore never
//     collide and behave like a TDMA schedule, each input getting one turn
//     at each output per frame of N slots.
//  2. Otherwise it asks for the longest non-empty VOQ. Among queues of equal
//     length the first one met in round-robin order from the pointer rr
//     wins; after such a choice rr moves one past the chosen output.
// A new selection is made every slot whether or not earlier requests were
// granted, and nothing is kept about outstanding requests: the selector
// needs no state that grows with the round trip time.
//
// Interface and timing: s is the slot number from this input's slot
// counter, qlen the lengths of this input's VOQs. The request
// (req_valid, req_pref, req_dest) is combinational from s and qlen within
// the slot; only the tie pointer rr is a register (reset to 0, active-low
// synchronous rst_n). tie is high when the non-preferential choice had
// to break a tie between queues of equal length. The two selection rules
// follow SRR; the pointer update rule, the pref flag sent with the request
// and the reset are choices of this design.
module input_selector #(
  parameter int unsigned N        = srr_pkg::PORTS_DEF,
  parameter int unsigned LEN_W    = $clog2(srr_pkg::DEPTH_DEF + 1),
  parameter int unsigned INPUT_ID = 0,
  localparam int unsigned DW      = (N > 1) ? $clog2(N) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [DW-1:0]           s,
  input  logic [N-1:0][LEN_W-1:0] qlen,
  output logic                    req_valid,
  output logic                    req_pref,
  output logic [DW-1:0]           req_dest,
  output logic                    tie
);

  logic [DW-1:0]    rr;
  logic [DW-1:0]    pref_dest;
  logic [DW-1:0]    lq_dest;
  logic [LEN_W-1:0] lq_len;
  logic             lq_tie;

  assign pref_dest = DW'(srr_pkg::mod_add(INPUT_ID % N, 32'(s), N));

  // longest non-empty queue, first in round-robin order from rr among equals
  always_comb begin
    int unsigned idx;
    lq_dest = '0;
    lq_len  = '0;
    lq_tie  = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      idx = srr_pkg::mod_add(32'(rr), k, N);
      if (qlen[idx] > lq_len) begin
        lq_len  = qlen[idx];
        lq_dest = DW'(idx);
        lq_tie  = 1'b0;
      end else if (qlen[idx] == lq_len && lq_len != '0) begin
        lq_tie = 1'b1;
      end
    end
  end

  always_comb begin
    if (qlen[pref_dest] != '0) begin
      req_valid = 1'b1;
      req_pref  = 1'b1;
      req_dest  = pref_dest;
    end else begin
      req_valid = (lq_len != '0);
      req_pref  = 1'b0;
      req_dest  = lq_dest;
    end
  end

  assign tie = req_valid && !req_pref && lq_tie;

  always_ff @(posedge clk) begin
    if (!rst_n)
      rr <= '0;
    else if (req_valid && !req_pref)
      rr <= DW'(srr_pkg::mod_add(32'(lq_dest), 1, N));
  end

endmodule
