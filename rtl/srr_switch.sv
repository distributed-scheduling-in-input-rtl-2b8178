// srr_switch: an N x N input-queued switch scheduled by Synchronous Round
// Robin (SRR), with the scheduler fully distributed over 2N devices.
//
// Cells arrive at N line cards, each with N virtual output queues
// (voq_bank). Every slot, the input selector of each line card picks one
// VOQ and sends a request to that output's selector; the output selectors
// grant at most one request each; after one round trip time (RTT) the
// grants return, each granted line card sends the head cell of the granted
// VOQ, and the crossbar, configured by the same grants, carries it to the
// output. Grants may find a VOQ already empty (no pending-request
// counters are kept); that slot is then lost.
//
// Interface and timing (one clk cycle per slot, active-low synchronous
// rst_n, all queues empty after reset):
//  * in_valid/in_dest/in_data: at most one arriving cell per input per
//    slot; it is queued at the end of the slot, or dropped with in_drop
//    high if its VOQ is full.
//  * out_valid/out_data/out_src: at most one departing cell per output per
//    slot, and the input it came from. A cell that arrives in slot t into
//    an empty switch and is requested preferentially or uncontested
//    leaves in slot t + 1 + RTT.
//  * stat_* : one-slot event flags (see srr_scheduler), plus stat_wasted
//    (a grant found its VOQ empty).
// The architecture (VOQs, crossbar, fully distributed selectors, RTT
// between them) follows SRR as proposed; queue depth, cell width and the
// choices listed in the submodules are this design's.
module srr_switch #(
  parameter int unsigned N      = srr_pkg::PORTS_DEF,
  parameter int unsigned RTT    = srr_pkg::RTT_DEF,
  parameter int unsigned DEPTH  = srr_pkg::DEPTH_DEF,
  parameter int unsigned CELL_W = srr_pkg::CELL_W_DEF,
  localparam int unsigned DW    = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned LEN_W = $clog2(DEPTH + 1)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // line-card inputs
  input  logic [N-1:0]                   in_valid,
  input  logic [N-1:0][DW-1:0]           in_dest,
  input  logic [N-1:0][CELL_W-1:0]       in_data,
  output logic [N-1:0]                   in_drop,
  // switch outputs
  output logic [N-1:0]                   out_valid,
  output logic [N-1:0][CELL_W-1:0]       out_data,
  output logic [N-1:0][DW-1:0]           out_src,
  // per-slot event flags
  output logic [N-1:0]                   stat_req,
  output logic [N-1:0]                   stat_req_pref,
  output logic [N-1:0]                   stat_tie,
  output logic [N-1:0]                   stat_grant,
  output logic [N-1:0]                   stat_grant_pref,
  output logic [N-1:0]                   stat_contention,
  output logic [N-1:0]                   stat_wasted
);

  logic [N-1:0][N-1:0][LEN_W-1:0] qlen;
  logic [N-1:0]                   gnt_valid;
  logic [N-1:0][DW-1:0]           gnt_dest;
  logic [N-1:0]                   xbar_valid;
  logic [N-1:0][DW-1:0]           xbar_sel;
  logic [N-1:0]                   lc_valid;
  logic [N-1:0][CELL_W-1:0]       lc_data;

  for (genvar i = 0; i < N; i++) begin : g_lc
    voq_bank #(.N(N), .DEPTH(DEPTH), .CELL_W(CELL_W)) u_voq (
      .clk, .rst_n,
      .in_valid  (in_valid[i]),
      .in_dest   (in_dest[i]),
      .in_data   (in_data[i]),
      .in_drop   (in_drop[i]),
      .deq_valid (gnt_valid[i]),
      .deq_dest  (gnt_dest[i]),
      .out_valid (lc_valid[i]),
      .out_data  (lc_data[i]),
      .wasted    (stat_wasted[i]),
      .qlen      (qlen[i])
    );
  end

  srr_scheduler #(.N(N), .RTT(RTT), .LEN_W(LEN_W)) u_sched (
    .clk, .rst_n,
    .qlen,
    .in_grant_valid  (gnt_valid),
    .in_grant_dest   (gnt_dest),
    .xbar_valid,
    .xbar_sel,
    .stat_req,
    .stat_req_pref,
    .stat_tie,
    .stat_grant,
    .stat_grant_pref,
    .stat_contention
  );

  crossbar #(.N(N), .CELL_W(CELL_W)) u_xbar (
    .in_valid  (lc_valid),
    .in_data   (lc_data),
    .cfg_valid (xbar_valid),
    .cfg_sel   (xbar_sel),
    .out_valid,
    .out_data
  );

  assign out_src = xbar_sel;

endmodule
