// srr_scheduler: the fully distributed Synchronous Round Robin scheduler.
//
// The scheduler consists of N input selectors (IS) and N output selectors
// (OS), each meant to sit in a device of its own. An IS and an OS can only
// talk over inter-chip links, so a request issued in slot t reaches the OS
// in slot t + RTT/2 and its grant reaches the IS in slot t + RTT. SRR
// copes with this without any extra state: each IS owns a slot counter
// (all counters run in step from a common reset) and issues one request
// per slot by the SRR rules; each OS grants at most one request per slot
// by the SRR rules. Because an input issues only one request per slot, it
// can receive at most one grant per slot and no accept phase is needed.
//
// Structure: per input, slot_counter -> input_selector -> request link
// (RTT/2 slots); per output, output_selector -> grant link (RTT - RTT/2
// slots). The grant link of output j carries (valid, granted input); at
// its far end it is decoded into the grant seen by each input and into
// the crossbar setting of output j, so the crossbar is set in the slot in
// which the granted input sends its cell.
//
// Interface and timing (one clk cycle per slot, active-low synchronous
// rst_n): qlen holds all VOQ lengths in the current slot. in_grant_valid[i]
// and in_grant_dest[i] tell input i which VOQ to send from in this slot;
// xbar_valid[j] and xbar_sel[j] configure output j of the crossbar in the
// same slot. With RTT = 0 everything happens within one slot. The stat_*
// outputs are one-slot event flags for monitoring. The selector rules and
// the RTT split follow SRR; the link model, the pref flag on requests and
// carrying the crossbar setting on the grant link are choices of this
// design.
module srr_scheduler #(
  parameter int unsigned N     = srr_pkg::PORTS_DEF,
  parameter int unsigned RTT   = srr_pkg::RTT_DEF,
  parameter int unsigned LEN_W = $clog2(srr_pkg::DEPTH_DEF + 1),
  localparam int unsigned DW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [N-1:0][N-1:0][LEN_W-1:0] qlen,
  // grants delivered to the inputs
  output logic [N-1:0]                   in_grant_valid,
  output logic [N-1:0][DW-1:0]           in_grant_dest,
  // crossbar configuration, per output
  output logic [N-1:0]                   xbar_valid,
  output logic [N-1:0][DW-1:0]           xbar_sel,
  // per-slot event flags
  output logic [N-1:0]                   stat_req,        // input i issued a request
  output logic [N-1:0]                   stat_req_pref,   // ... a preferential one
  output logic [N-1:0]                   stat_tie,        // ... after a longest-queue tie
  output logic [N-1:0]                   stat_grant,      // output j issued a grant
  output logic [N-1:0]                   stat_grant_pref, // ... to a preferential request
  output logic [N-1:0]                   stat_contention  // output j saw several requests
);

  localparam int unsigned REQ_DELAY = RTT / 2;
  localparam int unsigned GNT_DELAY = RTT - RTT / 2;
  localparam int unsigned REQ_W     = 2 + DW;   // {valid, pref, dest}
  localparam int unsigned GNT_W     = 1 + DW;   // {valid, input}

  // ---------------- input side: one device per input ----------------
  logic [N-1:0]          rq_valid, rq_pref;      // at the IS
  logic [N-1:0][DW-1:0]  rq_dest;
  logic [N-1:0]          ra_valid, ra_pref;      // arriving at the OSs
  logic [N-1:0][DW-1:0]  ra_dest;

  for (genvar i = 0; i < N; i++) begin : g_in
    logic [DW-1:0] s;
    logic          frame_start;

    slot_counter #(.N(N)) u_slot (
      .clk, .rst_n, .s, .frame_start
    );

    input_selector #(.N(N), .LEN_W(LEN_W), .INPUT_ID(i)) u_is (
      .clk, .rst_n, .s,
      .qlen      (qlen[i]),
      .req_valid (rq_valid[i]),
      .req_pref  (rq_pref[i]),
      .req_dest  (rq_dest[i]),
      .tie       (stat_tie[i])
    );

    rtt_link #(.W(REQ_W), .DELAY(REQ_DELAY)) u_req_link (
      .clk, .rst_n,
      .d ({rq_valid[i], rq_pref[i], rq_dest[i]}),
      .q ({ra_valid[i], ra_pref[i], ra_dest[i]})
    );
  end

  assign stat_req      = rq_valid;
  assign stat_req_pref = rq_valid & rq_pref;

  // ---------------- output side: one device per output ----------------
  logic [N-1:0]          gv_d;                   // grants after the link
  logic [N-1:0][DW-1:0]  gi_d;

  for (genvar j = 0; j < N; j++) begin : g_out
    logic [N-1:0]  req_valid_j, req_pref_j, grant_j;
    logic          gv, gp;
    logic [DW-1:0] gi;

    always_comb
      for (int k = 0; k < N; k++) begin
        req_valid_j[k] = ra_valid[k] && (ra_dest[k] == DW'(j));
        req_pref_j[k]  = req_valid_j[k] && ra_pref[k];
      end

    output_selector #(.N(N), .SEED(16'hACE1 ^ 16'(j * 40503 + 1))) u_os (
      .clk, .rst_n,
      .req_valid   (req_valid_j),
      .req_pref    (req_pref_j),
      .grant       (grant_j),
      .grant_valid (gv),
      .grant_idx   (gi),
      .grant_pref  (gp),
      .contention  (stat_contention[j])
    );

    assign stat_grant[j]      = gv;
    assign stat_grant_pref[j] = gv && gp;

    rtt_link #(.W(GNT_W), .DELAY(GNT_DELAY)) u_gnt_link (
      .clk, .rst_n,
      .d ({gv, gi}),
      .q ({gv_d[j], gi_d[j]})
    );
  end

  // ---------------- grant delivery and crossbar setting ----------------
  always_comb begin
    in_grant_valid = '0;
    in_grant_dest  = '0;
    for (int j = 0; j < N; j++)
      if (gv_d[j]) begin
        in_grant_valid[gi_d[j]] = 1'b1;
        in_grant_dest[gi_d[j]]  = DW'(j);
      end
  end

  assign xbar_valid = gv_d;
  assign xbar_sel   = gi_d;

  // Each input is granted by at most one output per slot (a matching).
  logic grant_conflict;
  always_comb begin
    grant_conflict = 1'b0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        for (int k = j + 1; k < N; k++)
          if (gv_d[j] && gv_d[k] && gi_d[j] == DW'(i) && gi_d[k] == DW'(i))
            grant_conflict = 1'b1;
  end

  a_matching: assert property (@(posedge clk) disable iff (!rst_n) !grant_conflict);

endmodule
