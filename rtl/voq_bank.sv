// voq_bank: the virtual output queues (VOQs) of one line card.
//
// An input port of an N x N input-queued switch keeps a separate FIFO for
// each output, so a cell waiting for a busy output never blocks cells for
// other outputs. All N queues share one memory: queue q owns the
// addresses {q, 0 .. DEPTH-1} (the space per queue is rounded up to a power
// of two) and has its own head pointer, tail pointer and length counter.
// At most one cell arrives and at most one cell leaves per slot, so one
// write port and one read port suffice.
//
// Interface and timing (one clk cycle per slot):
//  * Arrival: in_valid/in_dest/in_data are written into queue in_dest at
//    the clock edge that ends the slot. If that queue already holds DEPTH
//    cells the cell is dropped and in_drop is raised in the same slot.
//  * Departure: deq_valid/deq_dest carry the grant that reached this input
//    in this slot. The head cell of queue deq_dest is read combinationally
//    onto out_data with out_valid high, for the crossbar in the same slot,
//    and removed at the clock edge. A grant for an empty queue sends
//    nothing and raises wasted: the scheduler has no pending-request
//    counters, so a queue may have been emptied by earlier grants by the
//    time a grant arrives.
//  * qlen[q] is the number of cells in queue q during this slot; it goes
//    to the input selector.
// The per-destination queues and the one-arrival/one-departure rule follow
// the switch architecture; the depth, the shared memory, drop-on-full and
// the reset behaviour (all queues empty) are choices of this design.
module voq_bank #(
  parameter int unsigned N      = srr_pkg::PORTS_DEF,
  parameter int unsigned DEPTH  = srr_pkg::DEPTH_DEF,
  parameter int unsigned CELL_W = srr_pkg::CELL_W_DEF,
  localparam int unsigned DW    = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned LEN_W = $clog2(DEPTH + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // arriving cell
  input  logic                       in_valid,
  input  logic [DW-1:0]              in_dest,
  input  logic [CELL_W-1:0]          in_data,
  output logic                       in_drop,
  // departure on a grant
  input  logic                       deq_valid,
  input  logic [DW-1:0]              deq_dest,
  output logic                       out_valid,
  output logic [CELL_W-1:0]          out_data,
  output logic                       wasted,
  // queue lengths for the input selector
  output logic [N-1:0][LEN_W-1:0]    qlen
);

  logic [CELL_W-1:0] mem [N * (2**AW)];  // address {queue, slot}
  logic [AW-1:0]     head [N];
  logic [AW-1:0]     tail [N];
  logic [LEN_W-1:0]  len  [N];

  logic enq, deq;

  assign enq       = in_valid  && (len[in_dest] != LEN_W'(DEPTH));
  assign in_drop   = in_valid  && !enq;
  assign deq       = deq_valid && (len[deq_dest] != '0);
  assign wasted    = deq_valid && !deq;
  assign out_valid = deq;
  assign out_data  = mem[{deq_dest, head[deq_dest]}];

  always_comb
    for (int q = 0; q < N; q++) qlen[q] = len[q];

  // cell storage: written at the tail of the destination queue
  always_ff @(posedge clk)
    if (enq) mem[{in_dest, tail[in_dest]}] <= in_data;

  // pointers and lengths
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int q = 0; q < N; q++) begin
        head[q] <= '0;
        tail[q] <= '0;
        len[q]  <= '0;
      end
    end else begin
      if (enq) tail[in_dest]  <= AW'((32'(tail[in_dest]) + 1) % DEPTH);
      if (deq) head[deq_dest] <= AW'((32'(head[deq_dest]) + 1) % DEPTH);
      for (int q = 0; q < N; q++) begin
        case ({enq && (in_dest == DW'(q)), deq && (deq_dest == DW'(q))})
          2'b10:   len[q] <= len[q] + 1'b1;
          2'b01:   len[q] <= len[q] - 1'b1;
          default: len[q] <= len[q];
        endcase
      end
    end
  end

  // A queue never holds more than DEPTH cells.
  for (genvar q = 0; q < N; q++) begin : g_chk
    a_len_bound: assert property (@(posedge clk) disable iff (!rst_n) len[q] <= LEN_W'(DEPTH));
  end

endmodule
