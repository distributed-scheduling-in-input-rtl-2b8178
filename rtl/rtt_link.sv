// rtt_link: the latency of a link between two selector devices.
//
// In a multi-chip scheduler every request from an input selector reaches
// an output selector, and every grant comes back, only after an inter-chip
// latency; a request and its grant together take one round trip time
// (RTT), measured in slots. This module models one direction of such a
// link as a pipeline of DELAY registers, so that whatever enters in slot t
// leaves in slot t + DELAY. DELAY = 0 is a plain wire, the monolithic
// single-chip case (RTT = 0).
//
// Interface: d enters, q leaves DELAY slot-clock cycles later. rst_n is an
// active-low synchronous reset that clears the pipeline, so no stale
// request or grant is delivered after reset. The split of an RTT into
// two halves follows the symmetric-RTT case; the register model is a
// choice of this design.
module rtt_link #(
  parameter int unsigned W     = 1,
  parameter int unsigned DELAY = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (DELAY == 0) begin : g_wire
    assign q = d;
  end else begin : g_pipe
    logic [W-1:0] pipe [DELAY];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int k = 0; k < DELAY; k++) pipe[k] <= '0;
      end else begin
        pipe[0] <= d;
        for (int k = 1; k < DELAY; k++) pipe[k] <= pipe[k-1];
      end
    end
    assign q = pipe[DELAY-1];
  end

endmodule
