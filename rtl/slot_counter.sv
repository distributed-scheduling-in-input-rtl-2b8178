// slot_counter: the SRR slot number s, a modulo-N counter.
//
// SRR numbers the time slots 0 .. N-1 and groups them into frames of N
// slots; the slot number decides which VOQ of each input is preferential.
// Every selector device keeps its own copy of this counter; because all
// copies leave reset together and count every slot, they stay in step
// without any signalling, which is what makes the scheme "synchronous".
//
// Interface: clk is the slot clock (one cycle per slot); rst_n is an
// active-low synchronous reset that sets s to 0. frame_start is high in
// the first slot of every frame (s == 0). The counter itself is the SRR
// rule; the reset value and the frame_start flag are choices of this design.
module slot_counter #(
  parameter int unsigned N = srr_pkg::PORTS_DEF,
  localparam int unsigned DW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [DW-1:0] s,
  output logic          frame_start
);

  always_ff @(posedge clk) begin
    if (!rst_n)                     s <= '0;
    else if (s == DW'(N - 1))       s <= '0;
    else                            s <= s + 1'b1;
  end

  assign frame_start = (s == '0);

endmodule
