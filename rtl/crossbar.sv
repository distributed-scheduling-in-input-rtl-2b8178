// crossbar: the N x N switching fabric.
//
// Each output has a multiplexer that the scheduler sets, slot by slot, to
// one input; the scheduler guarantees that no input is connected to two
// outputs and no output to two inputs in the same slot (a matching). The
// fabric has no speedup: one cell per input and per output per slot.
//
// Interface and timing: purely combinational. Output j carries
// in_data[cfg_sel[j]] and is valid when cfg_valid[j] is set and the
// selected input actually sends a cell (in_valid). The role of the
// crossbar follows the switch architecture; the multiplexer structure is
// the simplest one that provides it.
module crossbar #(
  parameter int unsigned N      = srr_pkg::PORTS_DEF,
  parameter int unsigned CELL_W = srr_pkg::CELL_W_DEF,
  localparam int unsigned DW    = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]             in_valid,
  input  logic [N-1:0][CELL_W-1:0] in_data,
  input  logic [N-1:0]             cfg_valid,
  input  logic [N-1:0][DW-1:0]     cfg_sel,
  output logic [N-1:0]             out_valid,
  output logic [N-1:0][CELL_W-1:0] out_data
);

  always_comb begin
    for (int j = 0; j < N; j++) begin
      out_valid[j] = cfg_valid[j] && in_valid[cfg_sel[j]];
      out_data[j]  = out_valid[j] ? in_data[cfg_sel[j]] : '0;
    end
  end

endmodule
