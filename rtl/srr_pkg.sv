// srr_pkg: constants and helper functions shared by the Synchronous Round
// Robin (SRR) switch.
//
// The defaults describe the switch that is evaluated: 16 inputs and
// outputs, 64-byte (512-bit) cells, and a round trip time of 4 slots
// between input and output selectors. The VOQ depth and the random-number
// generator of the output selectors are choices of this design.
package srr_pkg;

  // Switch size N x N.
  localparam int unsigned PORTS_DEF = 16;
  // Round trip time between an input and an output selector, in slots.
  localparam int unsigned RTT_DEF = 4;
  // Cell size: a 64-byte packet.
  localparam int unsigned CELL_W_DEF = 512;
  // Cells per virtual output queue (design choice).
  localparam int unsigned DEPTH_DEF = 64;

  // One step of the 16-bit maximal-length Galois LFSR used for the random
  // choice among non-preferential requests (polynomial x^16+x^14+x^13+x^11+1).
  function automatic logic [15:0] lfsr16_next(input logic [15:0] x);
    logic [15:0] y;
    y = x >> 1;
    if (x[0]) y ^= 16'hB400;
    return y;
  endfunction

  // (a + b) mod n for a, b < n.
  function automatic int unsigned mod_add(input int unsigned a, input int unsigned b,
                                          input int unsigned n);
    int unsigned t;
    t = a + b;
    return (t >= n) ? t - n : t;
  endfunction

endpackage
