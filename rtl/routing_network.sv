// routing_network: the programmable 12 x 30 distribution routing network.
//
// Thirty tree multiplexers (tree_mux), one per output q = 1..30, each with its
// own 4-bit control latch, let any output carry any of the twelve sources
// A..L (processor outputs and shifter-array rows) or nothing. Outputs 1..24
// feed the six inputs of each processor P0..P3 (q = 6p + s + 1 is slot s of
// Pp), outputs 25..30 feed shifter-array rows 1..6.
//
// Interface: when `cfg_we` is high, all thirty latches load `cfg` on the rising
// edge (a whole connection pattern is switched at once, between blocks).
// `dst` is combinational from `src`. Array index q-1 holds output q.
// The structure follows the source architecture; loading all latches in
// parallel is this design's choice.
module routing_network
  import hop_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic cfg_we,
  input  src_t cfg   [NUM_DST],
  input  fix_t src   [NUM_SRC],
  output src_t cfg_q [NUM_DST],
  output fix_t dst   [NUM_DST]
);
  for (genvar q = 0; q < NUM_DST; q++) begin : g_col
    tree_mux u_tree (
      .clk    (clk),
      .rst_n  (rst_n),
      .ctrl_we(cfg_we),
      .ctrl_d (cfg[q]),
      .din    (src),
      .ctrl_q (cfg_q[q]),
      .dout   (dst[q])
    );
  end
endmodule
