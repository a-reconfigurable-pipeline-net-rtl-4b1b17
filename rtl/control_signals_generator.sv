// control_signals_generator: programs the routing network and the shifter
// array for each wavefront.
//
// On `cfg_load` (the cycle before a block) it writes all thirty 4-bit routing
// control latches with the connection pattern of the coming phase,
// hop_pkg::route_src(phase, q), and remembers that phase. During the N
// streaming cycles of the block it enables the shifter rows the phase uses
// (hop_pkg::sa_shift_mask): row 1 recirculates v0 through the start-up,
// row 2 keeps F0 and later F_{k-3}^[3], row 3 takes F_{1,3} and later
// F_{k-2}^[3]. Rows 4..6 are free in this schedule.
//
// Interface: `rt_we`/`rt_cfg` go to routing_network, `sa_shift` to
// shifter_array. Registered phase, combinational outputs.
// The connection patterns are derived from the integration formulas and the
// wavefront diagram; the table form and the parallel latch load are this
// design's choice.
module control_signals_generator
  import hop_pkg::*;
#(
  parameter int N = 16,
  localparam int CYC_W = $clog2(N + BLK_EXTRA)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cfg_load,
  input  phase_t             cfg_phase,
  input  logic               run,
  input  logic [CYC_W-1:0]   cyc,
  output logic               rt_we,
  output src_t               rt_cfg [NUM_DST],
  output logic [SA_ROWS-1:0] sa_shift
);
  phase_t cur_phase;

  // connection patterns of all phases, constant
  src_t rt_tab [8][NUM_DST];
  for (genvar ph = 0; ph < 8; ph++) begin : g_rph
    for (genvar q = 0; q < NUM_DST; q++) begin : g_rq
      localparam src_t RV = route_src(phase_t'(ph), q);
      assign rt_tab[ph][q] = RV;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        cur_phase <= PH_IDLE;
    else if (cfg_load) cur_phase <= cfg_phase;

  always_comb begin
    rt_we = cfg_load;
    rt_cfg = rt_tab[cfg_phase];
    sa_shift = (run && cyc < CYC_W'(N)) ? sa_shift_mask(cur_phase) : '0;
  end
endmodule
