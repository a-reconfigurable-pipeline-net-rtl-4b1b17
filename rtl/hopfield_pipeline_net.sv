// hopfield_pipeline_net: reconfigurable pipeline net that integrates the
// isomorphic Hopfield model dv/dt = 2 lambda v (1 - v) (T v + I) for N neurons.
//
// Structure (one instance of each part of the architecture):
//   P0..P3      four functional pipelines; in the predictor-corrector regime
//               P0 runs the predictor and P1..P3 the three correctors
//   routing     12 x 30 tree-multiplexer network: sources A..L are
//               A = P0 F, B = P1 F, C = P1 v, D = P2 F, E = P3 F, F = P3 v,
//               G..L = shifter rows 1..6; outputs 1..24 are the processors'
//               six inputs each, 25..30 the shifter rows' inputs
//   SA          6 x N shifter array for vectors that must wait a block or more
//   CW_j gen    block/wavefront sequencer, feeding P3 (and from there P2..P0)
//   control     writes the routing latches and shifter enables per wavefront
// SA(1,n), the end of shifter row 1, also feeds v0 straight to P3 for the
// first wavefront.
//
// Operation: load T, I and lambda through `cfg`, shift v0 into SA row 1 with
// `v0_load_en`/`v0_load_d` (component 0 first, N cycles), then pulse `start`.
// Wavefronts CW0..CW5 compute F0, the Euler and Milne Runge-Kutta start-up
// values v_{1..5,3}; from CW6 on all four processors run the predictor and
// correctors. Every block lasts N+4 cycles. From the block after CW6 on,
// `v_out` streams the final corrected state v_k^[3] (k = `v_out_k`), one
// component per cycle while `v_out_valid` is high. The run ends when P3
// raises STOP (all |F_k^[3]| <= eps) or after `max_cw` wavefronts; after one
// drain block `done` goes high. `gain_incr`, if high in the last cycle of a
// block, adds `lambda_step` to every neuron's gain.
//
// The block diagram and all formulas follow the source architecture; the word
// format, host interface, schedule details and STOP test are this design's.
module hopfield_pipeline_net
  import hop_pkg::*;
#(
  parameter int N = 16,
  localparam int CYC_W = $clog2(N + BLK_EXTRA)
) (
  input  logic             clk,
  input  logic             rst_n,
  // host
  input  cfg_wr_t          cfg,
  input  logic             v0_load_en,
  input  fix_t             v0_load_d,
  input  fix_t             h,
  input  fix_t             eps,
  input  fix_t             lambda_step,
  input  logic             gain_incr,
  input  logic [15:0]      max_cw,
  input  logic             start,
  // status
  output logic             run,
  output logic             done,
  output logic             stop,
  output logic [15:0]      cw,
  output phase_t           phase,
  output logic [CYC_W-1:0] cyc,
  // results
  output fix_t             v_out,
  output logic             v_out_valid,
  output logic [15:0]      v_out_k,
  output fix_t             proc_v [NUM_PROC],
  output fix_t             proc_f [NUM_PROC]
);
  fix_t   src [NUM_SRC];
  fix_t   dst [NUM_DST];
  src_t   rt_cfg   [NUM_DST];
  src_t   rt_cfg_q [NUM_DST];
  logic   rt_we;
  logic [SA_ROWS-1:0] sa_shift;
  fix_t   sa_in  [SA_ROWS];
  fix_t   sa_out [SA_ROWS];
  phase_t prev_phase, cfg_phase;
  logic   cfg_load;

  phase_t ph_chain   [NUM_PROC+1];   // index p+1 enters Pp, index p leaves it
  logic   gain_chain [NUM_PROC+1];
  logic   stop_chain [NUM_PROC+1];
  fix_t   p_in [NUM_PROC][NUM_SLOT];

  cw_generator #(.N(N)) u_cwgen (
    .clk, .rst_n, .start, .stop, .max_cw,
    .run, .cyc, .cw, .phase, .prev_phase, .cfg_load, .cfg_phase, .done
  );

  control_signals_generator #(.N(N)) u_ctrl (
    .clk, .rst_n, .cfg_load, .cfg_phase, .run, .cyc,
    .rt_we, .rt_cfg, .sa_shift
  );

  routing_network u_route (
    .clk, .rst_n, .cfg_we(rt_we), .cfg(rt_cfg), .src, .cfg_q(rt_cfg_q), .dst
  );

  shifter_array #(.N(N)) u_sa (
    .clk, .rst_n, .shift_en(sa_shift), .din(sa_in),
    .load_en(v0_load_en), .load_d(v0_load_d), .dout(sa_out)
  );

  assign ph_chain[NUM_PROC]   = phase;
  assign gain_chain[NUM_PROC] = gain_incr;
  assign stop_chain[NUM_PROC] = 1'b0;

  for (genvar p = 0; p < NUM_PROC; p++) begin : g_proc
    for (genvar s = 0; s < NUM_SLOT; s++) begin : g_slot
      assign p_in[p][s] = dst[p*NUM_SLOT + s];
    end
    functional_pipeline #(.N(N), .ROW(p)) u_p (
      .clk, .rst_n, .run, .cyc,
      .phase_in (ph_chain[p+1]),
      .gain_in  (gain_chain[p+1]),
      .stop_in  (stop_chain[p+1]),
      .din      (p_in[p]),
      .v0_in    ((p == NUM_PROC - 1) ? sa_out[0] : '0),
      .h, .eps, .lambda_step, .cfg,
      .f_out    (proc_f[p]),
      .v_out    (proc_v[p]),
      .phase_out(ph_chain[p]),
      .gain_out (gain_chain[p]),
      .stop_out (stop_chain[p])
    );
  end

  for (genvar r = 0; r < SA_ROWS; r++) begin : g_sa
    assign sa_in[r] = dst[NUM_PROC*NUM_SLOT + r];
  end

  always_comb begin
    src[0] = proc_f[0];        // A
    src[1] = proc_f[1];        // B
    src[2] = proc_v[1];        // C
    src[3] = proc_f[2];        // D
    src[4] = proc_f[3];        // E
    src[5] = proc_v[3];        // F
    for (int r = 0; r < SA_ROWS; r++) src[6+r] = sa_out[r];   // G..L
  end

  // STOP as seen at P0, the end of the chain
  assign stop        = stop_chain[0];
  assign v_out       = proc_v[NUM_PROC-1];
  assign v_out_valid = run && (cyc < CYC_W'(N)) &&
                       (prev_phase == PH_TRANS || prev_phase == PH_GPCM);
  assign v_out_k     = cw - 16'd4;

endmodule
