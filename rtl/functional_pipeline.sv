// functional_pipeline: one processor Pp (p = ROW) of the pipeline net.
//
// Every wavefront the processor turns six input vectors into one new state
// vector and its derivative. The vectors arrive one component per cycle, in
// step, during the first N cycles of an (N+4)-cycle block:
//
//   stage 1  s_i   = sum_{s=1..5} w[s] * in[s]_i        (formula coefficients)
//   stage 2  v_i   = in[0]_i + h * s_i                    (new state component)
//   stage 3  acc_l = acc_l + T[l][i] * v_i, l = 0..N-1   (N multiply-accumulate cells)
//   cycle N+2: F_l = 2 lambda_l v_l (1 - v_l) (acc_l + I_l) for all l
//              (iso_nonlinearity), latched with v into the output banks
//   cycle N+3: accumulators cleared, gain step applied if requested
//
// During the next block the banks are streamed out on `f_out`/`v_out`,
// component `cyc` in cycle `cyc`, so the next wavefront can use them. The
// coefficients w[s] come from hop_pkg::proc_weight(ROW, phase): the Milne
// Runge-Kutta start-up (eq. 9/10) in the early wavefronts and the Ghoshal
// predictor (P0) or corrector 1..3 (P1..P3) afterwards. In a phase where the
// processor has no work (the "-" entries of the wavefront diagram) it keeps
// its banks and streams the old results again.
//
// In CW0 the base operand comes from the dedicated `v0_in` input (fed from
// shifter cell SA(1,n)) instead of a routed slot, so P3 evaluates F0 = F(v0).
//
// Chain signals: the wavefront phase, the gain-increment request and STOP
// enter at P3 and are passed on towards P0 (`*_in` -> `*_out`). P3 (ROW = 3)
// raises STOP when every component of its newly corrected derivative F^[3]
// satisfies |F| <= eps, i.e. the state has come to rest.
//
// Interface: host writes through `cfg` (T, I, lambda), broadcast to all
// processors; `h`, `eps`, `lambda_step` are static run parameters.
// Timing: block period N+4 cycles, one new vector per block, results one
// block later. The stage split, the parallel F evaluation, the STOP test and
// the gain step are this design's reading of what the source architecture
// only names; the formulas and the N+4 block period are the source's.
module functional_pipeline
  import hop_pkg::*;
#(
  parameter int N   = 16,
  parameter int ROW = 0,
  localparam int CYC_W = $clog2(N + BLK_EXTRA)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,          // block sequencer running
  input  logic [CYC_W-1:0] cyc,          // cycle within the block, 0 .. N+3
  input  phase_t           phase_in,
  input  logic             gain_in,
  input  logic             stop_in,
  input  fix_t             din [NUM_SLOT],
  input  fix_t             v0_in,        // direct v0 input, used as the base in CW0
  input  fix_t             h,
  input  fix_t             eps,
  input  fix_t             lambda_step,
  input  cfg_wr_t          cfg,
  output fix_t             f_out,
  output fix_t             v_out,
  output phase_t           phase_out,
  output logic             gain_out,
  output logic             stop_out
);
  localparam int IDX_W = (N > 1) ? $clog2(N) : 1;

  // coefficient table of this processor, one row per phase, constant
  fix_t w_tab [8][NUM_SLOT];
  for (genvar ph = 0; ph < 8; ph++) begin : g_wph
    for (genvar sl = 0; sl < NUM_SLOT; sl++) begin : g_wsl
      localparam fix_t WV = proc_weight(ROW, phase_t'(ph), sl);
      assign w_tab[ph][sl] = WV;
    end
  end

  // model memories
  fix_t t_mem  [N][N];
  fix_t i_mem  [N];
  fix_t lam    [N];

  // pipeline state
  fix_t w [NUM_SLOT];
  logic active;
  logic s_vld, v_vld;
  fix_t s_sum, s_base, v_reg;
  logic [IDX_W-1:0] s_idx, v_idx;
  fix_t acc   [N];
  fix_t vbuf  [N];
  fix_t fbank [N];
  fix_t vbank [N];
  fix_t f_new [N];
  logic conv_q;

  always_comb begin
    active = run && proc_active(ROW, phase_in);
    w = w_tab[phase_in];
  end

  // stage-1 sum and the STOP test of freshly evaluated derivatives
  logic signed [FIX_W2-1:0] sum_next;
  logic all_small;
  always_comb begin
    sum_next = '0;
    for (int s = 1; s < NUM_SLOT; s++) sum_next += FIX_W2'(fix_mul(w[s], din[s]));
    all_small = 1'b1;
    for (int l = 0; l < N; l++) if (f_new[l] > eps || f_new[l] < -eps) all_small = 1'b0;
  end

  // host configuration
  always_ff @(posedge clk) begin
    if (cfg.we) begin
      case (cfg.kind)
        CFG_T:      t_mem[cfg.row[IDX_W-1:0]][cfg.col[IDX_W-1:0]] <= cfg.data;
        CFG_I:      i_mem[cfg.row[IDX_W-1:0]] <= cfg.data;
        default: ;
      endcase
    end
  end

  // stage 1: weighted sum of the five derivative inputs
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_vld <= 1'b0; s_sum <= '0; s_base <= '0; s_idx <= '0;
    end else begin
      s_vld  <= active && (cyc < CYC_W'(N));
      s_sum  <= fix_sat(sum_next);
      s_base <= (phase_in == PH_CW0) ? v0_in : din[0];
      s_idx  <= cyc[IDX_W-1:0];
    end
  end

  // stage 2: new state component
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_vld <= 1'b0; v_reg <= '0; v_idx <= '0;
      for (int l = 0; l < N; l++) vbuf[l] <= '0;
    end else begin
      v_vld <= s_vld;
      v_idx <= s_idx;
      if (s_vld) begin
        v_reg       <= fix_add(s_base, fix_mul(h, s_sum));
        vbuf[s_idx] <= fix_add(s_base, fix_mul(h, s_sum));
      end
    end
  end

  // stage 3: N multiply-accumulate cells form T * v
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < N; l++) acc[l] <= '0;
    end else if (cyc == CYC_W'(N + BLK_EXTRA - 1)) begin
      for (int l = 0; l < N; l++) acc[l] <= '0;
    end else if (v_vld) begin
      for (int l = 0; l < N; l++) acc[l] <= fix_add(acc[l], fix_mul(t_mem[l][v_idx], v_reg));
    end
  end

  // derivative evaluation, one cell per neuron
  for (genvar l = 0; l < N; l++) begin : g_f
    iso_nonlinearity u_f (
      .acc   (acc[l]),
      .v     (vbuf[l]),
      .bias  (i_mem[l]),
      .lambda(lam[l]),
      .f     (f_new[l])
    );
  end

  // output banks, gain register and STOP test
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < N; l++) begin
        fbank[l] <= '0;
        vbank[l] <= '0;
        lam[l]   <= '0;
      end
      conv_q <= 1'b0;
    end else begin
      if (cfg.we && cfg.kind == CFG_LAMBDA) lam[cfg.row[IDX_W-1:0]] <= cfg.data;
      if (active && cyc == CYC_W'(N + 2)) begin
        for (int l = 0; l < N; l++) begin
          fbank[l] <= f_new[l];
          vbank[l] <= vbuf[l];
        end
      end
      if (cyc == CYC_W'(N + 2))
        conv_q <= active && all_small && (phase_in == PH_TRANS || phase_in == PH_GPCM);
      if (!run) conv_q <= 1'b0;
      if (run && gain_in && cyc == CYC_W'(N + BLK_EXTRA - 1))
        for (int l = 0; l < N; l++) lam[l] <= fix_add(lam[l], lambda_step);
    end
  end

  // the phase may only change at a block boundary
  a_phase_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (run && cyc != '0) |-> $stable(phase_in))
    else $error("phase changed inside a block");

  assign f_out     = (cyc < CYC_W'(N)) ? fbank[cyc[IDX_W-1:0]] : '0;
  assign v_out     = (cyc < CYC_W'(N)) ? vbank[cyc[IDX_W-1:0]] : '0;
  assign phase_out = phase_in;
  assign gain_out  = gain_in;
  assign stop_out  = (ROW == NUM_PROC - 1) ? conv_q : stop_in;
endmodule
