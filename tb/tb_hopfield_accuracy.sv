// tb_hopfield_accuracy: checks the net against the original Hopfield model.
//
// The net integrates the isomorphic equation in the firing rates v. This
// bench integrates the original equation in the potentials u,
//   du/dt = T g(u) + I,   g(u) = (1 + tanh(lambda u)) / 2,
// in double precision with a fine classical Runge-Kutta step, starting from
// u0 = g^-1(v0), and maps it through g. Every result v_k^[3] the net streams
// out (N = 16, h = 1/8, 60 wavefronts) must agree with g(u(k h)) to within
// 2e-3 in every component. This tests the isomorphism, the start-up and
// predictor-corrector formulas, and the Q15.16 word together.
module tb_hopfield_accuracy;
  import hop_pkg::*;

  localparam int N = 16;
  localparam int KMAX = 64;
  localparam int SUB = 64;             // reference sub-steps per net step
  localparam real TOL = 2.0e-3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  cfg_wr_t     cfg;
  logic        v0_load_en, gain_incr, start;
  fix_t        v0_load_d, h, eps, lambda_step;
  logic [15:0] max_cw;
  logic        run, done, stop, v_out_valid;
  logic [15:0] cw, v_out_k;
  phase_t      phase;
  logic [$clog2(N+4)-1:0] cyc;
  fix_t        v_out;
  fix_t        proc_v [NUM_PROC];
  fix_t        proc_f [NUM_PROC];

  hopfield_pipeline_net u_dut (
    .clk, .rst_n, .cfg, .v0_load_en, .v0_load_d, .h, .eps, .lambda_step,
    .gain_incr, .max_cw, .start, .run, .done, .stop, .cw, .phase, .cyc,
    .v_out, .v_out_valid, .v_out_k, .proc_v, .proc_f
  );

  int checks = 0, failures = 0;
  real Tr [N][N], Ir [N], lam_r, hr;
  real vref [KMAX][N];
  longint Tq [N][N], Iq [N], v0q [N];
  real max_err = 0.0;

  function automatic real g(real u);
    return 0.5 * (1.0 + $tanh(lam_r * u));
  endfunction

  typedef real rvec_t [N];
  function automatic rvec_t dudt(rvec_t u);
    rvec_t d;
    for (int i = 0; i < N; i++) begin
      d[i] = Ir[i];
      for (int j = 0; j < N; j++) d[i] += Tr[i][j] * g(u[j]);
    end
    return d;
  endfunction

  task automatic reference();
    rvec_t u, k1, k2, k3, k4, t;
    real dt;
    dt = hr / SUB;
    for (int i = 0; i < N; i++) begin
      real v;
      v = real'(v0q[i]) / 65536.0;
      u[i] = $atanh(2.0 * v - 1.0) / lam_r;
    end
    for (int k = 0; k < KMAX; k++) begin
      for (int i = 0; i < N; i++) vref[k][i] = g(u[i]);
      for (int s = 0; s < SUB; s++) begin
        k1 = dudt(u);
        foreach (t[i]) t[i] = u[i] + 0.5 * dt * k1[i];
        k2 = dudt(t);
        foreach (t[i]) t[i] = u[i] + 0.5 * dt * k2[i];
        k3 = dudt(t);
        foreach (t[i]) t[i] = u[i] + dt * k3[i];
        k4 = dudt(t);
        foreach (u[i]) u[i] += dt / 6.0 * (k1[i] + 2.0 * k2[i] + 2.0 * k3[i] + k4[i]);
      end
    end
  endtask

  task automatic cfg_write(cfg_kind_t kind, int row, int col, longint data);
    @(negedge clk);
    cfg.we = 1'b1; cfg.kind = kind; cfg.row = 16'(row); cfg.col = 16'(col); cfg.data = fix_t'(data);
    @(negedge clk);
    cfg.we = 1'b0;
  endtask

  initial begin
    int idx, kcur, nres;
    cfg = '0;
    v0_load_en = 1'b0; v0_load_d = '0; gain_incr = 1'b0; start = 1'b0;
    lam_r = 1.0;
    hr = 0.125;
    h = fix_t'(65536 / 8); eps = '0; lambda_step = '0; max_cw = 16'(KMAX);
    for (int i = 0; i < N; i++) begin
      for (int c = 0; c <= i; c++) begin
        Tq[i][c] = (i == c) ? -65536 : longint'($urandom_range(40000)) - 20000;
        Tq[c][i] = Tq[i][c];
      end
      Iq[i]  = longint'($urandom_range(60000)) - 30000;
      v0q[i] = 16384 + longint'($urandom_range(32768));
    end
    foreach (Tq[i, c]) Tr[i][c] = real'(Tq[i][c]) / 65536.0;
    foreach (Iq[i]) Ir[i] = real'(Iq[i]) / 65536.0;
    reference();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      for (int c = 0; c < N; c++) cfg_write(CFG_T, i, c, Tq[i][c]);
      cfg_write(CFG_I, i, 0, Iq[i]);
      cfg_write(CFG_LAMBDA, i, 0, 65536);
    end
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      v0_load_en = 1'b1; v0_load_d = fix_t'(v0q[i]);
    end
    @(negedge clk);
    v0_load_en = 1'b0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    idx = 0; kcur = -1; nres = 0;
    while (!done) begin
      @(negedge clk);
      if (v_out_valid) begin
        real e;
        if (int'(v_out_k) != kcur) begin kcur = int'(v_out_k); idx = 0; nres++; end
        e = real'(v_out) / 65536.0 - vref[kcur][idx];
        if (e < 0.0) e = -e;
        if (e > max_err) max_err = e;
        checks++;
        if (e > TOL) begin
          failures++;
          if (failures < 10) $display("FAIL v_%0d[%0d] = %f, reference %f", kcur, idx, real'(v_out) / 65536.0, vref[kcur][idx]);
        end
        idx++;
      end
    end
    checks++;
    if (nres < KMAX - 8) begin failures++; $display("FAIL only %0d results", nres); end
    $display("results=%0d max |v - g(u)| = %g", nres, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
