// tb_hopfield_pipeline_net: end-to-end test of the pipeline net at its default
// size (N = 16 neurons).
//
// A random symmetric network is loaded, v0 is shifted into the shifter array
// and the net is started. An independent reference model in this file runs
// the same mixed integration (F0, Euler start, three Milne Runge-Kutta order
// improvements, v_{5,3}, then the Ghoshal predictor and three correctors) in
// the same fixed-point arithmetic, and every streamed component of v_k^[3] is
// compared with it. Checked as well: the first result appears after 7 blocks,
// results come every N+4 cycles, the run ends on STOP (first run) and on the
// wavefront limit with a gain increment in the middle (second run). Each
// mechanism (STOP, wavefront limit, gain increment, idle processors holding
// their results, each routing phase) is counted and must occur.
module tb_hopfield_pipeline_net;
  import hop_pkg::*;

  localparam int N    = 16;
  localparam int BLK  = N + 4;
  localparam int KMAX = 400;
  localparam longint ONE = 64'sd1 <<< FIX_FRAC;

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
  int n_stop = 0, n_limit = 0, n_gain = 0, n_hold = 0, n_results = 0;
  int n_phase [7];

  // ---------------- reference model ----------------
  longint T [N][N];
  longint Ib [N];
  longint lam0, lstep;
  longint hh;
  longint v0 [N];
  int     gain_blk;
  int     k_stop;            // first k >= 3 with all |F_k^[3]| <= eps, -1 = none
  longint eps_m;          // wavefront after which the gain steps, -1 = never

  longint mv3 [KMAX][N];     // v_k^[3] (start-up values for k <= 4)

  function automatic longint sat(longint x);
    longint mx, mn;
    mx = (64'sd1 <<< (FIX_W-1)) - 1;
    mn = -(64'sd1 <<< (FIX_W-1));
    return (x > mx) ? mx : (x < mn) ? mn : x;
  endfunction
  function automatic longint mul(longint a, longint b);
    return sat((a * b) >>> FIX_FRAC);
  endfunction
  function automatic longint add(longint a, longint b);
    return sat(a + b);
  endfunction
  function automatic longint coef(int num, int den);
    return (longint'(num) * ONE) / den;
  endfunction
  function automatic longint lam_at(int j);
    return (gain_blk >= 0 && j > gain_blk) ? lam0 + lstep : lam0;
  endfunction

  typedef longint vec_t [N];

  function automatic vec_t deriv(vec_t v, int j);
    vec_t f;
    longint l;
    l = lam_at(j);
    for (int i = 0; i < N; i++) begin
      longint a;
      a = 0;
      for (int c = 0; c < N; c++) a = add(a, mul(T[i][c], v[c]));
      f[i] = mul(mul(mul(add(l, l), v[i]), add(ONE, -v[i])), add(a, Ib[i]));
    end
    return f;
  endfunction

  // base + h * sum(c[m] * x[m])
  function automatic vec_t step(vec_t base, longint c [5], vec_t x [5]);
    vec_t r;
    for (int i = 0; i < N; i++) begin
      longint s;
      s = 0;
      for (int m = 0; m < 5; m++) s += mul(c[m], x[m][i]);
      r[i] = add(base[i], mul(hh, sat(s)));
    end
    return r;
  endfunction

  task automatic run_model(int kmax);
    vec_t F0, Fk [5], Fn [5], vk [6], x [5];
    vec_t v3 [KMAX], F3 [KMAX], Fp [KMAX], F1c [KMAX], F2c [KMAX];
    vec_t vp, v1, v2, v3n, z;
    longint c [5];
    int rk_num [4][5] = '{'{251, 646, -264, 106, -19}, '{29, 124, 24, 4, -1},
                          '{3*9, 3*34, 3*24, 3*14, -3}, '{2*7, 2*32, 2*12, 2*32, 2*7}};
    int rk_den [4]    = '{720, 90, 80, 45};
    z  = '{default: 0};
    k_stop = -1;
    vk[0] = v0;
    F0 = deriv(v0, 0);                                   // CW0
    for (int k = 1; k <= 4; k++) begin                   // CW1
      c = '{coef(k, 1), 0, 0, 0, 0};
      x = '{F0, z, z, z, z};
      vk[k] = step(v0, c, x);
      Fk[k] = deriv(vk[k], 1);
    end
    for (int r = 0; r < 3; r++) begin                    // CW2..CW4
      for (int k = 1; k <= 4; k++) begin
        for (int m = 0; m < 5; m++) c[m] = coef(rk_num[k-1][m], rk_den[k-1]);
        x = '{F0, Fk[1], Fk[2], Fk[3], Fk[4]};
        vk[k] = step(v0, c, x);
        Fn[k] = deriv(vk[k], 2 + r);
      end
      for (int k = 1; k <= 4; k++) Fk[k] = Fn[k];
    end
    c = '{coef(5*19, 144), coef(-5*10, 144), coef(5*120, 144), coef(-5*70, 144), coef(5*85, 144)};
    x = '{F0, Fk[1], Fk[2], Fk[3], Fk[4]};
    vk[5] = step(v0, c, x);                              // CW5
    Fp[5] = deriv(vk[5], 5);
    for (int k = 0; k <= 4; k++) begin
      v3[k] = vk[k];
      F3[k] = (k == 0) ? F0 : Fk[k];
      mv3[k] = vk[k];
    end
    F1c[4] = Fk[4];
    F2c[3] = Fk[3];
    for (int k = 3; k < kmax; k++) begin                 // CW_{k+3}
      int j;
      j = k + 3;
      c = '{coef(8, 3), coef(-4, 3), coef(8, 3), 0, 0};
      x = '{Fp[k+2], F1c[k+1], F2c[k], z, z};
      vp = step(v3[k-1], c, x);
      c = '{coef(3, 8), coef(9, 8), coef(9, 8), coef(3, 8), 0};
      x = '{Fp[k+2], F1c[k+1], F2c[k], F3[k-1], z};
      v1 = step(v3[k-1], c, x);
      c = '{coef(1, 3), coef(4, 3), coef(1, 3), 0, 0};
      x = '{F1c[k+1], F2c[k], F3[k-1], z, z};
      v2 = step(v3[k-1], c, x);
      c = '{coef(9, 24), coef(19, 24), coef(-5, 24), coef(1, 24), 0};
      x = '{F2c[k], F3[k-1], F3[k-2], F3[k-3], z};
      v3n = step(v3[k-1], c, x);
      if (k + 3 < KMAX) Fp[k+3] = deriv(vp, j);
      if (k + 2 < KMAX) F1c[k+2] = deriv(v1, j);
      F2c[k+1] = deriv(v2, j);
      v3[k] = v3n;
      F3[k] = deriv(v3n, j);
      mv3[k] = v3n;
      if (k_stop < 0) begin
        bit is_small;
        is_small = 1'b1;
        for (int i = 0; i < N; i++) if (F3[k][i] > eps_m || F3[k][i] < -eps_m) is_small = 1'b0;
        if (is_small) k_stop = k;
      end
    end
  endtask

  // ---------------- stimulus ----------------
  task automatic cfg_write(cfg_kind_t kind, int row, int col, longint data);
    @(negedge clk);
    cfg.we   = 1'b1;
    cfg.kind = kind;
    cfg.row  = 16'(row);
    cfg.col  = 16'(col);
    cfg.data = fix_t'(data);
    @(negedge clk);
    cfg.we   = 1'b0;
  endtask

  task automatic load_v0();
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      v0_load_en = 1'b1;
      v0_load_d  = fix_t'(v0[i]);
    end
    @(negedge clk);
    v0_load_en = 1'b0;
  endtask

  // signed random fixed-point value in [-range, range] (range in 1/65536)
  function automatic longint rnd(int range);
    return longint'($urandom_range(2*range)) - range;
  endfunction

  int last_valid_cycle, cycle_no, start_cycle, first_seen, kexp, idx, run_stop;

  always @(posedge clk) cycle_no <= cycle_no + 1;

  // count hold phases: P1..P3 in CW5 keep and restream their results
  always @(posedge clk) if (run && phase == PH_MRKP5 && cyc == 0) n_hold++;
  always @(posedge clk) if (run && cyc == 0) n_phase[phase]++;

  task automatic do_run(int limit, int gblk, output int stopped_by_stop);
    int kseen;
    gain_blk = gblk;
    run_model(limit);
    max_cw <= 16'(limit);
    load_v0();
    start = 1'b1;
    @(negedge clk);
    start_cycle = cycle_no;
    start = 1'b0;
    first_seen = 0;
    kseen = -1;
    idx = 0;
    while (!done) begin
      @(negedge clk);
      gain_incr = (gblk >= 0 && run && cw == 16'(gblk));
      if (gain_incr && cyc == 0) n_gain++;
      if (v_out_valid) begin
        if (!first_seen) begin
          first_seen = 1;
          checks++;
          if (cycle_no - start_cycle != 7*BLK) begin  // start edge to cycle 0 of block 7
            failures++;
            $display("FAIL first result after %0d cycles, expected %0d", cycle_no - start_cycle, 7*BLK);
          end
        end
        if (int'(v_out_k) != kseen) begin
          if (kseen >= 0) begin
            checks++;
            if (cycle_no - last_valid_cycle != BLK) begin
              failures++;
              $display("FAIL block period %0d, expected %0d", cycle_no - last_valid_cycle, BLK);
            end
          end
          kseen = int'(v_out_k);
          last_valid_cycle = cycle_no;
          idx = 0;
          n_results++;
        end
        checks++;
        if (longint'(v_out) != mv3[kseen][idx]) begin
          failures++;
          if (failures < 10)
            $display("FAIL v_%0d^[3][%0d] = %0d, expected %0d", kseen, idx, v_out, mv3[kseen][idx]);
        end
        idx++;
      end
    end
    stopped_by_stop = (cw < 16'(limit + 1)) ? 1 : 0;
    if (k_stop >= 0 && k_stop + 3 < limit) begin
      checks++;
      if (kseen != k_stop) begin
        failures++;
        $display("FAIL last result k=%0d, reference reaches |F| <= eps at k=%0d", kseen, k_stop);
      end
    end
    $display("run ended at cw=%0d, last k=%0d, stop=%0d", cw, kseen, stopped_by_stop);
    gain_incr = 1'b0;
  endtask

  initial begin
    cycle_no = 0;
    n_phase = '{default: 0};
    cfg = '0;
    v0_load_en = 1'b0; v0_load_d = '0; gain_incr = 1'b0; start = 1'b0;
    max_cw = 16'd100;
    hh    = ONE / 4;                  // h = 1/4
    lam0  = ONE;                      // lambda = 1
    lstep = ONE / 2;
    eps_m = ONE / 128;
    h = fix_t'(hh); eps = fix_t'(eps_m); lambda_step = fix_t'(lstep);
    for (int i = 0; i < N; i++) begin
      for (int c = 0; c <= i; c++) begin
        T[i][c] = (i == c) ? -ONE : rnd(20000);
        T[c][i] = T[i][c];
      end
      Ib[i] = rnd(30000);
      v0[i] = 64'sd16384 + longint'($urandom_range(32768));   // 0.25 .. 0.75
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      for (int c = 0; c < N; c++) cfg_write(CFG_T, i, c, T[i][c]);
      cfg_write(CFG_I, i, 0, Ib[i]);
      cfg_write(CFG_LAMBDA, i, 0, lam0);
    end
    // run 1: until STOP
    do_run(300, -1, run_stop);
    checks++;
    if (run_stop) n_stop++; else begin failures++; $display("FAIL run 1 did not stop on STOP"); end
    repeat (5) @(posedge clk);
    // run 2: gain increment after wavefront 9, stopped by the wavefront limit
    do_run(14, 9, run_stop);
    checks++;
    if (!run_stop) n_limit++; else begin failures++; $display("FAIL run 2 did not end on the limit"); end

    $display("mechanisms: stop=%0d limit=%0d gain=%0d hold=%0d results=%0d",
             n_stop, n_limit, n_gain, n_hold, n_results);
    foreach (n_phase[p]) if (p != int'(PH_IDLE)) begin
      checks++;
      if (n_phase[p] == 0) begin failures++; $display("FAIL phase %0d never ran", p); end
    end
    checks++; if (n_stop  == 0) failures++;
    checks++; if (n_limit == 0) failures++;
    checks++; if (n_gain  == 0) failures++;
    checks++; if (n_hold  == 0) failures++;
    checks++; if (n_results < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
