// tb_functional_pipeline: drives two processors, P3 (ROW 3) and P1 (ROW 1),
// with N = 4, through blocks of random phases and random input vectors, and
// compares the streamed F and v of the following block with an independent
// reference (own coefficient tables written from the integration formulas).
// Also checked: idle phases re-stream the old results, STOP from P3 after a
// predictor-corrector block whose |F| are all within eps, STOP/phase/gain
// forwarding on P1, the gain step, the direct v0 input in CW0, and the block timing (results of a block
// are presented from cycle 0 of the next block, one component per cycle).
module tb_functional_pipeline;
  import hop_pkg::*;
  import tb_fix_pkg::*;

  localparam int N = 4;
  localparam int BLK = N + 4;
  localparam int NB = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic run, gain_in, stop_in;
  logic [$clog2(N+4)-1:0] cyc;
  phase_t phase_in;
  fix_t din [NUM_SLOT];
  fix_t v0_in;
  longint v0x [N];
  fix_t h, eps, lambda_step;
  cfg_wr_t cfg;
  fix_t f3, v3, f1, v1;
  phase_t ph3, ph1;
  logic g3, g1, s3, s1;

  functional_pipeline #(.N(N), .ROW(3)) u_p3 (
    .clk, .rst_n, .run, .cyc, .phase_in, .gain_in, .stop_in(1'b0), .din, .v0_in, .h, .eps,
    .lambda_step, .cfg, .f_out(f3), .v_out(v3), .phase_out(ph3), .gain_out(g3), .stop_out(s3));
  functional_pipeline #(.N(N), .ROW(1)) u_p1 (
    .clk, .rst_n, .run, .cyc, .phase_in, .gain_in, .stop_in, .din, .v0_in, .h, .eps,
    .lambda_step, .cfg, .f_out(f1), .v_out(v1), .phase_out(ph1), .gain_out(g1), .stop_out(s1));

  int checks = 0, failures = 0, n_hold = 0, n_stop = 0, n_gain = 0;
  longint T [N][N], Ib [N], lam [2][N];
  longint ef [2][N], ev [2][N];          // expected outputs of the coming block
  longint x [NUM_SLOT][N];

  function automatic longint w_of(int row, phase_t ph, int s);
    int n [6];
    int d;
    n = '{default: 0}; d = 1;
    case (ph)
      PH_EULER: n[1] = row + 1;
      PH_MRKP: if (row == 3) begin n = '{0, 2*7, 2*32, 2*12, 2*32, 2*7}; d = 45; end
               else          begin n = '{0, 29, 124, 24, 4, -1};       d = 90; end
      PH_TRANS, PH_GPCM:
               if (row == 3) begin n = '{0, 1, 0, 9, 19, -5}; d = 24; end
               else          begin n = '{0, 3, 9, 9, 3, 0};   d = 8;  end
      default: ;
    endcase
    return coef(n[s], d);
  endfunction

  function automatic bit active_of(int row, phase_t ph);
    if (ph == PH_IDLE) return 0;
    if (ph == PH_MRKP5) return row == 0;
    if (ph == PH_CW0) return row == 3;
    return 1;
  endfunction

  task automatic cfg_write(cfg_kind_t kind, int row, int col, longint data);
    @(negedge clk);
    cfg.we = 1'b1; cfg.kind = kind; cfg.row = 16'(row); cfg.col = 16'(col); cfg.data = fix_t'(data);
    @(negedge clk);
    cfg.we = 1'b0;
  endtask

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    cfg = '0; run = 1'b0; cyc = '0; phase_in = PH_IDLE; gain_in = 1'b0; stop_in = 1'b0;
    foreach (din[s]) din[s] = '0;
    v0_in = '0;
    h = fix_t'(ONE / 4); eps = '0; lambda_step = fix_t'(ONE / 8);
    ef = '{default: 0}; ev = '{default: 0};
    #12 rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      for (int c = 0; c < N; c++) begin T[i][c] = rnd(32768); cfg_write(CFG_T, i, c, T[i][c]); end
      Ib[i] = rnd(32768); cfg_write(CFG_I, i, 0, Ib[i]);
      lam[0][i] = ONE / 2 + longint'($urandom_range(65536));
      lam[1][i] = lam[0][i];
      cfg_write(CFG_LAMBDA, i, 0, lam[0][i]);
    end
    @(negedge clk);
    run = 1'b1;
    for (int b = 0; b < NB; b++) begin
      phase_t ph;
      bit gain, big_eps;
      ph = (b < 7) ? phase_t'(b) : phase_t'($urandom_range(6));
      gain = ($urandom_range(4) == 0);
      big_eps = ($urandom_range(2) == 0);
      foreach (x[s, i]) x[s][i] = (s == 0) ? longint'($urandom_range(65536)) : rnd(65536);
      foreach (v0x[i]) v0x[i] = longint'($urandom_range(65536));
      phase_in = ph;
      gain_in = gain;
      eps = big_eps ? fix_t'(WMAX) : fix_t'(ONE / 1000000);
      for (int c = 0; c < BLK; c++) begin
        cyc = 3'(c);
        stop_in = $urandom_range(1);
        for (int s = 0; s < NUM_SLOT; s++) din[s] = (c < N) ? fix_t'(x[s][c]) : fix_t'(rnd(65536));
        v0_in = (c < N) ? fix_t'(v0x[c]) : fix_t'(rnd(65536));
        #1;
        chk(ph3 == ph && ph1 == ph && g3 == gain && g1 == gain, "chain forwarding");
        chk(s1 == stop_in, "STOP forwarded by P1");
        if (c < N) begin
          chk(longint'(f3) == ef[1][c] && longint'(v3) == ev[1][c], $sformatf("P3 block %0d component %0d", b, c));
          chk(longint'(f1) == ef[0][c] && longint'(v1) == ev[0][c], $sformatf("P1 block %0d component %0d", b, c));
        end
        if (c == BLK - 1) begin
          bit exp_stop;
          exp_stop = active_of(3, ph) && (ph == PH_TRANS || ph == PH_GPCM) && big_eps;
          chk(s3 == exp_stop, $sformatf("P3 STOP after block %0d", b));
          if (exp_stop) n_stop++;
        end
        @(negedge clk);
      end
      // reference for this block
      for (int k = 0; k < 2; k++) begin
        int row;
        row = (k == 0) ? 1 : 3;
        if (active_of(row, ph)) begin
          longint v [N];
          for (int i = 0; i < N; i++) begin
            longint sacc;
            sacc = 0;
            for (int s = 1; s < NUM_SLOT; s++) sacc += mul(w_of(row, ph, s), x[s][i]);
            v[i] = add((ph == PH_CW0) ? v0x[i] : x[0][i], mul(ONE / 4, sat(sacc)));
          end
          for (int l = 0; l < N; l++) begin
            longint a;
            a = 0;
            for (int i = 0; i < N; i++) a = add(a, mul(T[l][i], v[i]));
            ef[k][l] = iso_f(a, v[l], Ib[l], lam[k][l]);
            ev[k][l] = v[l];
          end
        end else if (row == 1) n_hold++;
        if (gain) for (int l = 0; l < N; l++) lam[k][l] = add(lam[k][l], ONE / 8);
      end
      if (gain) n_gain++;
    end
    chk(n_hold > 0 && n_stop > 0 && n_gain > 0, "hold, STOP and gain each exercised");
    $display("hold=%0d stop=%0d gain=%0d", n_hold, n_stop, n_gain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
