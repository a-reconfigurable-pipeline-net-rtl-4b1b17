// tb_cw_generator: with N = 4 (blocks of 8 cycles) checks the cycle counter,
// the wavefront count and phase sequence, the configuration-load pulse one
// cycle before every block with the coming block's phase, the drain block
// after STOP and after the wavefront limit, and `done`.
module tb_cw_generator;
  import hop_pkg::*;

  localparam int N = 4;
  localparam int BLK = N + 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, stop, run, cfg_load, done;
  logic [15:0] max_cw, cw;
  logic [$clog2(N+4)-1:0] cyc;
  phase_t phase, prev_phase, cfg_phase;
  int checks = 0, failures = 0;

  cw_generator #(.N(N)) u_dut (.clk, .rst_n, .start, .stop, .max_cw, .run, .cyc, .cw,
                               .phase, .prev_phase, .cfg_load, .cfg_phase, .done);

  function automatic phase_t exp_phase(int j);
    case (j)
      0: return PH_CW0;
      1: return PH_EULER;
      2, 3, 4: return PH_MRKP;
      5: return PH_MRKP5;
      6: return PH_TRANS;
      default: return PH_GPCM;
    endcase
  endfunction

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (cw=%0d cyc=%0d)", what, cw, cyc); end
  endtask

  // run expecting `nblk` computing blocks; stop is raised in block stop_at (-1 = never)
  task automatic one_run(int limit, int stop_at, int nblk);
    phase_t loaded;
    max_cw = 16'(limit);
    @(negedge clk);
    start = 1'b1;
    #1 chk(cfg_load && cfg_phase == PH_CW0, "load pulse with start");
    loaded = cfg_phase;
    @(negedge clk);
    start = 1'b0;
    for (int j = 0; j <= nblk; j++) begin      // nblk computing blocks + 1 drain block
      for (int c = 0; c < BLK; c++) begin
        stop = (j == stop_at) && (c == BLK - 1);
        #1;
        chk(run && !done, "running");
        chk(int'(cyc) == c, "cycle counter");
        chk(int'(cw) == j, "wavefront count");
        chk(phase == ((j < nblk) ? exp_phase(j) : PH_IDLE), "phase");
        chk(c != 0 || phase == loaded, "phase equals the one loaded before the block");
        if (c == 0) chk(prev_phase == ((j == 0) ? PH_IDLE : exp_phase(j - 1)), "previous phase");
        if (c == BLK - 1 && j < nblk) begin
          chk(cfg_load, "load pulse at block end");
          chk(cfg_phase == ((j + 1 < nblk) ? exp_phase(j + 1) : PH_IDLE), "next phase");
          loaded = cfg_phase;
        end else if (!(c == BLK - 1 && j == nblk))
          chk(!cfg_load, "no load pulse inside a block");
        @(negedge clk);
      end
    end
    stop = 1'b0;
    #1 chk(!run && done, "done after drain block");
    repeat (3) @(negedge clk);
    chk(!run && done, "stays done");
  endtask

  initial begin
    start = 1'b0; stop = 1'b0; max_cw = 16'd10;
    #12 rst_n = 1'b1;
    @(negedge clk);
    chk(!run && !done, "idle after reset");
    one_run(12, -1, 12);      // ends on the wavefront limit
    one_run(50, 9, 10);       // STOP raised in wavefront 9
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
