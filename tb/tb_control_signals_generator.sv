// tb_control_signals_generator: checks the routing pattern written for every
// phase against the connection table derived by hand from the integration
// formulas, and the shifter-row enables (only while run and cyc < N).
// Table strings list, per processor P0..P3 and then the shifter rows 1..6,
// the source letter each routed input carries ('-' = unconnected).
module tb_control_signals_generator;
  import hop_pkg::*;

  localparam int N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic cfg_load, run, rt_we;
  phase_t cfg_phase;
  logic [$clog2(N+4)-1:0] cyc;
  src_t rt_cfg [NUM_DST];
  logic [SA_ROWS-1:0] sa_shift;
  int checks = 0, failures = 0;

  control_signals_generator #(.N(N)) u_dut (.clk, .rst_n, .cfg_load, .cfg_phase, .run, .cyc,
                                            .rt_we, .rt_cfg, .sa_shift);

  function automatic string table_of(phase_t ph);
    case (ph)
      PH_CW0:   return {"------", "------", "------", "------", "G-----"};
      PH_EULER: return {"GE----", "GE----", "GE----", "GE----", "GE----"};
      PH_MRKP, PH_MRKP5:
                return {"GHABDE", "GHABDE", "GHABDE", "GHABDE", "GHA---"};
      PH_TRANS: return {"CAED--", "CAEDB-", "C-EDB-", "CH-DBI", "-IB---"};
      PH_GPCM:  return {"FABD--", "FABDE-", "F-BDE-", "FH-DEI", "-IE---"};
      default:  return {"------", "------", "------", "------", "------"};
    endcase
  endfunction

  function automatic logic [5:0] mask_of(phase_t ph);
    case (ph)
      PH_CW0: return 6'b000001;
      PH_EULER: return 6'b000011;
      PH_MRKP, PH_MRKP5: return 6'b000111;
      PH_TRANS, PH_GPCM: return 6'b000110;
      default: return 6'b000000;
    endcase
  endfunction

  initial begin
    cfg_load = 1'b0; cfg_phase = PH_IDLE; run = 1'b0; cyc = '0;
    #12 rst_n = 1'b1;
    for (int p = 0; p < 7; p++) begin
      string t;
      @(negedge clk);
      cfg_load = 1'b1; cfg_phase = phase_t'(p); run = 1'b1; cyc = 3'(N + 3);
      t = table_of(phase_t'(p));
      #1;
      checks++;
      if (!rt_we) begin failures++; $display("FAIL no latch write"); end
      for (int q = 0; q < NUM_DST; q++) begin
        int exp;
        exp = (t[q] == "-") ? 0 : int'(t[q]) - int'("A") + 1;
        checks++;
        if (int'(rt_cfg[q]) != exp) begin
          failures++;
          $display("FAIL phase %0d output %0d: source %0d expected %0d", p, q + 1, rt_cfg[q], exp);
        end
      end
      checks++;
      if (sa_shift != 0) begin failures++; $display("FAIL shift outside streaming cycles"); end
      @(negedge clk);
      cfg_load = 1'b0; cfg_phase = PH_IDLE;
      for (int c = 0; c < N + 4; c++) begin
        cyc = 3'(c);
        #1;
        checks++;
        if (sa_shift != ((c < N) ? mask_of(phase_t'(p)) : 6'b0)) begin
          failures++;
          $display("FAIL phase %0d cycle %0d shift mask %b", p, c, sa_shift);
        end
        checks++;
        if (rt_we) begin failures++; $display("FAIL latch write without load"); end
        @(negedge clk);
      end
      run = 1'b0; cyc = '0;
      #1 checks++;
      if (sa_shift != 0) begin failures++; $display("FAIL shift while not running"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
