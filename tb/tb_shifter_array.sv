// tb_shifter_array: drives random data and random per-row shift enables into
// a 6 x 5 array and compares each row's output with a reference queue; checks
// that a row routed back onto itself keeps a vector unchanged for many passes
// and that the host load path fills row 1.
module tb_shifter_array;
  import hop_pkg::*;

  localparam int N = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [SA_ROWS-1:0] shift_en;
  fix_t din  [SA_ROWS];
  fix_t dout [SA_ROWS];
  logic load_en;
  fix_t load_d;
  logic [31:0] ref_q [SA_ROWS][N];     // ref_q[r][N-1] is the row output
  logic [31:0] vec [N];
  int checks = 0, failures = 0;

  shifter_array #(.N(N)) u_dut (.clk, .rst_n, .shift_en, .din, .load_en, .load_d, .dout);

  task automatic check_rows();
    for (int r = 0; r < SA_ROWS; r++) begin
      checks++;
      if (dout[r] !== ref_q[r][N-1]) begin
        failures++;
        $display("FAIL row %0d: %h expected %h", r + 1, dout[r], ref_q[r][N-1]);
      end
    end
  endtask

  task automatic tick();
    @(posedge clk);
    for (int r = 0; r < SA_ROWS; r++) begin
      if (shift_en[r] || (r == 0 && load_en)) begin
        for (int c = N - 1; c > 0; c--) ref_q[r][c] = ref_q[r][c-1];
        ref_q[r][0] = (r == 0 && load_en) ? load_d : din[r];
      end
    end
    @(negedge clk);
    check_rows();
  endtask

  initial begin
    shift_en = '0; load_en = 1'b0; load_d = '0;
    foreach (din[r]) din[r] = '0;
    foreach (ref_q[r, c]) ref_q[r][c] = '0;
    #12 rst_n = 1'b1;
    @(negedge clk);
    check_rows();
    // host load of row 1
    for (int i = 0; i < N; i++) begin
      load_en = 1'b1; load_d = fix_t'($urandom); vec[i] = load_d;
      tick();
    end
    load_en = 1'b0;
    // recirculate row 1 for 4 passes: it must keep the vector
    for (int i = 0; i < 4*N; i++) begin
      shift_en = 6'b000001;
      din[0] = dout[0];
      checks++;
      if (dout[0] !== vec[i % N]) begin failures++; $display("FAIL recirculation %0d", i); end
      tick();
    end
    // random traffic
    for (int i = 0; i < 300; i++) begin
      shift_en = SA_ROWS'($urandom);
      foreach (din[r]) din[r] = fix_t'($urandom);
      tick();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
