// tb_tree_mux: loads every latch code 0..15 and checks that the tree delivers
// input A..L for codes 1..12 and zero for the unconnected codes 0, 13, 14, 15;
// also checks that the latch keeps its code while not written and resets to 0.
module tb_tree_mux;
  import hop_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ctrl_we;
  src_t ctrl_d, ctrl_q;
  fix_t din [NUM_SRC];
  fix_t dout;
  int checks = 0, failures = 0;

  tree_mux u_dut (.clk, .rst_n, .ctrl_we, .ctrl_d, .din, .ctrl_q, .dout);

  task automatic expect_out(int code);
    logic [31:0] exp;
    exp = (code >= 1 && code <= 12) ? din[code-1] : 32'd0;
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL code %0d: dout=%h expected %h", code, dout, exp);
    end
  endtask

  initial begin
    ctrl_we = 1'b0; ctrl_d = SRC_NC;
    foreach (din[i]) din[i] = fix_t'($urandom);
    #12;
    expect_out(0);                         // latch in reset
    rst_n = 1'b1;
    for (int rep = 0; rep < 4; rep++) begin
      for (int code = 0; code < 16; code++) begin
        @(negedge clk);
        ctrl_we = 1'b1; ctrl_d = src_t'(code);
        @(negedge clk);
        ctrl_we = 1'b0; ctrl_d = src_t'(15 - code);
        foreach (din[i]) din[i] = fix_t'($urandom);
        #1 expect_out(code);
        checks++;
        if (ctrl_q != src_t'(code)) begin failures++; $display("FAIL latch readback"); end
        @(negedge clk);                    // latch must hold while we = 0
        foreach (din[i]) din[i] = fix_t'($urandom);
        #1 expect_out(code);
      end
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
