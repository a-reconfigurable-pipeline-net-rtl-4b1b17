// tb_routing_network: programs random connection patterns into all 30
// latches at once and checks every output against the selected source;
// checks that a pattern persists until the next load and that one source can
// be broadcast to all 30 outputs.
module tb_routing_network;
  import hop_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic cfg_we;
  src_t cfg [NUM_DST];
  src_t cfg_q [NUM_DST];
  fix_t src [NUM_SRC];
  fix_t dst [NUM_DST];
  int   pattern [NUM_DST];
  int checks = 0, failures = 0;

  routing_network u_dut (.clk, .rst_n, .cfg_we, .cfg, .src, .cfg_q, .dst);

  task automatic check_all();
    for (int q = 0; q < NUM_DST; q++) begin
      logic [31:0] exp;
      exp = (pattern[q] >= 1 && pattern[q] <= 12) ? src[pattern[q]-1] : 32'd0;
      checks++;
      if (dst[q] !== exp) begin
        failures++;
        $display("FAIL output %0d (code %0d): %h expected %h", q + 1, pattern[q], dst[q], exp);
      end
    end
  endtask

  task automatic load(input int pat [NUM_DST]);
    @(negedge clk);
    cfg_we = 1'b1;
    foreach (cfg[q]) cfg[q] = src_t'(pat[q]);
    @(negedge clk);
    cfg_we = 1'b0;
    foreach (cfg[q]) cfg[q] = src_t'($urandom_range(15));   // must be ignored
  endtask

  initial begin
    cfg_we = 1'b0;
    foreach (cfg[q]) cfg[q] = SRC_NC;
    foreach (src[i]) src[i] = fix_t'($urandom);
    pattern = '{default: 0};
    #12 rst_n = 1'b1;
    #1 check_all();
    for (int t = 0; t < 40; t++) begin
      foreach (pattern[q]) pattern[q] = (t == 0) ? 5 : $urandom_range(15);   // t = 0: broadcast E
      load(pattern);
      for (int r = 0; r < 3; r++) begin
        foreach (src[i]) src[i] = fix_t'($urandom);
        #1 check_all();
        @(negedge clk);
      end
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
