// shifter_array: the 6 x n shifter array SA(r, c).
//
// Each of the six rows is an n-stage shift register. A row shifts one position
// per cycle while its enable is high: the routed input enters SA(r,1) and
// SA(r,n) is the row's output (sources G..L of the routing network). Because a
// vector of n components streams through in n enabled cycles, a row delays a
// whole vector by exactly one block, or keeps it indefinitely when its output
// is routed back to its own input. This is how the net keeps v0, F0 and the
// older corrected derivatives F_{k-2}^[3], F_{k-3}^[3] in step with the
// processors.
//
// Interface: `shift_en[r]`, `din[r]` per row; `load_en`/`load_d` shift a host
// vector into row 1 (index 0) instead of its routed input, used to place the
// initial state v0 before the run. `dout[r]` = SA(r+1, n), registered.
// Row count and length follow the source architecture; the host load path
// and the reset to zero are this design's choice.
module shifter_array
  import hop_pkg::*;
#(
  parameter int N = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [SA_ROWS-1:0] shift_en,
  input  fix_t               din  [SA_ROWS],
  input  logic               load_en,
  input  fix_t               load_d,
  output fix_t               dout [SA_ROWS]
);
  fix_t sa [SA_ROWS][N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < SA_ROWS; r++)
        for (int c = 0; c < N; c++) sa[r][c] <= '0;
    end else begin
      for (int r = 0; r < SA_ROWS; r++) begin
        if (shift_en[r] || (r == 0 && load_en)) begin
          sa[r][0] <= (r == 0 && load_en) ? load_d : din[r];
          for (int c = 1; c < N; c++) sa[r][c] <= sa[r][c-1];
        end
      end
    end
  end

  for (genvar r = 0; r < SA_ROWS; r++) begin : g_out
    assign dout[r] = sa[r][N-1];
  end
endmodule
