// tree_mux: one output column of the 12 x 30 distribution routing network.
//
// A 4-bit control latch drives a four-level binary tree of 2:1 multiplexers
// instead of twelve crosspoints on one wire. The sixteen leaves are, in order,
// "no connection", the inputs A..L, and three more "no connection" leaves;
// latch bit 0 (weight 1) steers the seven first-level multiplexers, bit 1
// (weight 2) the four second-level ones, bit 2 (weight 4) the two third-level
// ones and bit 3 (weight 8) the root. The latch value is therefore the number
// of the selected leaf: 0 = none, 1 = A, ..., 12 = L, 13..15 = none. A
// "no connection" leaf delivers zero.
//
// Interface: `ctrl_we` loads `ctrl_d` into the latch on the rising clock edge;
// `din[0..11]` are A..L; `dout` is combinational from `din` and the latch.
// The tree shape and the control-bit weights follow the source architecture;
// the zero value of an unconnected leaf and the latch reset value (0) are this
// design's choice.
module tree_mux
  import hop_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ctrl_we,
  input  src_t       ctrl_d,
  input  fix_t       din [NUM_SRC],
  output src_t       ctrl_q,
  output fix_t       dout
);
  src_t ctrl;
  fix_t leaf [16];
  fix_t lvl1 [8];
  fix_t lvl2 [4];
  fix_t lvl3 [2];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       ctrl <= SRC_NC;
    else if (ctrl_we) ctrl <= ctrl_d;

  always_comb begin
    leaf[0] = '0;
    for (int i = 0; i < NUM_SRC; i++) leaf[i+1] = din[i];
    for (int i = NUM_SRC + 1; i < 16; i++) leaf[i] = '0;
    for (int i = 0; i < 7; i++) lvl1[i] = ctrl[0] ? leaf[2*i+1] : leaf[2*i];
    lvl1[7] = '0;                                  // unconnected input of level 2
    for (int i = 0; i < 4; i++) lvl2[i] = ctrl[1] ? lvl1[2*i+1] : lvl1[2*i];
    for (int i = 0; i < 2; i++) lvl3[i] = ctrl[2] ? lvl2[2*i+1] : lvl2[2*i];
    dout = ctrl[3] ? lvl3[1] : lvl3[0];
  end

  assign ctrl_q = ctrl;
endmodule
