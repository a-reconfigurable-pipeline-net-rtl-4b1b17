// cw_generator: the computational-wavefront (CW_j) generator.
//
// It paces the whole net in blocks of N+4 cycles, one computational wavefront
// per block: `cyc` counts 0 .. N+3 inside a block and `cw` is the wavefront
// number j. `phase` is the wavefront's role (CW0, Euler start, Runge-Kutta
// order improvement, CW5, first and later predictor-corrector wavefronts),
// handed to P3 and from there up the processor chain.
//
// A run starts on `start` and ends after the block in which STOP was raised
// or after `max_cw` wavefronts, whichever comes first. One extra drain block
// (phase PH_IDLE) follows, in which nothing is computed but the results of the
// last wavefront are still streamed out; then `done` is set until the next
// `start`.
//
// `cfg_load` pulses in the cycle before each block and `cfg_phase` names the
// phase of that block, so the control signals generator can switch the
// routing latches at the block boundary. `prev_phase` is the phase of the
// block before the current one (whose results are streaming now).
// The block length follows the source architecture's (n+4)-cycle block
// pipelining period; the start/stop/drain protocol is this design's.
module cw_generator
  import hop_pkg::*;
#(
  parameter int N = 16,
  localparam int CYC_W = $clog2(N + BLK_EXTRA)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             stop,
  input  logic [15:0]      max_cw,
  output logic             run,
  output logic [CYC_W-1:0] cyc,
  output logic [15:0]      cw,
  output phase_t           phase,
  output phase_t           prev_phase,
  output logic             cfg_load,
  output phase_t           cfg_phase,
  output logic             done
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_t;
  state_t state;
  logic   blk_end, to_drain;

  assign blk_end  = (state != S_IDLE) && (cyc == CYC_W'(N + BLK_EXTRA - 1));
  assign to_drain = stop || (cw + 16'd1 >= max_cw);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; cyc <= '0; cw <= '0; done <= 1'b0; prev_phase <= PH_IDLE;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state <= S_RUN; cyc <= '0; cw <= '0; done <= 1'b0; prev_phase <= PH_IDLE;
        end
        default: begin
          if (blk_end) begin
            cyc        <= '0;
            cw         <= cw + 16'd1;
            prev_phase <= phase;
            if (state == S_DRAIN) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else if (to_drain) begin
              state <= S_DRAIN;
            end
          end else begin
            cyc <= cyc + CYC_W'(1);
          end
        end
      endcase
    end
  end

  a_cyc_range: assert property (@(posedge clk) disable iff (!rst_n)
    cyc <= CYC_W'(N + BLK_EXTRA - 1))
    else $error("block cycle counter out of range");

  always_comb begin
    run       = (state != S_IDLE);
    phase     = (state == S_RUN) ? phase_of(32'(cw)) : PH_IDLE;
    cfg_load  = ((state == S_IDLE) && start) || (state == S_RUN && blk_end);
    if (state == S_IDLE)  cfg_phase = PH_CW0;
    else if (to_drain)    cfg_phase = PH_IDLE;
    else                  cfg_phase = phase_of(32'(cw) + 1);
  end
endmodule
