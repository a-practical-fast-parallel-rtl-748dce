// dpr_ctrl: sequencer of the routing cycle of the DPR architecture.
//
// Every PE of every ring runs the same step at the same time, so a single
// controller broadcasts the phase and the step index. One routing cycle is
//
//   PREP    1 cycle    inputs' requests are turned into tokens
//   DIST    n-1 steps  Phase 1, tokens travel to their agent PEs
//   ERASE   m steps    Phase 2.1, CDR tokens free their colours
//                      (skipped in packet mode, where all colours are freed
//                      at once in PREP instead)
//   ASSIGN  m steps    Phase 2 / 2.2, CAR tokens receive colours
//   RETURN  n-1 steps  Phase 3, tokens travel back to their origins
//   RESULT  1 cycle    routed tokens are presented to the inputs
//
// which gives the 2n+2m-2 steps of the connection/disconnection algorithm
// (2n+m-2 in packet mode) plus the two bookkeeping cycles of this design.
// While `run` is high cycles follow one another back to back, as the
// algorithm repeats for ever; when `run` is low the controller waits in IDLE
// after finishing the current cycle. `packet_mode` is sampled in IDLE and in
// RESULT, so a cycle never changes mode half way.
//
// Outputs: `phase` and `step` (1..n-1 in DIST and RETURN, 0..m-1 in ERASE and
// ASSIGN), `shift` (the circular shift registers and counters advance at the
// end of this cycle), `set_all` (free every colour) and `mode` (the packet
// mode of the running cycle).
module dpr_ctrl #(
  parameter int unsigned N = 5,
  parameter int unsigned M = 9
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    run,
  input  logic                    packet_mode,
  output dpr_pkg::phase_e         phase,
  output logic [dpr_pkg::COL_W-1:0] step,
  output logic                    shift,
  output logic                    set_all,
  output logic                    mode
);
  import dpr_pkg::*;

  localparam color_t LAST_HOP  = color_t'(N - 1);
  localparam color_t LAST_STEP = color_t'(M - 1);

  phase_e ph_q;
  color_t st_q;
  logic   mode_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ph_q   <= PH_IDLE;
      st_q   <= '0;
      mode_q <= 1'b0;
    end else begin
      unique case (ph_q)
        PH_IDLE: begin
          mode_q <= packet_mode;
          if (run) ph_q <= PH_PREP;
        end
        PH_PREP: begin
          ph_q <= PH_DIST;
          st_q <= color_t'(1);
        end
        PH_DIST: begin
          if (st_q == LAST_HOP) begin
            ph_q <= mode_q ? PH_ASSIGN : PH_ERASE;
            st_q <= '0;
          end else st_q <= st_q + color_t'(1);
        end
        PH_ERASE: begin
          if (st_q == LAST_STEP) begin
            ph_q <= PH_ASSIGN;
            st_q <= '0;
          end else st_q <= st_q + color_t'(1);
        end
        PH_ASSIGN: begin
          if (st_q == LAST_STEP) begin
            ph_q <= PH_RETURN;
            st_q <= color_t'(1);
          end else st_q <= st_q + color_t'(1);
        end
        PH_RETURN: begin
          if (st_q == LAST_HOP) begin
            ph_q <= PH_RESULT;
            st_q <= '0;
          end else st_q <= st_q + color_t'(1);
        end
        PH_RESULT: begin
          mode_q <= packet_mode;
          ph_q   <= run ? PH_PREP : PH_IDLE;
        end
        default: ph_q <= PH_IDLE;
      endcase
    end
  end

  assign phase   = ph_q;
  assign step    = st_q;
  assign mode    = mode_q;
  assign shift   = (ph_q == PH_ERASE) || (ph_q == PH_ASSIGN);
  assign set_all = (ph_q == PH_PREP) && mode_q;

  initial begin
    assert (N >= 2 && N <= MAX_N && M >= N && M <= MAX_M)
      else $error("dpr_ctrl: need 2 <= N <= MAX_N and N <= M <= MAX_M");
  end
endmodule
