// dpr_router_ovl: DPR router with overlapped phases for cell switching.
//
// Each input ring IR_i is split into three rings of n PEs, one per phase of
// the routing cycle: IR_i^1 distributes the CAR tokens of a cell slot to
// their agents, IR_i^2 (with ICSR_i and the output rings) colours them, and
// IR_i^3 returns them to their inputs. PE j of one ring hands its token pool
// to PE j of the next ring over a horizontal link, so three consecutive
// cell slots are in flight at once: while slot b is being returned, slot b+1
// is coloured and slot b+2 distributed. A new slot starts every P clocks
// instead of once per full routing cycle.
//
// This is the rearrangeable (packet) use: every slot starts from an empty
// network, so at the end of each colouring period all ICSR/OCSR cells are
// set to 1 and there is no erase subphase and no CDR token. One pass of the
// colouring is complete for M >= 2N-1; with fewer middle modules a request
// can come back uncoloured (`colored` clear in its token).
//
// Timing: a period has P = max(M, N+1) clocks, numbered t = 0..P-1.
//   ring 1: t = 0 PREP (requests sampled, `req_taken`), t = 1..N-1 DIST.
//   ring 2: t = 0..M-1 ASSIGN with the registers shifting; at t = P-1 all
//           cells are freed for the next slot.
//   ring 3: t = 1..N-1 RETURN, t = N RESULT (`res_valid`, `res` holds the
//           tokens of the slot whose requests were taken two periods before).
// At the end of every period ring 2 takes ring 1's pools and ring 3 takes
// ring 2's. The latency from `req_taken` to `res_valid` is 2P + N clocks.
// `res_valid` is raised only for slots that were started after reset.
//
// Each row uses only the part of input_pe its phase needs. The other
// outputs stay unread and are reported by lint as unused signals: the cell
// writes, counters, results and event flags of rows 1 and 3, the result of
// row 2, the last row's pool and the register contents. Synthesis removes
// the logic behind them.
//
// The split into per-phase rings joined as a torus and the overlap of
// consecutive slots follow the document; the period length (the longest
// phase plus the PREP clock where needed) and the pool hand-over at period
// ends are this design's own choices.
module dpr_router_ovl #(
  parameter int unsigned N = 5,
  parameter int unsigned M = 9,
  localparam int unsigned P = (M > N) ? M : N + 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  dpr_pkg::req_t       req [N][N],
  output logic                req_taken,
  output dpr_pkg::token_t     res [N][N],
  output logic                res_valid,
  output logic [N-1:0]        ev_assign [N],
  output logic [N-1:0]        ev_wait   [N]
);
  import dpr_pkg::*;

  color_t t;            // clock within the period
  logic [1:0] filled;   // slots started since reset, saturating at 2
  phase_e ph1, ph2, ph3;
  color_t st1, st2, st3;
  logic   shift2, free_all, last;

  assign last = (t == color_t'(P - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      t      <= '0;
      filled <= '0;
    end else begin
      t <= last ? '0 : t + 1'b1;
      if (last && filled != 2'd2) filled <= filled + 1'b1;
    end
  end

  always_comb begin
    ph1 = PH_IDLE; st1 = t;
    ph2 = PH_IDLE; st2 = t;
    ph3 = PH_IDLE; st3 = t;
    if (t == '0)                    ph1 = PH_PREP;
    else if (t < color_t'(N))       ph1 = PH_DIST;
    if (t < color_t'(M))            ph2 = PH_ASSIGN;
    if (t >= color_t'(1) && t < color_t'(N)) ph3 = PH_RETURN;
    else if (t == color_t'(N))      ph3 = PH_RESULT;
    shift2   = (ph2 == PH_ASSIGN);
    free_all = last;
  end

  assign req_taken = (t == '0);
  assign res_valid = (t == color_t'(N)) && (filled == 2'd2);

  // IP(i,j) <-> OP(j,i) links of ring 2.
  logic [N-1:0] c2    [N];   // c2[i][j] = c''(j,i)
  logic [N-1:0] c2_we [N];
  logic [N-1:0] c2_wd [N];
  logic [N-1:0] op_we [N];
  logic [N-1:0] op_wd [N];
  logic [N-1:0] op_c  [N];
  color_t       cc2 [N][N];
  logic [M-1:0] ocsr [N];
  logic [M-1:0] icsr [N];
  logic [M-1:0] ones;

  assign ones = '1;

  for (genvar i = 0; i < N; i++) begin : g_link_i
    for (genvar j = 0; j < N; j++) begin : g_link_j
      assign op_we[j][i] = c2_we[i][j];
      assign op_wd[j][i] = c2_wd[i][j];
      assign c2[i][j]    = op_c[j][i];
    end
  end

  token_t none [N];
  always_comb for (int p = 0; p < N; p++) none[p] = TOKEN_NONE;

  for (genvar i = 0; i < N; i++) begin : g_ir
    token_t car1 [N];  token_t cdr1 [N];   // ring links of rings 1..3
    token_t car2 [N];  token_t cdr2 [N];
    token_t car3 [N];  token_t cdr3 [N];
    token_t pool1 [N][N];
    token_t pool2 [N][N];
    token_t pool3 [N][N];
    token_t res1 [N];
    token_t res2 [N];
    logic [N-1:0] c1, we, wd;
    logic [N-1:0] u_we1, u_wd1, u_we3, u_wd3, u_ev1, u_ev3, u_er1, u_er2, u_er3, u_wt1, u_wt3;
    color_t u_cc1 [N];
    color_t u_cc2 [N];
    color_t u_cc3 [N];

    csr_ring #(.M(M), .NA(N)) u_icsr (
      .clk (clk), .rst_n (rst_n), .shift (shift2), .set_all (free_all),
      .load (1'b0), .load_val (ones), .we (we), .wd (wd),
      .pe_cell (c1), .ring (icsr[i])
    );

    for (genvar j = 0; j < N; j++) begin : g_pe
      // ring 1: token forming and distribution
      input_pe #(.N(N), .M(M), .I(i), .J(j)) u_pe1 (
        .clk (clk), .rst_n (rst_n), .phase (ph1), .step (st1), .shift (1'b0),
        .req (req[i][j]),
        .car_in (car1[(j + 1) % N]), .cdr_in (cdr1[(j + 1) % N]),
        .car_out (car1[j]), .cdr_out (cdr1[j]),
        .c1 (1'b0), .c2 (1'b0), .cell_we (u_we1[j]), .cell_wd (u_wd1[j]),
        .cc (u_cc1[j]), .res (res1[j]),
        .ev_assign (u_ev1[j]), .ev_erase (u_er1[j]), .ev_wait (u_wt1[j]),
        .pool_load (1'b0), .pool_in (none), .pool_out (pool1[j])
      );
      // ring 2: colour assignment, takes ring 1's pool at each period end
      input_pe #(.N(N), .M(M), .I(i), .J(j)) u_pe2 (
        .clk (clk), .rst_n (rst_n), .phase (ph2), .step (st2), .shift (shift2),
        .req ('0),
        .car_in (car2[(j + 1) % N]), .cdr_in (cdr2[(j + 1) % N]),
        .car_out (car2[j]), .cdr_out (cdr2[j]),
        .c1 (c1[j]), .c2 (c2[i][j]), .cell_we (we[j]), .cell_wd (wd[j]),
        .cc (u_cc2[j]), .res (res2[j]),
        .ev_assign (ev_assign[i][j]), .ev_erase (u_er2[j]), .ev_wait (ev_wait[i][j]),
        .pool_load (last), .pool_in (pool1[j]), .pool_out (pool2[j])
      );
      // ring 3: return, takes ring 2's pool at each period end
      input_pe #(.N(N), .M(M), .I(i), .J(j)) u_pe3 (
        .clk (clk), .rst_n (rst_n), .phase (ph3), .step (st3), .shift (1'b0),
        .req ('0),
        .car_in (car3[(j + 1) % N]), .cdr_in (cdr3[(j + 1) % N]),
        .car_out (car3[j]), .cdr_out (cdr3[j]),
        .c1 (1'b0), .c2 (1'b0), .cell_we (u_we3[j]), .cell_wd (u_wd3[j]),
        .cc (u_cc3[j]), .res (res[i][j]),
        .ev_assign (u_ev3[j]), .ev_erase (u_er3[j]), .ev_wait (u_wt3[j]),
        .pool_load (last), .pool_in (pool2[j]), .pool_out (pool3[j])
      );
      assign c2_we[i][j] = we[j];
      assign c2_wd[i][j] = wd[j];

      // the OP counter implied by the IP counter must agree with it
      always_ff @(posedge clk)
        if (rst_n)
          assert (u_cc2[j] == cc2[j][i])
            else $error("dpr_router_ovl: CC1(%0d,%0d) != CC2(%0d,%0d)", i, j, j, i);
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_or
    output_ring #(.N(N), .M(M), .J(j)) u_or (
      .clk (clk), .rst_n (rst_n), .reload (1'b0), .shift (shift2),
      .set_all (free_all), .load (1'b0), .load_val (ones),
      .we (op_we[j]), .wd (op_wd[j]), .pe_cell (op_c[j]),
      .cc2 (cc2[j]), .ocsr (ocsr[j])
    );
  end

  initial
    assert (N >= 2 && M >= N && M <= MAX_M)
      else $error("dpr_router_ovl: need M >= N");
endmodule
