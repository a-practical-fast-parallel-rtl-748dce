// dpr_router: distributed pipeline routing (DPR) architecture for a
// symmetric three-stage Clos network C(N, M, N) with N*N inputs.
//
// Routing is edge colouring of the bipartite I/O mapping graph: input group i
// and output group j are nodes, each connection an edge, and the colour of an
// edge is the middle-stage module the connection passes. The router keeps,
// for every input group i, the free colours of node v'_i in the M-cell ring
// ICSR_i (inside input ring IR_i) and, for every output group j, those of
// node v''_j in OCSR_j (inside output ring OR_j). In step k of the colour
// assignment phase input PE IP(i,j) owns colour (i+j+k) mod M in both ICSR_i
// and OCSR_j, so all N*N PEs test and claim distinct (group, colour) pairs
// at once: one pass of M steps colours every new edge, M >= 2N-1 for a
// strictly nonblocking network with connections already in place, M >= N
// for a rearrangeable network routed from scratch.
//
// A routing cycle takes 2N + 2M - 2 steps (N - 1 to distribute tokens, M to
// erase the colours of torn-down connections, M to assign colours, N - 1 to
// return tokens) plus one PREP and one RESULT cycle. With `packet_mode` set
// every colour is freed at the start of each cycle and the erase phase is
// skipped, giving 2N + M - 2 steps; this is the rearrangeable use as a cell
// switch, where every cell slot carries a fresh permutation.
//
// Interface: while `run` is high routing cycles follow each other. `req[i][p]`
// (input p of input group i) is sampled in the cycle `req_taken` is high;
// `res[i][p]` is the routed CAR token, valid while `res_valid` is high. The
// requests of one cycle must form a partial permutation and a CDR token must
// name a connection that exists. `load` with `icsr_load`/`ocsr_load` presets
// the colour state (bit c = colour c free); outside a routing cycle only.
// `icsr`/`ocsr` show the state, `cycle_packet` the mode of the running cycle
// and `ev_*` flag per-PE events (assignment, erase, token kept waiting).
//
// L = 2 selects the doubled shift registers for C(N, 2N-1, N): each ring
// has two N-cell registers (colours 0..N-1 and N..2N-1, colour 2N-1 unused),
// each PE handles two colours per step and both Phase 2 subphases last N
// steps, so a routing cycle takes 4N - 2 steps. The state vectors are then
// {second register, first register}, 2N bits. The basic rings (L = 1) are
// the document's main architecture and the default.
module dpr_router #(
  parameter int unsigned N = 5,
  parameter int unsigned M = 9,
  parameter int unsigned L = 1,
  // Phase 2 subphase length and width of one ICSR/OCSR state vector.
  localparam int unsigned CM = (L == 1) ? M : N,
  localparam int unsigned RW = L * CM
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                run,
  input  logic                packet_mode,
  input  dpr_pkg::req_t       req [N][N],
  output logic                req_taken,
  output dpr_pkg::token_t     res [N][N],
  output logic                res_valid,
  input  logic                load,
  input  logic [RW-1:0]       icsr_load [N],
  input  logic [RW-1:0]       ocsr_load [N],
  output logic [RW-1:0]       icsr [N],
  output logic [RW-1:0]       ocsr [N],
  output dpr_pkg::phase_e     phase,
  output logic                cycle_packet,
  output logic [N-1:0]        ev_assign [N],
  output logic [N-1:0]        ev_erase [N],
  output logic [N-1:0]        ev_wait [N]
);
  import dpr_pkg::*;

  color_t step;
  logic   shift, set_all;

  dpr_ctrl #(.N(N), .M(CM)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .run         (run),
    .packet_mode (packet_mode),
    .phase       (phase),
    .step        (step),
    .shift       (shift),
    .set_all     (set_all),
    .mode        (cycle_packet)
  );

  // IP(i,j) <-> OP(j,i) links: index [i][j] on the input side,
  // [j][i] on the output side, one bit per colour lane.
  logic [L-1:0] c2    [N][N];   // c2[i][j]    = c''(j,i) seen by IP(i,j)
  logic [L-1:0] c2_we [N][N];   // c2_we[i][j] from IP(i,j)
  logic [L-1:0] c2_wd [N][N];
  logic [L-1:0] op_we [N][N];   // op_we[j][i] into OP(j,i)
  logic [L-1:0] op_wd [N][N];
  logic [L-1:0] op_c  [N][N];   // op_c[j][i]  = c''(j,i)
  color_t       cc1 [N][N];     // cc1[i][j] = CC1(i,j)
  color_t       cc2 [N][N];     // cc2[j][i] = CC2(j,i)

  for (genvar i = 0; i < N; i++) begin : g_link_i
    for (genvar j = 0; j < N; j++) begin : g_link_j
      assign op_we[j][i] = c2_we[i][j];
      assign op_wd[j][i] = c2_wd[i][j];
      assign c2[i][j]    = op_c[j][i];
    end
  end

  if (L == 1) begin : g_basic
    for (genvar i = 0; i < N; i++) begin : g_ir
      logic [N-1:0] ring_c2, ring_we, ring_wd;
      for (genvar j = 0; j < N; j++) begin : g_pe
        assign ring_c2[j]  = c2[i][j][0];
        assign c2_we[i][j] = ring_we[j];
        assign c2_wd[i][j] = ring_wd[j];
      end
      input_ring #(.N(N), .M(M), .I(i)) u_ir (
        .clk       (clk),
        .rst_n     (rst_n),
        .phase     (phase),
        .step      (step),
        .shift     (shift),
        .set_all   (set_all),
        .load      (load),
        .load_val  (icsr_load[i]),
        .req       (req[i]),
        .res       (res[i]),
        .c2        (ring_c2),
        .c2_we     (ring_we),
        .c2_wd     (ring_wd),
        .cc        (cc1[i]),
        .icsr      (icsr[i]),
        .ev_assign (ev_assign[i]),
        .ev_erase  (ev_erase[i]),
        .ev_wait   (ev_wait[i])
      );
    end

    for (genvar j = 0; j < N; j++) begin : g_or
      logic [N-1:0] ring_we, ring_wd, ring_c;
      for (genvar i = 0; i < N; i++) begin : g_op
        assign ring_we[i]  = op_we[j][i][0];
        assign ring_wd[i]  = op_wd[j][i][0];
        assign op_c[j][i]  = ring_c[i];
      end
      output_ring #(.N(N), .M(M), .J(j)) u_or (
        .clk      (clk),
        .rst_n    (rst_n),
        .reload   (phase == PH_PREP),
        .shift    (shift),
        .set_all  (set_all),
        .load     (load),
        .load_val (ocsr_load[j]),
        .we       (ring_we),
        .wd       (ring_wd),
        .pe_cell  (ring_c),
        .cc2      (cc2[j]),
        .ocsr     (ocsr[j])
      );
    end
  end else begin : g_doubled
    for (genvar i = 0; i < N; i++) begin : g_ir
      input_ring_dsr #(.N(N), .I(i)) u_ir (
        .clk       (clk),
        .rst_n     (rst_n),
        .phase     (phase),
        .step      (step),
        .shift     (shift),
        .set_all   (set_all),
        .load      (load),
        .load_val  (icsr_load[i]),
        .req       (req[i]),
        .res       (res[i]),
        .c2        (c2[i]),
        .c2_we     (c2_we[i]),
        .c2_wd     (c2_wd[i]),
        .cc        (cc1[i]),
        .icsr      (icsr[i]),
        .ev_assign (ev_assign[i]),
        .ev_erase  (ev_erase[i]),
        .ev_wait   (ev_wait[i])
      );
    end

    for (genvar j = 0; j < N; j++) begin : g_or
      output_ring_dsr #(.N(N), .J(j)) u_or (
        .clk      (clk),
        .rst_n    (rst_n),
        .reload   (phase == PH_PREP),
        .shift    (shift),
        .set_all  (set_all),
        .load     (load),
        .load_val (ocsr_load[j]),
        .we       (op_we[j]),
        .wd       (op_wd[j]),
        .pe_cell  (op_c[j]),
        .cc2      (cc2[j]),
        .ocsr     (ocsr[j])
      );
    end
  end

  assign req_taken = (phase == PH_PREP);
  assign res_valid = (phase == PH_RESULT);

  // CC2(j,i) is implied by CC1(i,j): the two must always agree.
  always_ff @(posedge clk) begin
    if (rst_n)
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          assert (cc1[i][j] == cc2[j][i])
            else $error("dpr_router: CC1(%0d,%0d) != CC2(%0d,%0d)", i, j, j, i);
  end

  initial
    assert (L == 1 || (L == 2 && M == 2 * N - 1))
      else $error("dpr_router: doubled shift registers need M = 2N-1");

  // The colour state may only be preset while no routing cycle runs.
  always_ff @(posedge clk) begin
    if (rst_n && load)
      assert (phase == PH_IDLE || phase == PH_RESULT)
        else $error("dpr_router: load during a routing cycle");
  end
endmodule
