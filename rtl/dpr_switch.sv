// dpr_switch: N*N-port symmetric three-stage Clos switch C(N, M, N) with a
// distributed pipeline routing (DPR) controller.
//
// Each input I(i,p) asks for a connection to output O(j,q) or for the
// removal of its connection (`usr_add`, `usr_grp`, `usr_port`, `usr_del`).
// The input ports hold these requests until the next routing cycle of the
// DPR router, which colours the new edges of the I/O mapping graph, i.e.
// picks for each new connection a middle-stage module free at both its input
// module and its output module. The returned colour becomes the
// self-routing header (c, j, q) with which the input's data word `din[i][p]`
// crosses the Clos fabric to `dout[j][q]` (`dout_valid` marks outputs that
// carry a connection). Data passes combinationally; connections change
// only at the PREP and RESULT cycles of a routing cycle.
//
// Default size C(5, 9, 5): 25 ports, strictly nonblocking (M >= 2N-1), so
// in circuit mode new connections are always routed without moving existing
// ones. With `packet_mode` high each routing cycle is one cell slot: all
// connections and colours are cleared and a fresh (partial) permutation is
// routed; M >= N suffices for this rearrangeable use. The requests of a
// cycle must form a partial permutation (no output asked for twice, no
// output asked for that is in use); resolving output contention is left to
// a scheduler in front of the switch.
//
// With L = 2 the router uses the doubled shift registers (C(N, 2N-1, N)
// only): the same behaviour in 4N-2 instead of 2N+2M-2 routing steps.
//
// With OVL = 1 the switch is a pure cell switch built on the overlapped-
// phase router: a new slot starts every max(M, N+1) clocks (`req_taken`),
// `usr_add` requests are held until the next slot starts, and each slot's
// connections appear two periods later (`cycle_done`) and last one period.
// `run`, `packet_mode` and `usr_del` are not used in this form (every slot
// starts empty), `ev_erase` stays low, and the per-input request handling
// is done in this module instead of input_port because the output port has
// to wait two periods for its token.
//
// Status: `req_taken` and `cycle_done` mark the PREP and RESULT cycles,
// `conn_*` each input's connection, `route_fail` a request that was not
// coloured (impossible for valid sizes), `fabric_conflict` a collision in
// the fabric, `ev_*` the router's per-PE events.
module dpr_switch #(
  parameter int unsigned N  = 5,
  parameter int unsigned M  = 9,
  parameter int unsigned DW = 8,
  // 1: basic rings; 2: doubled shift registers (needs M = 2N-1)
  parameter int unsigned L  = 1,
  // 1: overlapped-phase router for cell switching (packet mode only)
  parameter bit          OVL = 1'b0,
  localparam int unsigned CM = (L == 1) ? M : N,
  localparam int unsigned RW = L * CM
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       run,
  input  logic                       packet_mode,
  input  logic [N-1:0]               usr_add  [N],
  input  logic [dpr_pkg::IDX_W-1:0]  usr_grp  [N][N],
  input  logic [dpr_pkg::IDX_W-1:0]  usr_port [N][N],
  input  logic [N-1:0]               usr_del  [N],
  input  logic [DW-1:0]              din      [N][N],
  output logic [DW-1:0]              dout     [N][N],
  output logic [N-1:0]               dout_valid [N],
  output logic                       req_taken,
  output logic                       cycle_done,
  output logic [N-1:0]               conn_valid [N],
  output logic [dpr_pkg::COL_W-1:0]  conn_color [N][N],
  output logic [N-1:0]               pending    [N],
  output logic [N-1:0]               route_fail [N],
  output logic                       fabric_conflict,
  output logic [N-1:0]               ev_assign [N],
  output logic [N-1:0]               ev_erase  [N],
  output logic [N-1:0]               ev_wait   [N]
);
  import dpr_pkg::*;

  req_t    req [N][N];
  token_t  res [N][N];
  logic    res_valid, cycle_packet;
  phase_e  phase;
  idx_t    conn_grp  [N][N];
  idx_t    conn_port [N][N];

  if (OVL == 0) begin : g_basic
    logic [RW-1:0] icsr [N];
    logic [RW-1:0] ocsr [N];
    logic [RW-1:0] no_load [N];

    always_comb for (int i = 0; i < N; i++) no_load[i] = '1;

    dpr_router #(.N(N), .M(M), .L(L)) u_router (
      .clk          (clk),
      .rst_n        (rst_n),
      .run          (run),
      .packet_mode  (packet_mode),
      .req          (req),
      .req_taken    (req_taken),
      .res          (res),
      .res_valid    (res_valid),
      .load         (1'b0),
      .icsr_load    (no_load),
      .ocsr_load    (no_load),
      .icsr         (icsr),
      .ocsr         (ocsr),
      .phase        (phase),
      .cycle_packet (cycle_packet),
      .ev_assign    (ev_assign),
      .ev_erase     (ev_erase),
      .ev_wait      (ev_wait)
    );

    for (genvar i = 0; i < N; i++) begin : g_grp
      for (genvar p = 0; p < N; p++) begin : g_in
        input_port #(.N(N), .M(M), .P(p)) u_port (
          .clk          (clk),
          .rst_n        (rst_n),
          .add          (usr_add[i][p]),
          .add_grp      (usr_grp[i][p]),
          .add_port     (usr_port[i][p]),
          .del          (usr_del[i][p]),
          .req_taken    (req_taken),
          .cycle_packet (cycle_packet),
          .req          (req[i][p]),
          .res_valid    (res_valid),
          .res          (res[i][p]),
          .conn_valid   (conn_valid[i][p]),
          .conn_grp     (conn_grp[i][p]),
          .conn_port    (conn_port[i][p]),
          .conn_color   (conn_color[i][p]),
          .pending      (pending[i][p]),
          .route_fail   (route_fail[i][p])
        );
      end
    end
    // Between routing cycles the colour state must describe exactly the
    // connections in place: colour c is taken at input group i (output group
    // j) iff an input of group i (an input going to group j) uses it.
    always_ff @(posedge clk) begin
      if (rst_n && phase == PH_IDLE) begin
        for (int g = 0; g < N; g++)
          for (int c = 0; c < M; c++) begin
            automatic logic used_i = 1'b0;
            automatic logic used_o = 1'b0;
            for (int x = 0; x < N; x++)
              for (int y = 0; y < N; y++)
                if (conn_valid[x][y] && int'(conn_color[x][y]) == c) begin
                  if (x == g) used_i = 1'b1;
                  if (int'(conn_grp[x][y]) == g) used_o = 1'b1;
                end
            // colour c sits in cell (c mod CM - g) mod CM of register c / CM
            // of the rings of group g
            assert (icsr[g][(c / CM) * CM + (c % CM + CM - g % CM) % CM] == !used_i &&
                    ocsr[g][(c / CM) * CM + (c % CM + CM - g % CM) % CM] == !used_o)
              else $error("dpr_switch: colour state of group %0d colour %0d disagrees with connections", g, c);
          end
      end
    end
  end else begin : g_overlap
    // Cell switching with overlapped phases: a request is held until the
    // next slot starts; its output port waits in a three-deep pipeline for
    // the routed token, which arrives two periods later. Each connection
    // lasts one period (one cell slot).
    logic ovl_taken, ovl_valid;
    dpr_router_ovl #(.N(N), .M(M)) u_router (
      .clk       (clk),
      .rst_n     (rst_n),
      .req       (req),
      .req_taken (ovl_taken),
      .res       (res),
      .res_valid (ovl_valid),
      .ev_assign (ev_assign),
      .ev_wait   (ev_wait)
    );
    assign req_taken    = ovl_taken;
    assign res_valid    = ovl_valid;
    assign phase        = PH_IDLE;
    assign cycle_packet = 1'b1;
    for (genvar i = 0; i < N; i++) begin : g_grp
      assign ev_erase[i] = '0;      // no tear-down in cell switching
      for (genvar p = 0; p < N; p++) begin : g_in
        logic pend;
        idx_t pgrp, pport;
        idx_t qpipe [3];
        always_comb begin
          req[i][p]         = '0;
          req[i][p].add     = pend;
          req[i][p].add_grp = pgrp;
        end
        always_ff @(posedge clk) begin
          if (!rst_n) begin
            pend <= 1'b0;
            pgrp <= '0;
            pport <= '0;
            for (int d = 0; d < 3; d++) qpipe[d] <= '0;
            conn_valid[i][p] <= 1'b0;
            conn_grp[i][p]   <= '0;
            conn_port[i][p]  <= '0;
            conn_color[i][p] <= '0;
            route_fail[i][p] <= 1'b0;
          end else begin
            route_fail[i][p] <= 1'b0;
            if (ovl_taken) begin
              pend     <= 1'b0;
              qpipe[0] <= pend ? pport : '0;
              qpipe[1] <= qpipe[0];
              qpipe[2] <= qpipe[1];
            end
            if (usr_add[i][p]) begin     // a later request replaces a held one
              pend  <= 1'b1;
              pgrp  <= usr_grp[i][p];
              pport <= usr_port[i][p];
            end
            if (ovl_valid) begin
              conn_valid[i][p] <= res[i][p].valid && res[i][p].colored;
              conn_grp[i][p]   <= res[i][p].grp;
              conn_port[i][p]  <= qpipe[2];
              conn_color[i][p] <= res[i][p].color;
              route_fail[i][p] <= res[i][p].valid && !res[i][p].colored;
            end
          end
        end
        assign pending[i][p] = pend;
      end
    end
  end

  clos_fabric #(.N(N), .M(M), .DW(DW)) u_fabric (
    .in_valid  (conn_valid),
    .in_mid    (conn_color),
    .in_grp    (conn_grp),
    .in_port   (conn_port),
    .in_data   (din),
    .out_valid (dout_valid),
    .out_data  (dout),
    .conflict  (fabric_conflict)
  );

  assign cycle_done = res_valid;

endmodule
