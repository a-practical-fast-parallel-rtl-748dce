// clos_fabric: symmetric three-stage Clos network C(N, M, N), N*N ports.
//
// Stage 1 has N input modules S1(i) of N x M, stage 2 has M middle modules
// S2(k) of N x N, stage 3 has N output modules S3(j) of M x N. Output k of
// S1(i) feeds input i of S2(k); output j of S2(k) feeds input k of S3(j).
// A connection from input p of group i to output q of group j with colour c
// is self-routed: S1(i) switches it to middle module c, S2(c) to output
// module j, S3(j) to output q, each stage reading its own field of the
// header (c, j, q) that travels with the data. A set of connections whose
// colours form a proper edge colouring (no colour twice at one input group
// or at one output group) passes without collision; `conflict` flags any
// collision in any module. Purely combinational.
//
// Ports are indexed [group][port]: in_*[i][p] is input I(i,p),
// out_*[j][q] output O(j,q).
module clos_fabric #(
  parameter int unsigned N  = 5,
  parameter int unsigned M  = 9,
  parameter int unsigned DW = 8
) (
  input  logic [N-1:0]                in_valid [N],
  input  logic [dpr_pkg::COL_W-1:0]   in_mid   [N][N],
  input  logic [dpr_pkg::IDX_W-1:0]   in_grp   [N][N],
  input  logic [dpr_pkg::IDX_W-1:0]   in_port  [N][N],
  input  logic [DW-1:0]               in_data  [N][N],
  output logic [N-1:0]                out_valid [N],
  output logic [DW-1:0]               out_data  [N][N],
  output logic                        conflict
);
  localparam int unsigned GW  = $clog2(N);   // group / port select width
  localparam int unsigned CW  = $clog2(M);   // middle module select width
  localparam int unsigned PW1 = GW + GW + DW; // header after stage 1: j, q, data
  localparam int unsigned PW2 = GW + DW;      // header after stage 2: q, data

  // Stage 1 outputs, [i][k]; stage 2 outputs, [k][j].
  logic [M-1:0]     s1_v [N];
  logic [PW1-1:0]   s1_d [N][M];
  logic [N-1:0]     s2_v [M];
  logic [PW2-1:0]   s2_d [M][N];
  logic [N-1:0]     s1_cf, s3_cf;
  logic [M-1:0]     s2_cf;

  for (genvar i = 0; i < N; i++) begin : g_s1
    logic [CW-1:0]  sel [N];
    logic [PW1-1:0] dat [N];
    for (genvar p = 0; p < N; p++) begin : g_in
      assign sel[p] = in_mid[i][p][CW-1:0];
      assign dat[p] = {in_grp[i][p][GW-1:0], in_port[i][p][GW-1:0], in_data[i][p]};
    end
    crossbar #(.NI(N), .NO(M), .PW(PW1)) u_s1 (
      .in_valid  (in_valid[i]),
      .in_sel    (sel),
      .in_data   (dat),
      .out_valid (s1_v[i]),
      .out_data  (s1_d[i]),
      .conflict  (s1_cf[i])
    );
  end

  for (genvar k = 0; k < M; k++) begin : g_s2
    logic [N-1:0]   v;
    logic [GW-1:0]  sel [N];
    logic [PW2-1:0] dat [N];
    for (genvar i = 0; i < N; i++) begin : g_in
      assign v[i]   = s1_v[i][k];
      assign sel[i] = s1_d[i][k][PW1-1 -: GW];
      assign dat[i] = s1_d[i][k][PW2-1:0];
    end
    crossbar #(.NI(N), .NO(N), .PW(PW2)) u_s2 (
      .in_valid  (v),
      .in_sel    (sel),
      .in_data   (dat),
      .out_valid (s2_v[k]),
      .out_data  (s2_d[k]),
      .conflict  (s2_cf[k])
    );
  end

  for (genvar j = 0; j < N; j++) begin : g_s3
    logic [M-1:0]  v;
    logic [GW-1:0] sel [M];
    logic [DW-1:0] dat [M];
    for (genvar k = 0; k < M; k++) begin : g_in
      assign v[k]   = s2_v[k][j];
      assign sel[k] = s2_d[k][j][PW2-1 -: GW];
      assign dat[k] = s2_d[k][j][DW-1:0];
    end
    crossbar #(.NI(M), .NO(N), .PW(DW)) u_s3 (
      .in_valid  (v),
      .in_sel    (sel),
      .in_data   (dat),
      .out_valid (out_valid[j]),
      .out_data  (out_data[j]),
      .conflict  (s3_cf[j])
    );
  end

  assign conflict = |s1_cf || |s2_cf || |s3_cf;
endmodule
