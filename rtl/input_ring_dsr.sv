// input_ring_dsr: input ring IR_I with doubled shift registers, for the
// strictly nonblocking network C(n, 2n-1, n).
//
// The single m-cell ICSR of the basic ring is replaced by two n-cell rings:
// ICSR1 keeps the availability of colours 0..n-1 and ICSR2 that of colours
// n..2n-1, and cell j of both sits in IP(I,j). Both rings shift together, so
// in step k of a Phase 2 subphase IP(I,j) sees colour (I+j+k) mod n in its
// ICSR1 cell and that colour plus n in its ICSR2 cell, and reaches the two
// matching cells of OCSR1/OCSR2 of output group j. With two colours per step
// every colour is offered once in n steps instead of m = 2n-1, so each
// Phase 2 subphase is n steps long and a routing cycle 4n-2 steps.
// Colour 2n-1 does not exist in the network; the PE never offers it (its
// ICSR2 cell is ignored while the counter reads n-1).
//
// The PEs are the same input_pe as in the basic ring, built with two colour
// lanes: up to two CDR tokens are erased and up to two CAR tokens coloured
// per step. Tokens move exactly as in the basic ring (IP(I,j+1) -> IP(I,j)).
//
// Interface: as input_ring, with the cell link signals carrying one bit per
// lane (`c2[j][l]` is the OCSR(l+1) cell reached from IP(I,j)). `icsr` is
// {ICSR2, ICSR1}, 2n bits; `load_val` has the same layout. Two colour lanes
// and the ring organisation follow the document; ignoring colour 2n-1 in
// the PE rather than holding its cell at 0 is this design's choice.
module input_ring_dsr #(
  parameter int unsigned N = 5,
  parameter int unsigned I = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  dpr_pkg::phase_e     phase,
  input  logic [dpr_pkg::COL_W-1:0] step,
  input  logic                shift,
  input  logic                set_all,
  input  logic                load,
  input  logic [2*N-1:0]      load_val,
  input  dpr_pkg::req_t       req [N],
  output dpr_pkg::token_t     res [N],
  input  logic [1:0]          c2    [N],
  output logic [1:0]          c2_we [N],
  output logic [1:0]          c2_wd [N],
  output logic [dpr_pkg::COL_W-1:0] cc [N],
  output logic [2*N-1:0]      icsr,
  output logic [N-1:0]        ev_assign,
  output logic [N-1:0]        ev_erase,
  output logic [N-1:0]        ev_wait
);
  import dpr_pkg::*;

  localparam int unsigned M = 2 * N - 1;

  token_t car_link [N];   // car_link[j]: token sent by IP(I,j)
  token_t cdr_link [N];
  token_t no_pool [N];     // horizontal link, unused in this ring
  token_t pool_unused [N][N];
  always_comb for (int p = 0; p < N; p++) no_pool[p] = TOKEN_NONE;
  logic [N-1:0] c1 [2];   // c1[l][j]: ICSR(l+1) cell j
  logic [N-1:0] we [2];
  logic [N-1:0] wd [2];

  for (genvar l = 0; l < 2; l++) begin : g_csr
    csr_ring #(.M(N), .NA(N)) u_icsr (
      .clk      (clk),
      .rst_n    (rst_n),
      .shift    (shift),
      .set_all  (set_all),
      .load     (load),
      .load_val (load_val[l*N +: N]),
      .we       (we[l]),
      .wd       (wd[l]),
      .pe_cell  (c1[l]),
      .ring     (icsr[l*N +: N])
    );
  end

  for (genvar j = 0; j < N; j++) begin : g_pe
    logic [1:0] pe_we, pe_wd;
    input_pe #(.N(N), .M(M), .I(I), .J(j), .L(2)) u_pe (
      .clk       (clk),
      .rst_n     (rst_n),
      .phase     (phase),
      .step      (step),
      .shift     (shift),
      .req       (req[j]),
      .car_in    (car_link[(j + 1) % N]),
      .cdr_in    (cdr_link[(j + 1) % N]),
      .car_out   (car_link[j]),
      .cdr_out   (cdr_link[j]),
      .c1        ({c1[1][j], c1[0][j]}),
      .c2        (c2[j]),
      .cell_we   (pe_we),
      .cell_wd   (pe_wd),
      .cc        (cc[j]),
      .res       (res[j]),
      .ev_assign (ev_assign[j]),
      .ev_erase  (ev_erase[j]),
      .ev_wait   (ev_wait[j]),
      .pool_load (1'b0),
      .pool_in   (no_pool),
      .pool_out  (pool_unused[j])
    );
    for (genvar l = 0; l < 2; l++) begin : g_lane
      assign we[l][j] = pe_we[l];
      assign wd[l][j] = pe_wd[l];
    end
    assign c2_we[j] = pe_we;
    assign c2_wd[j] = pe_wd;
  end
endmodule
