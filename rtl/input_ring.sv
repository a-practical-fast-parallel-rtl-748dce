// input_ring: input ring IR_I of the DPR architecture (one per input group).
//
// N input PEs IP(I,0..N-1) are linked in a unidirectional ring, IP(I,j)
// sending to IP(I,(j-1) mod N), with one CAR lane and one CDR lane per link.
// The ring's colour state for node v'_I of the I/O mapping graph is the
// M-cell circular shift register ICSR_I: cell j lives in IP(I,j), the M-N
// extra cells in IP(I,N-1). Each PE also reaches cell c''(j,I) of output ring
// OR_j over its one-bit link (`c2`, `c2_we`, `c2_wd`); a PE always writes
// the same value to its own ICSR cell and to that OCSR cell.
//
// Control (`phase`, `step`, `shift`, `set_all`) comes from the common
// sequencer; `load`/`load_val` preset ICSR_I, e.g. with the state of
// connections that already exist. `req[p]` is the request of input I(I,p),
// sampled in PREP; `res[p]` is its routed token after RETURN. `icsr` shows
// the shift register, `cc` the PEs' colour counters and `ev_*` the per-PE
// event flags (see input_pe).
module input_ring #(
  parameter int unsigned N = 5,
  parameter int unsigned M = 9,
  parameter int unsigned I = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  dpr_pkg::phase_e     phase,
  input  logic [dpr_pkg::COL_W-1:0] step,
  input  logic                shift,
  input  logic                set_all,
  input  logic                load,
  input  logic [M-1:0]        load_val,
  input  dpr_pkg::req_t       req [N],
  output dpr_pkg::token_t     res [N],
  input  logic [N-1:0]        c2,
  output logic [N-1:0]        c2_we,
  output logic [N-1:0]        c2_wd,
  output logic [dpr_pkg::COL_W-1:0] cc [N],
  output logic [M-1:0]        icsr,
  output logic [N-1:0]        ev_assign,
  output logic [N-1:0]        ev_erase,
  output logic [N-1:0]        ev_wait
);
  import dpr_pkg::*;

  token_t car_link [N];   // car_link[j]: token sent by IP(I,j)
  token_t cdr_link [N];
  token_t no_pool [N];     // horizontal link, unused in this ring
  token_t pool_unused [N][N];
  always_comb for (int p = 0; p < N; p++) no_pool[p] = TOKEN_NONE;
  logic [N-1:0] c1, we, wd;

  csr_ring #(.M(M), .NA(N)) u_icsr (
    .clk      (clk),
    .rst_n    (rst_n),
    .shift    (shift),
    .set_all  (set_all),
    .load     (load),
    .load_val (load_val),
    .we       (we),
    .wd       (wd),
    .pe_cell  (c1),
    .ring     (icsr)
  );

  for (genvar j = 0; j < N; j++) begin : g_pe
    input_pe #(.N(N), .M(M), .I(I), .J(j)) u_pe (
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
      .c1        (c1[j]),
      .c2        (c2[j]),
      .cell_we   (we[j]),
      .cell_wd   (wd[j]),
      .cc        (cc[j]),
      .res       (res[j]),
      .ev_assign (ev_assign[j]),
      .ev_erase  (ev_erase[j]),
      .ev_wait   (ev_wait[j]),
      .pool_load (1'b0),
      .pool_in   (no_pool),
      .pool_out  (pool_unused[j])
    );
  end

  assign c2_we = we;
  assign c2_wd = wd;
endmodule
