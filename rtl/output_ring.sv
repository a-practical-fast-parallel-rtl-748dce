// output_ring: output ring OR_J of the DPR architecture (one per output group).
//
// The ring holds the colour state of node v''_J of the I/O mapping graph in
// the M-cell circular shift register OCSR_J: cell i lives in output PE
// OP(J,i), the M-N extra cells in OP(J,N-1). Output PE OP(J,i) is joined to
// input PE IP(i,J) by a one-bit bidirectional link, modelled here as the
// read value `pe_cell[i]` and the write strobe/data `we[i]`/`wd[i]`. OCSR_J
// shifts in step with every ICSR, so the colour in cell i during step k of
// Phase 2 is (J + i + k) mod M, the same colour IP(i,J) is testing.
//
// Each OP also has its own modulo-M circular counter CC2(J,i), started at
// (J + i) mod M and advanced with every shift. Its value always equals the
// counter CC1(i,J) of the linked input PE, so it carries no information of
// its own; it is kept to make the colour of every OCSR cell visible (`cc2`)
// and to let the router check the two counters agree.
module output_ring #(
  parameter int unsigned N = 5,
  parameter int unsigned M = 9,
  parameter int unsigned J = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                reload,
  input  logic                shift,
  input  logic                set_all,
  input  logic                load,
  input  logic [M-1:0]        load_val,
  input  logic [N-1:0]        we,
  input  logic [N-1:0]        wd,
  output logic [N-1:0]        pe_cell,
  output logic [dpr_pkg::COL_W-1:0] cc2 [N],
  output logic [M-1:0]        ocsr
);
  csr_ring #(.M(M), .NA(N)) u_ocsr (
    .clk      (clk),
    .rst_n    (rst_n),
    .shift    (shift),
    .set_all  (set_all),
    .load     (load),
    .load_val (load_val),
    .we       (we),
    .wd       (wd),
    .pe_cell  (pe_cell),
    .ring     (ocsr)
  );

  for (genvar i = 0; i < N; i++) begin : g_op
    circ_counter #(.M(M), .INIT((J + i) % M)) u_cc2 (
      .clk    (clk),
      .rst_n  (rst_n),
      .reload (reload),
      .inc    (shift),
      .q      (cc2[i])
    );
  end
endmodule
