// output_ring_dsr: output ring OR_J with doubled shift registers, for
// C(n, 2n-1, n).
//
// OCSR1 (colours 0..n-1) and OCSR2 (colours n..2n-1) are two n-cell rings
// shifting in step with the ICSRs; cell i of both sits in OP(J,i) and is
// written over the link from IP(i,J). Each OP also keeps the modulo-n
// counter CC2(J,i), initial (J+i) mod n, whose value and value plus n are
// the two colours OP(J,i) holds in the current step. The counters only
// mirror the input side and are kept for checking, as in the basic ring.
//
// Interface: `we[i]`/`wd[i]` carry one bit per lane from IP(i,J);
// `pe_cell[i]` returns the two cells of OP(J,i); `ocsr` is {OCSR2, OCSR1}.
// Writes take effect with the same clock edge as the shift; `reload`
// restarts the counters (PREP). The two-ring organisation follows the
// document; the packing of the two rings into one vector is this design's.
module output_ring_dsr #(
  parameter int unsigned N = 5,
  parameter int unsigned J = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                reload,
  input  logic                shift,
  input  logic                set_all,
  input  logic                load,
  input  logic [2*N-1:0]      load_val,
  input  logic [1:0]          we [N],
  input  logic [1:0]          wd [N],
  output logic [1:0]          pe_cell [N],
  output logic [dpr_pkg::COL_W-1:0] cc2 [N],
  output logic [2*N-1:0]      ocsr
);
  logic [N-1:0] lw [2];
  logic [N-1:0] ld [2];
  logic [N-1:0] lc [2];

  for (genvar i = 0; i < N; i++) begin : g_op
    for (genvar l = 0; l < 2; l++) begin : g_lane
      assign lw[l][i] = we[i][l];
      assign ld[l][i] = wd[i][l];
      assign pe_cell[i][l] = lc[l][i];
    end
    circ_counter #(.M(N), .INIT((J + i) % N)) u_cc2 (
      .clk    (clk),
      .rst_n  (rst_n),
      .reload (reload),
      .inc    (shift),
      .q      (cc2[i])
    );
  end

  for (genvar l = 0; l < 2; l++) begin : g_csr
    csr_ring #(.M(N), .NA(N)) u_ocsr (
      .clk      (clk),
      .rst_n    (rst_n),
      .shift    (shift),
      .set_all  (set_all),
      .load     (load),
      .load_val (load_val[l*N +: N]),
      .we       (lw[l]),
      .wd       (ld[l]),
      .pe_cell  (lc[l]),
      .ring     (ocsr[l*N +: N])
    );
  end
endmodule
