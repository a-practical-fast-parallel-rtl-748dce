// csr_ring: Boolean circular shift register of M cells (an ICSR or OCSR).
//
// Cell k holds 1 when a colour is still free at the graph node the ring
// belongs to. Cells 0..NA-1 sit one in each of the NA processing elements of
// the ring and can be read and written by that PE; cells NA..M-1 are the M-NA
// extra cells kept in the last PE. A shift moves every cell one place toward
// index 0 (cell k takes the value of cell k+1, cell M-1 takes cell 0), which
// is the direction that makes the colour seen by PE j go from (base+j+k) to
// (base+j+k+1) mod M, in step with that PE's circular counter. After M shifts
// every colour is back in the cell it started in.
//
// Per step, a PE may overwrite its own cell (`we`/`wd`); the write is applied
// to the value before the shift, so a cleared or set bit moves on with the
// ring in the same clock edge. `set_all` makes every colour free (the
// tear-down used for slotted packet switching), `load` replaces the whole
// ring with `load_val`; load has priority over set_all, which has priority
// over writes and the shift. Reset (synchronous, active low) frees all
// colours. `pe_cell` gives cells 0..NA-1, `ring` the whole ring, bit k being
// cell k.
module csr_ring #(
  parameter int unsigned M  = 9,
  parameter int unsigned NA = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          shift,
  input  logic          set_all,
  input  logic          load,
  input  logic [M-1:0]  load_val,
  input  logic [NA-1:0] we,
  input  logic [NA-1:0] wd,
  output logic [NA-1:0] pe_cell,
  output logic [M-1:0]  ring
);
  logic [M-1:0] r, w;

  always_comb begin
    w = r;
    for (int k = 0; k < NA; k++)
      if (we[k]) w[k] = wd[k];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)       r <= '1;
    else if (load)    r <= load_val;
    else if (set_all) r <= '1;
    else if (shift)   r <= {w[0], w[M-1:1]};
    else              r <= w;
  end

  assign pe_cell  = r[NA-1:0];
  assign ring = r;

  initial begin
    assert (NA >= 1 && M >= NA && M >= 2) else $error("csr_ring: need M >= NA >= 1, M >= 2");
  end
endmodule
