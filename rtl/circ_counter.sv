// circ_counter: modulo-M circular counter CC of one processing element.
//
// In the DPR architecture every input PE IP(i,j) (and, for analysis, every
// output PE) owns a counter whose value is the colour currently sitting in
// that PE's cell of the circular shift register. The counter starts at
// (i + j) mod m and advances by one on every step of Phase 2, wrapping from
// m-1 to 0, so in step k of Phase 2 it holds (i + j + k) mod m, the colour the
// algorithm tries for edges between input group i and output group j.
//
// Interface: `inc` advances the counter at the next clock edge; `reload`
// (higher priority) returns it to INIT. Reset (active low, synchronous)
// also loads INIT. `q` is the registered value.
module circ_counter #(
  parameter int unsigned M    = 9,
  parameter int unsigned INIT = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 reload,
  input  logic                 inc,
  output logic [dpr_pkg::COL_W-1:0] q
);
  import dpr_pkg::*;

  localparam color_t INIT_C = color_t'(INIT % M);
  localparam color_t LAST   = color_t'(M - 1);

  always_ff @(posedge clk) begin
    if (!rst_n || reload) q <= INIT_C;
    else if (inc)         q <= (q == LAST) ? '0 : q + color_t'(1);
  end

  initial begin
    assert (M >= 1 && M <= MAX_M) else $error("circ_counter: M out of range");
  end
endmodule
