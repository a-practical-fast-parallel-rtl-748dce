// input_port: connection state of one switch input I(i,p).
//
// The input remembers its current connection (output group j, output port q
// inside the group, colour c = middle-stage module) and turns user requests
// into the tokens of the next routing cycle:
//
//   * `add` with (`add_grp`, `add_port`) asks for a connection to O(j,q);
//   * `del` asks to tear the current connection down.
//
// Requests are held until the router's PREP cycle (`req_taken`). There a
// CAR request is issued for a pending add, and a CDR request carrying the
// current (j, c) for a pending delete; an add on an input that is still
// connected also deletes the old connection, so one cycle can both tear down
// and set up, as in the connection/disconnection variant of the algorithm.
// From PREP on, a deleted connection is no longer used. In packet mode every
// connection lasts one routing cycle (one cell slot): it is dropped at PREP
// and no CDR request is needed because the router frees all colours.
//
// When the routed token comes back (`res_valid`), the input stores the colour
// and uses (c, j, q) as the self-routing header of its data. A token that
// comes back uncoloured sets `route_fail` for one cycle and leaves the input
// unconnected. The request interface and all of this bookkeeping are this
// design's own; the router only defines the (p, j, c) tokens.
module input_port #(
  parameter int unsigned N = 5,
  parameter int unsigned M = 9,
  parameter int unsigned P = 0
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       add,
  input  logic [dpr_pkg::IDX_W-1:0]  add_grp,
  input  logic [dpr_pkg::IDX_W-1:0]  add_port,
  input  logic                       del,
  input  logic                       req_taken,
  input  logic                       cycle_packet,
  output dpr_pkg::req_t              req,
  input  logic                       res_valid,
  input  dpr_pkg::token_t            res,
  output logic                       conn_valid,
  output logic [dpr_pkg::IDX_W-1:0]  conn_grp,
  output logic [dpr_pkg::IDX_W-1:0]  conn_port,
  output logic [dpr_pkg::COL_W-1:0]  conn_color,
  output logic                       pending,
  output logic                       route_fail
);
  import dpr_pkg::*;

  logic pend_add, pend_del, wait_res;
  idx_t pend_grp, pend_port, fly_port;

  // Request presented to the router; only looked at during PREP.
  always_comb begin
    req           = '0;
    req.add       = pend_add;
    req.add_grp   = pend_grp;
    req.del       = (pend_add || pend_del) && conn_valid && !cycle_packet;
    req.del_grp   = conn_grp;
    req.del_color = conn_color;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pend_add   <= 1'b0;
      pend_del   <= 1'b0;
      pend_grp   <= '0;
      pend_port  <= '0;
      fly_port   <= '0;
      wait_res   <= 1'b0;
      conn_valid <= 1'b0;
      conn_grp   <= '0;
      conn_port  <= '0;
      conn_color <= '0;
      route_fail <= 1'b0;
    end else begin
      route_fail <= 1'b0;
      if (req_taken) begin
        wait_res <= pend_add;
        fly_port <= pend_port;
        if (pend_add || pend_del || cycle_packet) conn_valid <= 1'b0;
        pend_add <= 1'b0;
        pend_del <= 1'b0;
      end
      if (add) begin
        pend_add  <= 1'b1;
        pend_grp  <= add_grp;
        pend_port <= add_port;
      end
      if (del) pend_del <= 1'b1;
      if (res_valid && wait_res) begin
        wait_res <= 1'b0;
        if (res.valid && res.colored) begin
          conn_valid <= 1'b1;
          conn_grp   <= res.grp;
          conn_port  <= fly_port;
          conn_color <= res.color;
        end else begin
          route_fail <= 1'b1;
        end
      end
    end
  end

  assign pending = pend_add || pend_del || wait_res;

  // A returned token belongs to this input.
  always_ff @(posedge clk) begin
    if (rst_n && res_valid && wait_res && res.valid)
      assert (res.src == idx_t'(P) && !res.del)
        else $error("input_port %0d: foreign token returned", P);
  end

  initial begin
    assert (N >= 2 && M >= N && P < N) else $error("input_port: parameters out of range");
  end
endmodule
