// input_pe: input processing element IP(I,J) of input ring IR_I.
//
// The PE plays two roles. As the origin of input I(I,J) it turns that input's
// request into tokens at the start of a routing cycle and collects the routed
// CAR token at the end. As the agent for output group J it colours every edge
// from input group I to output group J:
//
//   PREP    a CAR token (J, j, -) and/or a CDR token (J, j, c)# are formed.
//           A token whose agent is this PE stays here, the others are put
//           in the transit register of their lane.
//   DIST    every transit token moves one hop to IP(I,J-1) per step; a token
//           arriving at its agent is stored in the agent's pool. All transit
//           tokens move in lock step, so one register per lane is enough.
//   ERASE   a stored CDR token whose colour equals the counter CC marks that
//           colour free again in both cells (own ICSR cell c' and the OCSR
//           cell c'' reached over the IP-OP link) and is discarded.
//   ASSIGN  if c' AND c'' is 1 and an uncoloured CAR token is stored, the
//           token takes the counter value as its colour and both cells are
//           cleared. The token picked is the one with the lowest origin.
//   RETURN  in step k (1..n-1) the PE sends on the token whose remaining
//           distance to its origin is n-k: either the token in transit or
//           the stored token from origin (J+k) mod n. Each token thus leaves
//           just in time to reach home at step n-1, one hop per step, and no
//           two tokens ever need the same link.
//
// With L = 2 (doubled shift registers, m = 2n-1) the counter runs modulo n
// and the PE sees two cell pairs per step: lane 0 holds colour CC, lane 1
// colour CC + n. Both lanes are erased and assigned in the same step, so two
// tokens can be handled at once; the uncoloured CAR tokens are taken in
// origin order and each takes the first free lane. Colour 2n-1 does not
// exist and is never offered. The document leaves the two-token logic open;
// this ordering is this design's choice.
//
// In the overlapped rings each phase has its own ring of PEs. `pool_load`
// then replaces the CAR pool by `pool_in`, the pool handed over by the same
// PE position of the previous phase's ring (clearing everything else), and
// `pool_out` offers this PE's pool including the update of the current
// clock. In the basic rings `pool_load` is tied low.
//
// The pools hold one slot per origin p, since in a (partial) permutation
// every input issues at most one CAR and one CDR token. Picking from the pool
// is a priority encoder, so each step takes one clock.
//
// Interface: `req` is sampled in PREP. `car_in`/`cdr_in` come from
// IP(I,J+1), `car_out`/`cdr_out` go to IP(I,J-1). `c1` and `c2` are the
// current values of c'(I,J) and c''(J,I), one bit per lane; `cell_we`/`cell_wd` update both in
// the same clock edge as the ring shift. `cc` is the colour counter, `res` the
// routed token of this input, valid from the end of RETURN until the next
// PREP. `ev_assign`, `ev_erase` and `ev_wait` flag a colour assignment, an
// erase, and an uncoloured token that could not be coloured in this step.
module input_pe #(
  parameter int unsigned N = 5,
  parameter int unsigned M = 9,
  parameter int unsigned I = 0,
  parameter int unsigned J = 0,
  parameter int unsigned L = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  dpr_pkg::phase_e     phase,
  input  logic [dpr_pkg::COL_W-1:0] step,
  input  logic                shift,
  input  dpr_pkg::req_t       req,
  input  dpr_pkg::token_t     car_in,
  input  dpr_pkg::token_t     cdr_in,
  output dpr_pkg::token_t     car_out,
  output dpr_pkg::token_t     cdr_out,
  input  logic [L-1:0]        c1,
  input  logic [L-1:0]        c2,
  output logic [L-1:0]        cell_we,
  output logic [L-1:0]        cell_wd,
  output logic [dpr_pkg::COL_W-1:0] cc,
  output dpr_pkg::token_t     res,
  output logic                ev_assign,
  output logic                ev_erase,
  output logic                ev_wait,
  // horizontal link of the overlapped rings: load the CAR pool from the
  // previous stage's PE, and the pool as it will be after this clock
  input  logic                pool_load,
  input  dpr_pkg::token_t     pool_in  [N],
  output dpr_pkg::token_t     pool_out [N]
);
  import dpr_pkg::*;

  localparam idx_t MY_J = idx_t'(J);
  localparam int unsigned PW = $clog2(N);   // pool slot index width
  localparam int unsigned CM = (M + L - 1) / L;   // colours per lane

  // Colour offered on lane l in this step; a lane whose colour would be
  // m or more (colour 2n-1 of the doubled scheme) is never available.
  color_t lane_col [L];
  logic [L-1:0] lane_ok;
  always_comb
    for (int l = 0; l < L; l++) begin
      lane_col[l] = color_t'(int'(cc) + l * CM);
      lane_ok[l]  = (int'(cc) + l * CM) < M;
    end

  token_t car_pool [N];
  token_t cdr_pool [N];
  token_t car_tr, cdr_tr, home;

  token_t car_pool_n [N];
  token_t cdr_pool_n [N];
  token_t car_tr_n, cdr_tr_n, home_n;

  // Colour counter CC(I,J): (I+J) mod m at the start of every Phase 2(.x),
  // modulo n with two lanes.
  circ_counter #(.M(CM), .INIT((I + J) % CM)) u_cc (
    .clk    (clk),
    .rst_n  (rst_n),
    .reload (phase == PH_PREP),
    .inc    (shift),
    .q      (cc)
  );

  // Slot of the pool token that leaves in RETURN step `step`.
  logic [PW-1:0] ret_slot;
  always_comb ret_slot = PW'((J + int'(step)) % N);

  always_comb begin
    token_t t;
    logic   found;
    logic [L-1:0] used;
    car_pool_n = car_pool;
    cdr_pool_n = cdr_pool;
    car_tr_n   = car_tr;
    cdr_tr_n   = cdr_tr;
    home_n     = home;
    car_out    = TOKEN_NONE;
    cdr_out    = TOKEN_NONE;
    cell_we    = '0;
    cell_wd    = '0;
    used       = '0;
    ev_assign  = 1'b0;
    ev_erase   = 1'b0;
    ev_wait    = 1'b0;
    found      = 1'b0;
    t          = TOKEN_NONE;

    unique case (phase)
      PH_PREP: begin
        for (int p = 0; p < N; p++) begin
          car_pool_n[p] = TOKEN_NONE;
          cdr_pool_n[p] = TOKEN_NONE;
        end
        car_tr_n = TOKEN_NONE;
        cdr_tr_n = TOKEN_NONE;
        home_n   = TOKEN_NONE;
        if (req.add) begin
          t = '{valid: 1'b1, del: 1'b0, src: MY_J, grp: req.add_grp,
                colored: 1'b0, color: '0};
          if (req.add_grp == MY_J) car_pool_n[J] = t;
          else                     car_tr_n      = t;
        end
        if (req.del) begin
          t = '{valid: 1'b1, del: 1'b1, src: MY_J, grp: req.del_grp,
                colored: 1'b1, color: req.del_color};
          if (req.del_grp == MY_J) cdr_pool_n[J] = t;
          else                     cdr_tr_n      = t;
        end
      end

      PH_DIST: begin
        car_out  = car_tr;
        cdr_out  = cdr_tr;
        car_tr_n = TOKEN_NONE;
        cdr_tr_n = TOKEN_NONE;
        if (car_in.valid) begin
          if (car_in.grp == MY_J) car_pool_n[car_in.src[PW-1:0]] = car_in;
          else                    car_tr_n = car_in;
        end
        if (cdr_in.valid) begin
          if (cdr_in.grp == MY_J) cdr_pool_n[cdr_in.src[PW-1:0]] = cdr_in;
          else                    cdr_tr_n = cdr_in;
        end
      end

      PH_ERASE: begin
        for (int l = 0; l < L; l++) begin
          found = 1'b0;
          for (int p = 0; p < N; p++) begin
            if (!found && lane_ok[l] && cdr_pool[p].valid &&
                cdr_pool[p].color == lane_col[l]) begin
              found         = 1'b1;
              cdr_pool_n[p] = TOKEN_NONE;
            end
          end
          cell_we[l] = found;
          cell_wd[l] = 1'b1;
          if (found) ev_erase = 1'b1;
        end
      end

      PH_ASSIGN: begin
        // Uncoloured CAR tokens in origin order; each takes the first lane
        // that is free at both ends and not yet taken in this step.
        for (int p = 0; p < N; p++) begin
          if (car_pool[p].valid && !car_pool[p].colored) begin
            found = 1'b0;
            for (int l = 0; l < L; l++) begin
              if (!found && !used[l] && lane_ok[l] && c1[l] && c2[l]) begin
                found   = 1'b1;
                used[l] = 1'b1;
                car_pool_n[p].colored = 1'b1;
                car_pool_n[p].color   = lane_col[l];
                cell_we[l] = 1'b1;
                cell_wd[l] = 1'b0;
                ev_assign  = 1'b1;
              end
            end
            if (!found) ev_wait = 1'b1;
          end
        end
        // A wait is a step in which tokens were waiting and none was coloured.
        if (ev_assign) ev_wait = 1'b0;
      end

      PH_RETURN: begin
        // The token staying at home (distance 0) is collected in step 1.
        if (step == color_t'(1) && car_pool[J].valid) begin
          home_n           = car_pool[J];
          car_pool_n[J]    = TOKEN_NONE;
        end
        if (car_tr.valid) begin
          car_out = car_tr;
        end else if (car_pool[ret_slot].valid) begin
          car_out                = car_pool[ret_slot];
          car_pool_n[ret_slot]   = TOKEN_NONE;
        end
        car_tr_n = TOKEN_NONE;
        if (car_in.valid) begin
          if (car_in.src == MY_J) home_n   = car_in;
          else                    car_tr_n = car_in;
        end
      end

      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < N; p++) begin
        car_pool[p] <= TOKEN_NONE;
        cdr_pool[p] <= TOKEN_NONE;
      end
      car_tr <= TOKEN_NONE;
      cdr_tr <= TOKEN_NONE;
      home   <= TOKEN_NONE;
    end else if (pool_load) begin
      car_pool <= pool_in;
      for (int p = 0; p < N; p++) cdr_pool[p] <= TOKEN_NONE;
      car_tr <= TOKEN_NONE;
      cdr_tr <= TOKEN_NONE;
      home   <= TOKEN_NONE;
    end else begin
      car_pool <= car_pool_n;
      cdr_pool <= cdr_pool_n;
      car_tr   <= car_tr_n;
      cdr_tr   <= cdr_tr_n;
      home     <= home_n;
    end
  end

  assign res = home;
  assign pool_out = car_pool_n;

  // In RETURN a transit token and the scheduled pool token never coexist.
  always_ff @(posedge clk) begin
    if (rst_n && phase == PH_RETURN)
      assert (!(car_tr.valid && car_pool[ret_slot].valid && ret_slot != PW'(J)))
        else $error("input_pe(%0d,%0d): two tokens scheduled on one link", I, J);
  end

  initial begin
    assert (N >= 2 && N <= MAX_N && J < N && I < N && M <= MAX_M)
      else $error("input_pe: parameters out of range");
  end
endmodule
