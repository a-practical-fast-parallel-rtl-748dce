// tb_input_ring_dsr: checks the doubled-shift-register input ring IR_1 of
// C(5,9,5) with the routing-cycle sequencer (5-step colour subphases)
// driving it and the testbench standing in for the two OCSRs of each of the
// five output groups (one "free" bit per output group and colour, read and
// written over the two IP-OP links of each PE).
//   Cycle 1 starts from the worked example of the basic ring: inputs
//   I(1,0..4) ask for groups 4, 3, 0, 1, 0 while only colours {1,3,4,7,8}
//   are free at the output groups; the tokens must return with colours
//   8, 4, 1, 7, 3. Colour 9 is also marked free at the
//   outputs: it does not exist and must never be handed out.
//   Then at least 29 cycles (more until both double events were seen) add, delete and replace connections at random, with many
//   requests aimed at group 0 so that one PE often colours or erases two
//   tokens in one step.
// Every cycle is compared with a reference model of the two-colours-per-step
// colouring on plain arrays, including both ICSRs after the cycle and the
// time from PREP to RESULT (4N - 1 clocks). Steps in which a PE assigned
// two colours, and in which it erased two, must both occur.
module tb_input_ring_dsr;
  import dpr_pkg::*;
  localparam int N = 5, M = 9, I = 1, W = 2 * N;
  logic clk = 0, rst_n = 0, run = 0;
  phase_e phase;
  logic [COL_W-1:0] step;
  logic shift, set_all, mode;
  req_t   req [N];
  token_t res [N];
  logic [1:0] c2 [N];
  logic [1:0] c2_we [N];
  logic [1:0] c2_wd [N];
  logic [N-1:0] ev_assign, ev_erase, ev_wait;
  logic [COL_W-1:0] cc [N];
  logic [W-1:0] icsr;
  int checks = 0, failures = 0;
  int n_dual_assign = 0, n_dual_erase = 0;

  dpr_ctrl #(.N(N), .M(N)) u_ctrl (.clk, .rst_n, .run, .packet_mode(1'b0),
                                   .phase, .step, .shift, .set_all, .mode);
  input_ring_dsr #(.N(N), .I(I)) dut (.clk, .rst_n, .phase, .step, .shift, .set_all,
    .load(1'b0), .load_val('1), .req, .res, .c2, .c2_we, .c2_wd, .cc, .icsr,
    .ev_assign, .ev_erase, .ev_wait);

  always #5 clk = ~clk;

  // Output-group colour state seen over the links (environment).
  bit ofree [N][W];
  always_comb
    for (int j = 0; j < N; j++)
      for (int l = 0; l < 2; l++) c2[j][l] = ofree[j][int'(cc[j]) + l * N];
  always_ff @(posedge clk)
    for (int j = 0; j < N; j++) begin
      for (int l = 0; l < 2; l++)
        if (c2_we[j][l]) ofree[j][int'(cc[j]) + l * N] <= c2_wd[j][l];
      if (c2_we[j] == 2'b11 && c2_wd[j] == 2'b00) n_dual_assign++;
      if (c2_we[j] == 2'b11 && c2_wd[j] == 2'b11) n_dual_erase++;
    end

  // Reference model.
  bit m1 [W];
  bit m2 [N][W];
  bit cv [N]; int cj [N]; int ccol [N];
  bit radd [N]; int rgrp [N]; bit rdel [N];
  int expc [N];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic model();
    bit done [N];
    for (int p = 0; p < N; p++) begin
      done[p] = 0; expc[p] = -1;
      if (rdel[p]) begin m1[ccol[p]] = 1; m2[cj[p]][ccol[p]] = 1; cv[p] = 0; end
    end
    // step k: PE j is offered colours (I+j+k) mod n and that plus n (if
    // below m); uncoloured tokens in origin order take the first offered
    // colour free at both ends and not yet taken in this step
    for (int k = 0; k < N; k++)
      for (int j = 0; j < N; j++) begin
        bit taken [2];
        taken = '{0, 0};
        for (int p = 0; p < N; p++)
          if (radd[p] && rgrp[p] == j && !done[p])
            for (int l = 0; l < 2; l++) begin
              int c = (I + j + k) % N + l * N;
              if (!done[p] && !taken[l] && c < M && m1[c] && m2[j][c]) begin
                m1[c] = 0; m2[j][c] = 0; done[p] = 1; expc[p] = c; taken[l] = 1;
                cv[p] = 1; cj[p] = j; ccol[p] = c;
              end
            end
      end
  endtask

  task automatic cycle();
    longint t0, t1;
    for (int p = 0; p < N; p++) begin
      req[p] = '0;
      req[p].add = radd[p]; req[p].add_grp = idx_t'(rgrp[p]);
      req[p].del = rdel[p]; req[p].del_grp = idx_t'(cj[p]); req[p].del_color = color_t'(ccol[p]);
    end
    run = 1;
    @(negedge clk);
    while (phase != PH_PREP) @(negedge clk);
    t0 = $time / 10;
    run = 0;
    while (phase != PH_RESULT) @(negedge clk);
    t1 = $time / 10;
    check(t1 - t0 == 4*N - 1, $sformatf("cycle took %0d clocks", t1 - t0));
    model();
    for (int p = 0; p < N; p++)
      if (radd[p])
        check(res[p].valid && int'(res[p].src) == p && int'(res[p].grp) == rgrp[p] &&
              res[p].colored == (expc[p] >= 0) && (expc[p] < 0 || int'(res[p].color) == expc[p]),
              $sformatf("token of I(1,%0d): colour %0d expected %0d", p, res[p].color, expc[p]));
      else check(!res[p].valid, $sformatf("I(1,%0d) unexpected token", p));
    @(negedge clk);
    for (int l = 0; l < 2; l++)
      for (int pos = 0; pos < N; pos++)
        check(icsr[l*N + pos] == m1[l*N + (I + pos) % N], $sformatf("ICSR%0d_1 cell %0d", l + 1, pos));
    for (int j = 0; j < N; j++) for (int c = 0; c < W; c++)
      check(ofree[j][c] == m2[j][c], $sformatf("output group %0d colour %0d", j, c));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp [N];
    for (int c = 0; c < W; c++) m1[c] = 1;
    for (int j = 0; j < N; j++) for (int c = 0; c < W; c++) begin
      ofree[j][c] = (c == 1 || c == 3 || c == 4 || c == 7 || c == 8 || c == 9);
      m2[j][c] = ofree[j][c];
    end
    for (int p = 0; p < N; p++) begin cv[p] = 0; cj[p] = 0; ccol[p] = 0; rdel[p] = 0; radd[p] = 1; end
    rgrp = '{4, 3, 0, 1, 0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    cycle();
    // worked by hand: step 0 gives 1 to (2,0,-), 7 to (3,1,-), 4 to (1,3,-);
    // step 2 gives 3 to (4,0,-); step 3 gives 8 to (0,4,-)
    exp = '{8, 4, 1, 7, 3};
    for (int p = 0; p < N; p++)
      check(res[p].colored && int'(res[p].color) == exp[p], $sformatf("example: I(1,%0d) colour %0d", p, res[p].color));
    for (int t = 0; t < 29 || ((n_dual_erase == 0 || n_dual_assign == 0) && t < 400); t++) begin
      for (int p = 0; p < N; p++) begin
        rdel[p] = cv[p] && ($urandom_range(1) == 1);
        radd[p] = (!cv[p] || rdel[p]) && ($urandom_range(2) != 0);
        rgrp[p] = $urandom_range(1) ? 0 : $urandom_range(N - 1);
      end
      if (t == 0) begin rdel[2] = cv[2]; radd[2] = 1; rgrp[2] = 2; end
      cycle();
    end
    $display("dual assign steps=%0d dual erase steps=%0d", n_dual_assign, n_dual_erase);
    check(n_dual_assign > 0, "two colours assigned in one step");
    check(n_dual_erase > 0, "two colours erased in one step");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
