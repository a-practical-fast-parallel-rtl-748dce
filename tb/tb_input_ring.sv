// tb_input_ring: checks input ring IR_1 of C(5,9,5) with the routing-cycle
// sequencer driving it and the testbench standing in for the five output
// rings (one "free" bit per output group and colour, read and written over
// the IP-OP links).
//   Cycle 1 is the worked example: inputs I(1,0..4) ask for groups
//   4, 3, 0, 1, 0 while only colours {1,3,4,7,8} are free at the output
//   groups; the tokens must return with colours 7, 4, 1, 3, 8.
//   Cycles 2-6 add, delete and replace connections at random.
// Every cycle is compared with a reference model of the colouring on plain
// arrays (Color1 of group 1, Color2 of all groups), including the ICSR after
// the cycle and the time from PREP to RESULT (2N + 2M - 1 clocks).
module tb_input_ring;
  import dpr_pkg::*;
  localparam int N = 5, M = 9, I = 1;
  logic clk = 0, rst_n = 0, run = 0;
  phase_e phase;
  logic [COL_W-1:0] step;
  logic shift, set_all, mode;
  req_t   req [N];
  token_t res [N];
  logic [N-1:0] c2, c2_we, c2_wd, ev_assign, ev_erase, ev_wait;
  logic [COL_W-1:0] cc [N];
  logic [M-1:0] icsr;
  int checks = 0, failures = 0;

  dpr_ctrl #(.N(N), .M(M)) u_ctrl (.clk, .rst_n, .run, .packet_mode(1'b0),
                                   .phase, .step, .shift, .set_all, .mode);
  input_ring #(.N(N), .M(M), .I(I)) dut (.clk, .rst_n, .phase, .step, .shift, .set_all,
    .load(1'b0), .load_val('1), .req, .res, .c2, .c2_we, .c2_wd, .cc, .icsr,
    .ev_assign, .ev_erase, .ev_wait);

  always #5 clk = ~clk;

  // Output-group colour state seen over the links (environment).
  bit ofree [N][M];
  always_comb for (int j = 0; j < N; j++) c2[j] = ofree[j][cc[j]];
  always_ff @(posedge clk)
    for (int j = 0; j < N; j++) if (c2_we[j]) ofree[j][cc[j]] <= c2_wd[j];

  // Reference model.
  bit m1 [M];
  bit m2 [N][M];
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
    for (int k = 0; k < M; k++)
      for (int j = 0; j < N; j++) begin
        int c = (I + j + k) % M;
        for (int p = 0; p < N; p++)
          if (radd[p] && rgrp[p] == j && !done[p]) begin
            if (m1[c] && m2[j][c]) begin
              m1[c] = 0; m2[j][c] = 0; done[p] = 1; expc[p] = c;
              cv[p] = 1; cj[p] = j; ccol[p] = c;
            end
            break;
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
    check(t1 - t0 == 2*N + 2*M - 1, $sformatf("cycle took %0d clocks", t1 - t0));
    model();
    for (int p = 0; p < N; p++)
      if (radd[p])
        check(res[p].valid && int'(res[p].src) == p && int'(res[p].grp) == rgrp[p] &&
              res[p].colored == (expc[p] >= 0) && (expc[p] < 0 || int'(res[p].color) == expc[p]),
              $sformatf("token of I(1,%0d): colour %0d expected %0d", p, res[p].color, expc[p]));
      else check(!res[p].valid, $sformatf("I(1,%0d) unexpected token", p));
    @(negedge clk);
    for (int pos = 0; pos < M; pos++)
      check(icsr[pos] == m1[(I + pos) % M], $sformatf("ICSR_1 cell %0d", pos));
    for (int j = 0; j < N; j++) for (int c = 0; c < M; c++)
      check(ofree[j][c] == m2[j][c], $sformatf("output group %0d colour %0d", j, c));
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp [N];
    for (int c = 0; c < M; c++) m1[c] = 1;
    for (int j = 0; j < N; j++) for (int c = 0; c < M; c++) begin
      ofree[j][c] = (c == 1 || c == 3 || c == 4 || c == 7 || c == 8);
      m2[j][c] = ofree[j][c];
    end
    for (int p = 0; p < N; p++) begin cv[p] = 0; cj[p] = 0; ccol[p] = 0; rdel[p] = 0; radd[p] = 1; end
    rgrp = '{4, 3, 0, 1, 0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    cycle();
    exp = '{7, 4, 1, 3, 8};
    for (int p = 0; p < N; p++)
      check(int'(res[p].color) == exp[p], $sformatf("example: I(1,%0d) colour %0d", p, res[p].color));
    for (int t = 0; t < 5; t++) begin
      for (int p = 0; p < N; p++) begin
        rdel[p] = cv[p] && ($urandom_range(1) == 1);
        radd[p] = (!cv[p] || rdel[p]) && ($urandom_range(2) != 0);
        rgrp[p] = $urandom_range(N - 1);
      end
      if (t == 0) begin rdel[2] = cv[2]; radd[2] = 1; rgrp[2] = 2; end
      cycle();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
