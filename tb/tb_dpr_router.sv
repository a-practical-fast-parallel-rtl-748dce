// tb_dpr_router: self-checking test of the DPR router C(N, M, N).
//
// 1. The worked example of input ring IR_1 of C(5, 9, 5): inputs I(1,0..4)
//    ask for output groups 4, 3, 0, 1, 0, every OCSR is preset so that only
//    colours {1, 3, 4, 7, 8} are free at the output groups, and the five
//    tokens must come back as (0,4,7), (1,3,4), (2,0,1), (3,1,3), (4,0,8).
// 2. Random traffic in circuit mode (additions, deletions, and both at one
//    input) and in packet mode (fresh permutations), compared with a
//    reference model of the colouring algorithm written on plain arrays:
//    Color1[i][c], Color2[j][c] and, in step k, pair (i,j) trying colour
//    (i+j+k) mod M for its lowest-numbered uncoloured edge.
// Checked: every returned token (presence, origin, group, colour), the
// colour state of every ICSR and OCSR after each cycle, and the cycle count
// of a routing cycle: 2N+2M-2 steps (2N+M-2 in packet mode) plus PREP.
module tb_dpr_router;
  import dpr_pkg::*;

  localparam int N = 5;
  localparam int M = 9;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic run = 1'b0;
  logic packet_mode = 1'b0;
  req_t   req [N][N];
  token_t res [N][N];
  logic   req_taken, res_valid, load, cycle_packet;
  logic [M-1:0] icsr_load [N];
  logic [M-1:0] ocsr_load [N];
  logic [M-1:0] icsr [N];
  logic [M-1:0] ocsr [N];
  phase_e phase;
  logic [N-1:0] ev_assign [N];
  logic [N-1:0] ev_erase [N];
  logic [N-1:0] ev_wait [N];

  dpr_router #(.N(N), .M(M)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, ncyc = 0;
  int n_assign = 0, n_erase = 0, n_wait = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (cycle %0d): %s", ncyc, what);
    end
  endtask

  always @(negedge clk) begin
    for (int i = 0; i < N; i++) begin
      n_assign += $countones(ev_assign[i]);
      n_erase  += $countones(ev_erase[i]);
      n_wait   += $countones(ev_wait[i]);
    end
  end

  // ---------------- reference model ----------------
  bit c1m [N][M];   // colour free at input group
  bit c2m [N][M];   // colour free at output group
  bit cv  [N][N];   // input (i,p) connected
  int cj  [N][N];   // its output group
  int cc  [N][N];   // its colour
  bit ou  [N][N];   // output (j,q) in use
  int cq  [N][N];   // its output port
  // requests of the current cycle
  bit radd [N][N];
  int rgrp [N][N];
  int rport[N][N];
  bit rdel [N][N];
  int exp_col [N][N];

  task automatic model_reset();
    for (int g = 0; g < N; g++) for (int c = 0; c < M; c++) begin
      c1m[g][c] = 1; c2m[g][c] = 1;
    end
    for (int i = 0; i < N; i++) for (int p = 0; p < N; p++) begin
      cv[i][p] = 0; ou[i][p] = 0;
    end
  endtask

  // Apply one routing cycle to the model; exp_col = -1 for "uncoloured".
  task automatic model_cycle(input bit pkt);
    bit done [N][N];
    if (pkt) begin
      model_reset();
    end else begin
      for (int i = 0; i < N; i++) for (int p = 0; p < N; p++)
        if (rdel[i][p]) begin
          c1m[i][cc[i][p]] = 1;
          c2m[cj[i][p]][cc[i][p]] = 1;
          ou[cj[i][p]][cq[i][p]] = 0;
          cv[i][p] = 0;
        end
    end
    for (int i = 0; i < N; i++) for (int p = 0; p < N; p++) begin
      done[i][p] = 0;
      exp_col[i][p] = -1;
    end
    for (int k = 0; k < M; k++)
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          int c = (i + j + k) % M;
          for (int p = 0; p < N; p++)
            if (radd[i][p] && rgrp[i][p] == j && !done[i][p]) begin
              if (c1m[i][c] && c2m[j][c]) begin
                c1m[i][c] = 0; c2m[j][c] = 0;
                done[i][p] = 1; exp_col[i][p] = c;
                cv[i][p] = 1; cj[i][p] = j; cc[i][p] = c; cq[i][p] = rport[i][p];
                ou[j][rport[i][p]] = 1;
              end
              break;   // only the lowest uncoloured edge of E(i,j) tries
            end
        end
  endtask

  // ---------------- driving ----------------
  task automatic drive_reqs();
    for (int i = 0; i < N; i++) for (int p = 0; p < N; p++) begin
      req[i][p] = '0;
      req[i][p].add       = radd[i][p];
      req[i][p].add_grp   = idx_t'(rgrp[i][p]);
      req[i][p].del       = rdel[i][p];
      req[i][p].del_grp   = idx_t'(cv[i][p] ? cj[i][p] : 0);
      req[i][p].del_color = color_t'(cv[i][p] ? cc[i][p] : 0);
    end
  endtask

  task automatic run_cycle(input bit pkt);
    longint t0, t1;
    packet_mode = pkt;
    drive_reqs();
    run = 1'b1;
    @(negedge clk);
    while (!req_taken) @(negedge clk);
    t0 = $time / 10;
    run = 1'b0;
    @(negedge clk);
    while (!res_valid) @(negedge clk);
    t1 = $time / 10;
    check(t1 - t0 == (pkt ? 2*N + M - 2 + 1 : 2*N + 2*M - 2 + 1),
          $sformatf("routing cycle took %0d clocks", t1 - t0));
    model_cycle(pkt);
    ncyc++;
    for (int i = 0; i < N; i++) for (int p = 0; p < N; p++) begin
      if (radd[i][p]) begin
        check(res[i][p].valid && !res[i][p].del && int'(res[i][p].src) == p &&
              int'(res[i][p].grp) == rgrp[i][p], $sformatf("token of I(%0d,%0d) missing", i, p));
        if (exp_col[i][p] < 0)
          check(!res[i][p].colored, $sformatf("I(%0d,%0d) coloured, model failed", i, p));
        else
          check(res[i][p].colored && int'(res[i][p].color) == exp_col[i][p],
                $sformatf("I(%0d,%0d) colour %0d expected %0d", i, p, res[i][p].color, exp_col[i][p]));
      end else begin
        check(!res[i][p].valid, $sformatf("I(%0d,%0d) got a token without request", i, p));
      end
    end
    while (phase != PH_IDLE) @(negedge clk);
    for (int g = 0; g < N; g++)
      for (int pos = 0; pos < M; pos++) begin
        check(icsr[g][pos] == c1m[g][(g + pos) % M], $sformatf("ICSR_%0d cell %0d", g, pos));
        check(ocsr[g][pos] == c2m[g][(g + pos) % M], $sformatf("OCSR_%0d cell %0d", g, pos));
      end
  endtask

  task automatic clear_reqs();
    for (int i = 0; i < N; i++) for (int p = 0; p < N; p++) begin
      radd[i][p] = 0; rdel[i][p] = 0; rgrp[i][p] = 0; rport[i][p] = 0;
    end
  endtask

  // Random circuit-mode requests: deletions, additions, replacements.
  task automatic random_circuit_reqs();
    clear_reqs();
    for (int i = 0; i < N; i++) for (int p = 0; p < N; p++)
      if (cv[i][p] && $urandom_range(99) < 35) begin
        rdel[i][p] = 1;
        ou[cj[i][p]][cq[i][p]] = 0;    // output becomes free for this cycle
      end
    for (int i = 0; i < N; i++) for (int p = 0; p < N; p++)
      if ((!cv[i][p] || rdel[i][p]) && $urandom_range(99) < 60) begin
        int tries = 0;
        int j, q;
        do begin
          j = $urandom_range(N - 1); q = $urandom_range(N - 1); tries++;
        end while (ou[j][q] && tries < 50);
        if (!ou[j][q]) begin
          ou[j][q] = 1; radd[i][p] = 1; rgrp[i][p] = j; rport[i][p] = q;
        end
      end
    // restore output use of deleted connections; model_cycle clears them
    for (int i = 0; i < N; i++) for (int p = 0; p < N; p++)
      if (rdel[i][p]) ou[cj[i][p]][cq[i][p]] = 1;
    for (int i = 0; i < N; i++) for (int p = 0; p < N; p++)
      if (radd[i][p]) ou[rgrp[i][p]][rport[i][p]] = 0;
  endtask

  task automatic random_packet_reqs();
    int outs [N*N];
    clear_reqs();
    for (int x = 0; x < N*N; x++) outs[x] = x;
    outs.shuffle();
    for (int i = 0; i < N; i++) for (int p = 0; p < N; p++)
      if ($urandom_range(99) < 85) begin
        radd[i][p] = 1; rgrp[i][p] = outs[i*N+p] / N; rport[i][p] = outs[i*N+p] % N;
      end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp [N];
    load = 1'b0;
    for (int g = 0; g < N; g++) begin icsr_load[g] = '1; ocsr_load[g] = '1; end
    clear_reqs();
    model_reset();
    drive_reqs();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // ---- worked example of IR_1 in C(5,9,5) ----
    for (int j = 0; j < N; j++)
      for (int c = 0; c < M; c++)
        c2m[j][c] = (c == 1 || c == 3 || c == 4 || c == 7 || c == 8);
    for (int j = 0; j < N; j++)
      for (int pos = 0; pos < M; pos++) ocsr_load[j][pos] = c2m[j][(j + pos) % M];
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    radd[1][0] = 1; rgrp[1][0] = 4;
    radd[1][1] = 1; rgrp[1][1] = 3;
    radd[1][2] = 1; rgrp[1][2] = 0; rport[1][2] = 1;
    radd[1][3] = 1; rgrp[1][3] = 1;
    radd[1][4] = 1; rgrp[1][4] = 0; rport[1][4] = 2;
    run_cycle(1'b0);
    exp = '{7, 4, 1, 3, 8};
    for (int p = 0; p < N; p++)
      check(res[1][p].colored && int'(res[1][p].color) == exp[p],
            $sformatf("example: token of I(1,%0d) colour %0d, expected %0d", p, res[1][p].color, exp[p]));

    // ---- random circuit switching from an empty network ----
    for (int g = 0; g < N; g++) begin icsr_load[g] = '1; ocsr_load[g] = '1; end
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    model_reset();
    for (int t = 0; t < 40; t++) begin
      random_circuit_reqs();
      run_cycle(1'b0);
    end
    // ---- packet mode ----
    for (int t = 0; t < 15; t++) begin
      random_packet_reqs();
      run_cycle(1'b1);
    end
    // ---- back to circuit mode on top of the last slot's connections ----
    for (int t = 0; t < 10; t++) begin
      random_circuit_reqs();
      run_cycle(1'b0);
    end

    check(n_assign > 0, "no colour was assigned");
    check(n_erase  > 0, "no colour was erased");
    check(n_wait   > 0, "no token ever had to wait for a free colour");
    $display("events: assign=%0d erase=%0d wait=%0d", n_assign, n_erase, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

