// tb_dpr_switch: end-to-end test of the 25-port Clos switch C(5,9,5) with
// its DPR router, at the default sizes.
//
// Circuit mode: over many routing cycles inputs set up, tear down and
// replace connections (tear-down and set-up in one cycle) to random free
// outputs. After each cycle every request must be routed, the colours must
// form a proper edge colouring (no middle module twice at one input group or
// one output group) and every connected output must carry the data word of
// its input through the fabric, without collision.
// Packet mode: each cycle routes a fresh random permutation (cell slot);
// the previous slot's connections must be gone. The test then returns to
// circuit mode on top of the last slot, and finally holds `run` high to see
// cycles follow back to back.
// The PREP-to-RESULT time is checked (2N+2M-1 clocks, 2N+M-1 in packet
// mode). Each mechanism is counted and must occur at least once: colour
// assignment, colour erase, a token waiting for a free colour, several
// tokens at one agent, replacement, packet slot, mode switch, back-to-back
// cycles.
module tb_dpr_switch;
  import dpr_pkg::*;
  localparam int N = 5, M = 9, DW = 8;

  logic clk = 0, rst_n = 0, run = 0, packet_mode = 0;
  logic [N-1:0] usr_add [N];
  logic [IDX_W-1:0] usr_grp [N][N];
  logic [IDX_W-1:0] usr_port [N][N];
  logic [N-1:0] usr_del [N];
  logic [DW-1:0] din [N][N];
  logic [DW-1:0] dout [N][N];
  logic [N-1:0] dout_valid [N];
  logic req_taken, cycle_done, fabric_conflict;
  logic [N-1:0] conn_valid [N];
  logic [COL_W-1:0] conn_color [N][N];
  logic [N-1:0] pending [N];
  logic [N-1:0] route_fail [N];
  logic [N-1:0] ev_assign [N];
  logic [N-1:0] ev_erase [N];
  logic [N-1:0] ev_wait [N];

  dpr_switch dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_assign = 0, n_erase = 0, n_wait = 0, n_multi = 0, n_replace = 0;
  int n_packet = 0, n_switch = 0, n_b2b = 0, n_fail = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) begin
    for (int i = 0; i < N; i++) begin
      n_assign += $countones(ev_assign[i]);
      n_erase  += $countones(ev_erase[i]);
      n_wait   += $countones(ev_wait[i]);
      n_fail   += $countones(route_fail[i]);
    end
    if (rst_n) check(!fabric_conflict, "fabric collision");
  end

  // Testbench view of the connections.
  bit cv [N][N]; int cj [N][N]; int cq [N][N];
  bit ob [N][N];
  bit radd [N][N]; int rj [N][N]; int rq [N][N]; bit rdel [N][N];

  task automatic clear_reqs();
    for (int i = 0; i < N; i++) for (int p = 0; p < N; p++) begin
      radd[i][p] = 0; rdel[i][p] = 0; rj[i][p] = 0; rq[i][p] = 0;
    end
  endtask

  task automatic circuit_reqs();
    clear_reqs();
    for (int i = 0; i < N; i++) for (int p = 0; p < N; p++)
      if (cv[i][p] && $urandom_range(99) < 30) rdel[i][p] = 1;
    for (int i = 0; i < N; i++) for (int p = 0; p < N; p++)
      if (rdel[i][p]) ob[cj[i][p]][cq[i][p]] = 0;
    for (int i = 0; i < N; i++) for (int p = 0; p < N; p++)
      if ((!cv[i][p] || rdel[i][p]) && $urandom_range(99) < 55) begin
        for (int tries = 0; tries < 40; tries++) begin
          automatic int j = $urandom_range(N - 1);
          automatic int q = $urandom_range(N - 1);
          if (!ob[j][q]) begin
            ob[j][q] = 1; radd[i][p] = 1; rj[i][p] = j; rq[i][p] = q;
            if (rdel[i][p]) begin rdel[i][p] = 0; n_replace++; end   // add implies delete
            break;
          end
        end
      end
  endtask

  task automatic packet_reqs();
    int outs [N*N];
    clear_reqs();
    for (int x = 0; x < N*N; x++) outs[x] = x;
    outs.shuffle();
    for (int j = 0; j < N; j++) for (int q = 0; q < N; q++) ob[j][q] = 0;
    for (int i = 0; i < N; i++) for (int p = 0; p < N; p++)
      if ($urandom_range(99) < 90) begin
        radd[i][p] = 1; rj[i][p] = outs[i*N+p] / N; rq[i][p] = outs[i*N+p] % N;
        ob[rj[i][p]][rq[i][p]] = 1;
      end
  endtask

  task automatic run_cycle(input bit pkt);
    longint t0, t1;
    // present the requests as one-clock strobes
    for (int i = 0; i < N; i++) for (int p = 0; p < N; p++) begin
      usr_add[i][p] = radd[i][p]; usr_del[i][p] = rdel[i][p];
      usr_grp[i][p] = IDX_W'(rj[i][p]); usr_port[i][p] = IDX_W'(rq[i][p]);
    end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        automatic int cnt = 0;
        for (int p = 0; p < N; p++) if (radd[i][p] && rj[i][p] == j) cnt++;
        if (cnt > 1) n_multi++;
      end
    @(negedge clk);
    for (int i = 0; i < N; i++) begin usr_add[i] = '0; usr_del[i] = '0; end
    if (packet_mode != pkt) n_switch++;
    packet_mode = pkt;
    if (pkt) n_packet++;
    run = 1;
    while (!req_taken) @(negedge clk);
    t0 = $time / 10;
    run = 0;
    while (!cycle_done) @(negedge clk);
    t1 = $time / 10;
    check(t1 - t0 == (pkt ? 2*N + M - 1 : 2*N + 2*M - 1), $sformatf("routing cycle took %0d clocks", t1 - t0));
    @(negedge clk);
    // update the view
    for (int i = 0; i < N; i++) for (int p = 0; p < N; p++) begin
      if (pkt || rdel[i][p] || radd[i][p]) cv[i][p] = 0;
      if (radd[i][p]) begin cv[i][p] = 1; cj[i][p] = rj[i][p]; cq[i][p] = rq[i][p]; end
    end
    check_switch();
  endtask

  task automatic check_switch();
    for (int i = 0; i < N; i++) for (int p = 0; p < N; p++) din[i][p] = DW'($urandom);
    #1;
    for (int i = 0; i < N; i++) for (int p = 0; p < N; p++) begin
      check(conn_valid[i][p] == cv[i][p] && !pending[i][p], $sformatf("I(%0d,%0d) connection state", i, p));
      if (cv[i][p]) begin
        check(dout_valid[cj[i][p]][cq[i][p]] && dout[cj[i][p]][cq[i][p]] == din[i][p],
              $sformatf("data I(%0d,%0d) -> O(%0d,%0d)", i, p, cj[i][p], cq[i][p]));
        for (int x = 0; x < N; x++) for (int y = 0; y < N; y++)
          if (cv[x][y] && (x != i || y != p) && conn_color[x][y] == conn_color[i][p])
            check(x != i && cj[x][y] != cj[i][p], $sformatf("colour %0d used twice at a node", conn_color[i][p]));
      end
    end
    for (int j = 0; j < N; j++) for (int q = 0; q < N; q++) begin
      automatic bit used = 0;
      for (int i = 0; i < N; i++) for (int p = 0; p < N; p++)
        if (cv[i][p] && cj[i][p] == j && cq[i][p] == q) used = 1;
      check(dout_valid[j][q] == used, $sformatf("O(%0d,%0d) valid", j, q));
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      usr_add[i] = '0; usr_del[i] = '0;
      for (int p = 0; p < N; p++) begin
        usr_grp[i][p] = '0; usr_port[i][p] = '0; din[i][p] = '0;
        cv[i][p] = 0; ob[i][p] = 0;
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 60; t++) begin circuit_reqs(); run_cycle(1'b0); end
    for (int t = 0; t < 20; t++) begin packet_reqs();  run_cycle(1'b1); end
    for (int t = 0; t < 30; t++) begin circuit_reqs(); run_cycle(1'b0); end
    // back-to-back cycles with run held high
    run = 1;
    while (!cycle_done) @(negedge clk);
    for (int t = 0; t < 3; t++) begin
      @(negedge clk);
      if (req_taken) n_b2b++;
      while (!cycle_done) @(negedge clk);
    end
    run = 0;
    check(n_b2b == 3, "back-to-back cycles");
    repeat (2) @(negedge clk);
    check_switch();

    check(n_fail == 0, "a request was not routed");
    check(n_assign > 0, "mechanism: colour assignment");
    check(n_erase > 0, "mechanism: colour erase (tear-down)");
    check(n_wait > 0, "mechanism: token waiting for a free colour");
    check(n_multi > 0, "mechanism: several tokens at one agent");
    check(n_replace > 0, "mechanism: tear-down and set-up in one cycle");
    check(n_packet > 0, "mechanism: packet-mode slot");
    check(n_switch >= 2, "mechanism: mode switch");
    $display("mechanisms: assign=%0d erase=%0d wait=%0d multi=%0d replace=%0d packet=%0d switch=%0d b2b=%0d",
             n_assign, n_erase, n_wait, n_multi, n_replace, n_packet, n_switch, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
