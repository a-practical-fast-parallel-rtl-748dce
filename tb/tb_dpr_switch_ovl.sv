// tb_dpr_switch_ovl: end-to-end test of the 25-port switch C(5,9,5) built
// with the overlapped-phase router (cell switching). In every period one
// random partial permutation is offered (held by the inputs until the next
// slot starts); sometimes a second, full permutation replaces it within the
// same period.
// Each slot's result arrives two periods after it was taken. For every slot
// the test checks that exactly the requested inputs are connected, that no
// middle module is used twice at an input or output group, that every
// connected output carries its input's data and that no other output is
// driven. Results must follow each other every P = 9 clocks. Counted
// mechanisms: slots routed, held requests replaced, agents waiting for a
// colour; each must occur.
module tb_dpr_switch_ovl;
  import dpr_pkg::*;
  localparam int N = 5, M = 9, DW = 8, P = 9, SLOTS = 30;

  logic clk = 0, rst_n = 0, run = 1, packet_mode = 1;
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

  dpr_switch #(.OVL(1'b1)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_slots = 0, n_replace = 0, n_wait = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk)
    if (rst_n) begin
      check(!fabric_conflict, "fabric collision");
      for (int i = 0; i < N; i++) begin
        n_wait += $countones(ev_wait[i]);
        check(route_fail[i] == '0, "route failure with m = 2n-1");
      end
    end

  typedef struct { int j [N][N]; int q [N][N]; } perm_t;   // j = -1: no request
  perm_t held, inflight [$];

  function automatic perm_t empty_perm();
    perm_t s;
    for (int i = 0; i < N; i++) for (int p = 0; p < N; p++) begin s.j[i][p] = -1; s.q[i][p] = 0; end
    return s;
  endfunction

  function automatic perm_t rand_perm(input bit full);
    perm_t s;
    int outs [N*N];
    for (int x = 0; x < N*N; x++) outs[x] = x;
    outs.shuffle();
    for (int i = 0; i < N; i++) for (int p = 0; p < N; p++) begin
      s.j[i][p] = (full || $urandom_range(9) != 0) ? outs[i*N+p] / N : -1;
      s.q[i][p] = outs[i*N+p] % N;
    end
    return s;
  endfunction

  task automatic strobe(input perm_t s);
    for (int i = 0; i < N; i++) for (int p = 0; p < N; p++) begin
      usr_add[i][p]  = (s.j[i][p] >= 0);
      usr_grp[i][p]  = IDX_W'(s.j[i][p] < 0 ? 0 : s.j[i][p]);
      usr_port[i][p] = IDX_W'(s.q[i][p]);
    end
    @(negedge clk);
    for (int i = 0; i < N; i++) usr_add[i] = '0;
  endtask

  task automatic check_slot(input perm_t s);
    for (int i = 0; i < N; i++) for (int p = 0; p < N; p++) din[i][p] = DW'($urandom);
    #1;
    for (int i = 0; i < N; i++) for (int p = 0; p < N; p++) begin
      check(conn_valid[i][p] == (s.j[i][p] >= 0), $sformatf("slot %0d I(%0d,%0d) connection", n_slots, i, p));
      if (s.j[i][p] >= 0) begin
        check(dout_valid[s.j[i][p]][s.q[i][p]] && dout[s.j[i][p]][s.q[i][p]] == din[i][p],
              $sformatf("slot %0d data I(%0d,%0d) -> O(%0d,%0d)", n_slots, i, p, s.j[i][p], s.q[i][p]));
        for (int x = 0; x < N; x++) for (int y = 0; y < N; y++)
          if (s.j[x][y] >= 0 && (x != i || y != p) && conn_color[x][y] == conn_color[i][p])
            check(x != i && s.j[x][y] != s.j[i][p], $sformatf("slot %0d colour %0d used twice", n_slots, conn_color[i][p]));
      end
    end
    for (int j = 0; j < N; j++) for (int q = 0; q < N; q++) begin
      automatic bit used = 0;
      for (int i = 0; i < N; i++) for (int p = 0; p < N; p++)
        if (s.j[i][p] == j && s.q[i][p] == q) used = 1;
      check(dout_valid[j][q] == used, $sformatf("slot %0d O(%0d,%0d) valid", n_slots, j, q));
    end
  endtask

  initial begin
    repeat ((SLOTS + 4) * P + 50) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint last = -1;
    for (int i = 0; i < N; i++) begin
      usr_add[i] = '0; usr_del[i] = '0;
      for (int p = 0; p < N; p++) begin usr_grp[i][p] = '0; usr_port[i][p] = '0; din[i][p] = '0; end
    end
    held = empty_perm();
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (n_slots < SLOTS) begin
      if (cycle_done) begin
        automatic perm_t s = inflight.pop_front();
        automatic longint now = $time / 10;
        if (last >= 0) check(now - last == P, $sformatf("slot spacing %0d", now - last));
        last = now;
        @(negedge clk);
        check_slot(s);
        n_slots++;
      end else if (req_taken) begin
        inflight.push_back(held);
        held = empty_perm();
        @(negedge clk);
        if (inflight.size() <= SLOTS) begin
          held = rand_perm(1'b0);
          strobe(held);
          if ($urandom_range(3) == 0) begin
            // a full permutation, so that every held request is replaced
            held = rand_perm(1'b1);
            strobe(held);
            n_replace++;
          end
        end
      end else
        @(negedge clk);
    end
    $display("slots=%0d replaced=%0d waits=%0d", n_slots, n_replace, n_wait);
    check(n_replace > 0, "mechanism: held request replaced");
    check(n_wait > 0, "mechanism: agent waiting for a colour");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
