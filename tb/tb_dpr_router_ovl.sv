// tb_dpr_router_ovl: checks the overlapped-phase DPR router of C(5,9,5)
// used as a cell switch. A new random partial permutation (each input asks
// for an output group with probability 0.9, no output port used twice) is
// offered in every period, back to back, for 40 slots.
//
// Every slot is compared with a reference model of one colouring pass from
// an empty network (plain arrays: free colours per input group and output
// group; agent (i,j) offers colour (i+j+k) mod m in step k to its lowest
// uncoloured request): each input's token must come back with the predicted
// colour, and inputs without a request get no token. The test also checks
// that a slot's result appears 2P + N clocks after its requests were taken
// (P = 9 clocks per period) and that results follow each other every P
// clocks, and it counts steps in which an agent had to wait for a colour.
module tb_dpr_router_ovl;
  import dpr_pkg::*;
  localparam int N = 5, M = 9, P = 9, SLOTS = 40;

  logic clk = 0, rst_n = 0;
  req_t req [N][N];
  logic req_taken, res_valid;
  token_t res [N][N];
  logic [N-1:0] ev_assign [N];
  logic [N-1:0] ev_wait [N];

  dpr_router_ovl #(.N(N), .M(M)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_wait = 0, n_assign = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk)
    for (int i = 0; i < N; i++) begin
      n_wait   += $countones(ev_wait[i]);
      n_assign += $countones(ev_assign[i]);
    end

  // slot queue: requested groups (-1 = none), predicted colours, start time
  typedef struct { int grp [N][N]; int col [N][N]; longint t0; } slot_t;
  slot_t q [$];

  function automatic slot_t make_slot();
    slot_t s;
    int outs [N*N];
    bit ifree [N][M];
    bit ofree [N][M];
    for (int x = 0; x < N*N; x++) outs[x] = x;
    outs.shuffle();
    for (int i = 0; i < N; i++) for (int p = 0; p < N; p++) begin
      s.grp[i][p] = ($urandom_range(9) != 0) ? outs[i*N+p] / N : -1;
      s.col[i][p] = -1;
    end
    for (int g = 0; g < N; g++) for (int c = 0; c < M; c++) begin ifree[g][c] = 1; ofree[g][c] = 1; end
    for (int k = 0; k < M; k++)
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          automatic int c = (i + j + k) % M;
          for (int p = 0; p < N; p++)
            if (s.grp[i][p] == j && s.col[i][p] < 0) begin
              if (ifree[i][c] && ofree[j][c]) begin
                ifree[i][c] = 0; ofree[j][c] = 0; s.col[i][p] = c;
              end
              break;
            end
        end
    return s;
  endfunction

  initial begin
    repeat ((SLOTS + 4) * P + 50) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int started = 0, done = 0;
    longint last_res = -1;
    for (int i = 0; i < N; i++) for (int p = 0; p < N; p++) req[i][p] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (done < SLOTS) begin
      if (req_taken) begin
        if (started < SLOTS) begin
          automatic slot_t s = make_slot();
          s.t0 = $time / 10;
          for (int i = 0; i < N; i++) for (int p = 0; p < N; p++) begin
            req[i][p] = '0;
            req[i][p].add     = (s.grp[i][p] >= 0);
            req[i][p].add_grp = idx_t'(s.grp[i][p] < 0 ? 0 : s.grp[i][p]);
          end
          q.push_back(s);
          started++;
        end else
          for (int i = 0; i < N; i++) for (int p = 0; p < N; p++) req[i][p] = '0;
      end
      if (res_valid) begin
        automatic slot_t s = q.pop_front();
        automatic longint now = $time / 10;
        check(now - s.t0 == 2 * P + N, $sformatf("slot %0d latency %0d", done, now - s.t0));
        if (last_res >= 0) check(now - last_res == P, $sformatf("slot %0d spacing %0d", done, now - last_res));
        last_res = now;
        for (int i = 0; i < N; i++) for (int p = 0; p < N; p++)
          if (s.grp[i][p] < 0)
            check(!res[i][p].valid, $sformatf("slot %0d I(%0d,%0d): unexpected token", done, i, p));
          else
            check(res[i][p].valid && int'(res[i][p].src) == p && int'(res[i][p].grp) == s.grp[i][p] &&
                  res[i][p].colored && int'(res[i][p].color) == s.col[i][p],
                  $sformatf("slot %0d I(%0d,%0d): colour %0d expected %0d", done, i, p, res[i][p].color, s.col[i][p]));
        done++;
      end
      @(negedge clk);
    end
    $display("slots=%0d assignments=%0d waits=%0d", done, n_assign, n_wait);
    check(n_wait > 0, "an agent waited for a colour");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
