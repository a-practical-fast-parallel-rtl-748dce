// tb_dpr_switch_rearr: the switch built as the rearrangeable network
// C(5,5,5) (m = n, five middle modules) and used as a cell switch: packet
// mode, every routing cycle routes a fresh full permutation of all 25
// inputs.
//
// One pass of the rotation colouring is not guaranteed to colour every edge
// when m = n, so the test predicts with a reference model of the algorithm
// (plain arrays: free colours per input group and per output group, each
// agent (i,j) trying colour (i+j+k) mod m in step k on its lowest uncoloured
// request) which inputs get a colour and which come back uncoloured. It
// checks that exactly the predicted inputs are connected with the predicted
// colours, that the others pulse `route_fail`, that no colour is used twice
// at a group, that every connected output carries its input's data, and that
// the routing cycle takes 2N + M - 1 clocks from PREP to RESULT. Both
// outcomes, a fully routed permutation and a cycle with failures, must
// occur: the first cycle uses a fixed permutation that is always coloured
// completely, the others are random. The failure rate is printed.
module tb_dpr_switch_rearr;
  import dpr_pkg::*;
  localparam int N = 5, M = 5, DW = 8, CYCLES = 60;

  logic clk = 0, rst_n = 0, run = 0, packet_mode = 1;
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

  dpr_switch #(.M(M)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_full = 0, n_partial = 0, n_failed_edges = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (rst_n) check(!fabric_conflict, "fabric collision");

  int rj [N][N]; int rq [N][N];
  int expc [N][N];   // predicted colour, -1 = not coloured

  task automatic model();
    bit ifree [N][M];
    bit ofree [N][M];
    for (int g = 0; g < N; g++) for (int c = 0; c < M; c++) begin ifree[g][c] = 1; ofree[g][c] = 1; end
    for (int i = 0; i < N; i++) for (int p = 0; p < N; p++) expc[i][p] = -1;
    for (int k = 0; k < M; k++)
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          automatic int c = (i + j + k) % M;
          for (int p = 0; p < N; p++)
            if (rj[i][p] == j && expc[i][p] < 0) begin
              if (ifree[i][c] && ofree[j][c]) begin
                ifree[i][c] = 0; ofree[j][c] = 0; expc[i][p] = c;
              end
              break;
            end
        end
  endtask

  // fixed = 1: input (i,p) goes to output (p,i). Every bundle (i,j) then
  // holds one request and colours (i+j) mod m are all distinct per group,
  // so the whole permutation is coloured in step 0.
  task automatic one_cycle(input bit fixed);
    int outs [N*N];
    longint t0, t1;
    int nfail = 0;
    for (int x = 0; x < N*N; x++) outs[x] = x;
    outs.shuffle();
    for (int i = 0; i < N; i++) for (int p = 0; p < N; p++) begin
      rj[i][p] = fixed ? p : outs[i*N+p] / N;
      rq[i][p] = fixed ? i : outs[i*N+p] % N;
      usr_add[i][p] = 1; usr_grp[i][p] = IDX_W'(rj[i][p]); usr_port[i][p] = IDX_W'(rq[i][p]);
    end
    model();
    @(negedge clk);
    for (int i = 0; i < N; i++) usr_add[i] = '0;
    run = 1;
    while (!req_taken) @(negedge clk);
    t0 = $time / 10;
    run = 0;
    while (!cycle_done) @(negedge clk);
    t1 = $time / 10;
    check(t1 - t0 == 2*N + M - 1, $sformatf("routing cycle took %0d clocks", t1 - t0));
    @(negedge clk);
    for (int i = 0; i < N; i++) for (int p = 0; p < N; p++) din[i][p] = DW'($urandom);
    #1;
    for (int i = 0; i < N; i++) for (int p = 0; p < N; p++) begin
      if (expc[i][p] >= 0) begin
        check(conn_valid[i][p] && !route_fail[i][p] && int'(conn_color[i][p]) == expc[i][p],
              $sformatf("I(%0d,%0d) colour %0d expected %0d", i, p, conn_color[i][p], expc[i][p]));
        check(dout_valid[rj[i][p]][rq[i][p]] && dout[rj[i][p]][rq[i][p]] == din[i][p],
              $sformatf("data I(%0d,%0d) -> O(%0d,%0d)", i, p, rj[i][p], rq[i][p]));
        for (int x = 0; x < N; x++) for (int y = 0; y < N; y++)
          if (conn_valid[x][y] && (x != i || y != p) && conn_color[x][y] == conn_color[i][p])
            check(x != i && rj[x][y] != rj[i][p], $sformatf("colour %0d used twice at a group", conn_color[i][p]));
      end else begin
        nfail++;
        check(!conn_valid[i][p] && route_fail[i][p], $sformatf("I(%0d,%0d) should report a failed route", i, p));
        check(!dout_valid[rj[i][p]][rq[i][p]], $sformatf("O(%0d,%0d) should be idle", rj[i][p], rq[i][p]));
      end
    end
    if (nfail == 0) n_full++; else n_partial++;
    n_failed_edges += nfail;
  endtask

  initial begin
    repeat (CYCLES * (2*N + M + 4) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      usr_add[i] = '0; usr_del[i] = '0;
      for (int p = 0; p < N; p++) begin usr_grp[i][p] = '0; usr_port[i][p] = '0; din[i][p] = '0; end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < CYCLES; t++) one_cycle(t == 0);
    $display("C(%0d,%0d,%0d) full permutations: %0d fully routed, %0d with failures, %0d of %0d requests uncoloured",
             N, M, N, n_full, n_partial, n_failed_edges, CYCLES * N * N);
    check(n_full > 0, "a fully routed permutation");
    check(n_partial > 0, "a permutation with uncoloured requests");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
