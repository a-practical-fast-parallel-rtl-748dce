// tb_clos_fabric: checks the three-stage Clos network C(5,9,5).
// Random (partial) permutations are coloured by the testbench with a plain
// first-fit colouring (lowest colour free at both the input and the output
// group, which never needs more than 2n-1 colours); every output must then
// carry the data of the input connected to it, with no collision. Then two
// inputs of one group are given the same colour, which must collide in
// stage 1 and raise `conflict`.
module tb_clos_fabric;
  localparam int N = 5, M = 9, DW = 8;
  logic [N-1:0] in_valid [N];
  logic [dpr_pkg::COL_W-1:0] in_mid [N][N];
  logic [dpr_pkg::IDX_W-1:0] in_grp [N][N];
  logic [dpr_pkg::IDX_W-1:0] in_port [N][N];
  logic [DW-1:0] in_data [N][N];
  logic [N-1:0] out_valid [N];
  logic [DW-1:0] out_data [N][N];
  logic conflict;
  int checks = 0, failures = 0;

  clos_fabric #(.N(N), .M(M), .DW(DW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int outs [N*N];
    int src [N][N];   // src[j][q] = i*N+p or -1
    bit usedi [N][M];
    bit usedo [N][M];
    for (int t = 0; t < 100; t++) begin
      for (int x = 0; x < N*N; x++) outs[x] = x;
      outs.shuffle();
      for (int g = 0; g < N; g++) for (int c = 0; c < M; c++) begin usedi[g][c] = 0; usedo[g][c] = 0; end
      for (int j = 0; j < N; j++) for (int q = 0; q < N; q++) src[j][q] = -1;
      for (int i = 0; i < N; i++) for (int p = 0; p < N; p++) begin
        automatic int j = outs[i*N+p] / N;
        automatic int q = outs[i*N+p] % N;
        automatic int c = 0;
        in_valid[i][p] = ($urandom_range(4) != 0);
        while (usedi[i][c] || usedo[j][c]) c++;
        in_mid[i][p]  = 9'(c);
        in_grp[i][p]  = 8'(j);
        in_port[i][p] = 8'(q);
        in_data[i][p] = 8'($urandom);
        if (in_valid[i][p]) begin
          usedi[i][c] = 1; usedo[j][c] = 1; src[j][q] = i*N + p;
        end
      end
      #1;
      check(!conflict, $sformatf("pattern %0d: collision", t));
      for (int j = 0; j < N; j++) for (int q = 0; q < N; q++) begin
        check(out_valid[j][q] == (src[j][q] >= 0), $sformatf("pattern %0d: O(%0d,%0d) valid", t, j, q));
        if (src[j][q] >= 0)
          check(out_data[j][q] == in_data[src[j][q] / N][src[j][q] % N],
                $sformatf("pattern %0d: O(%0d,%0d) data", t, j, q));
      end
    end
    // two inputs of group 0 on the same middle module
    in_valid[0] = 5'b00011;
    in_mid[0][0] = 9'd2; in_mid[0][1] = 9'd2;
    for (int i = 1; i < N; i++) in_valid[i] = '0;
    #1;
    check(conflict, "collision not flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
