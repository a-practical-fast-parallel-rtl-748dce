// tb_output_ring_dsr: checks the doubled-shift-register output ring OR_2 of
// C(5,9,5) against a model that keeps one "free" bit per colour 0..9.
// After s shifts, cell i of OCSR1 must show colour (2 + i + s) mod 5 and
// cell i of OCSR2 that colour plus 5; the counter CC2(2,i) must read the
// OCSR1 colour, and a write by input PE i on lane l must change exactly the
// bit of the colour that lane shows. The sequence of counter values of
// OP(2,0) is also compared with the pairs printed for it in the document's
// doubled-register figure: 27 38 49 05 16 27 (colour pairs (2,7), (3,8) ...).
module tb_output_ring_dsr;
  localparam int N = 5, J = 2, W = 2 * N;
  logic clk = 0, rst_n = 0, reload = 0, shift = 0, set_all = 0, load = 0;
  logic [W-1:0] load_val = '0;
  logic [1:0] we [N];
  logic [1:0] wd [N];
  logic [1:0] pe_cell [N];
  logic [dpr_pkg::COL_W-1:0] cc2 [N];
  logic [W-1:0] ocsr;
  bit avail [W];
  int s = 0;
  int checks = 0, failures = 0;

  output_ring_dsr #(.N(N), .J(J)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic compare(input string what);
    for (int i = 0; i < N; i++) begin
      int c = (J + i + s) % N;
      check(int'(cc2[i]) == c, $sformatf("%s: CC2(%0d,%0d)=%0d expected %0d", what, J, i, cc2[i], c));
      for (int l = 0; l < 2; l++)
        check(pe_cell[i][l] == avail[c + l * N], $sformatf("%s: lane %0d cell of OP(%0d,%0d)", what, l, J, i));
    end
    for (int l = 0; l < 2; l++)
      for (int p = 0; p < N; p++)
        check(ocsr[l*N + p] == avail[l*N + (J + p + s) % N], $sformatf("%s: OCSR%0d cell %0d", what, l + 1, p));
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fig [6];
    for (int i = 0; i < N; i++) begin we[i] = '0; wd[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < W; c++) avail[c] = 1;
    compare("reset");
    // counter pairs of OP(2,0) over six shifts, as printed
    fig = '{27, 38, 49, 5, 16, 27};
    for (int t = 0; t < 6; t++) begin
      check(int'(cc2[0]) * 10 + int'(cc2[0]) + N == fig[t],
            $sformatf("figure sequence step %0d: (%0d,%0d)", t, cc2[0], int'(cc2[0]) + N));
      shift = 1;
      @(negedge clk);
      s++;
    end
    shift = 0;
    compare("after figure sequence");
    for (int t = 0; t < 200; t++) begin
      shift = $urandom_range(3) != 0;
      for (int i = 0; i < N; i++) begin
        we[i] = 2'($urandom) & 2'($urandom);
        wd[i] = 2'($urandom);
      end
      reload = (s % N == 0) && ($urandom_range(3) == 0);
      if (reload) shift = 0;     // as in PREP: counters reload, rings stand
      set_all = ($urandom_range(40) == 0);
      @(negedge clk);
      if (set_all) for (int c = 0; c < W; c++) avail[c] = 1;
      else
        for (int i = 0; i < N; i++)
          for (int l = 0; l < 2; l++)
            if (we[i][l]) avail[(J + i + s) % N + l * N] = wd[i][l];
      if (reload) s = 0;
      else if (shift) s++;
      compare($sformatf("step %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
