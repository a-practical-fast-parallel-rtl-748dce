// tb_output_ring: checks output ring OR_2 of C(5,9,5) against a model that
// keeps one "free" bit per colour. After s shifts, OCSR cell i must show
// colour (2 + i + s) mod 9, the counter CC2(2,i) must read that colour, and
// a write by input PE i must change exactly that colour's bit.
module tb_output_ring;
  localparam int N = 5, M = 9, J = 2;
  logic clk = 0, rst_n = 0, reload = 0, shift = 0, set_all = 0, load = 0;
  logic [M-1:0] load_val = '0;
  logic [N-1:0] we = '0, wd = '0;
  logic [N-1:0] pe_cell;
  logic [dpr_pkg::COL_W-1:0] cc2 [N];
  logic [M-1:0] ocsr;
  bit avail [M];
  int s = 0;
  int checks = 0, failures = 0;

  output_ring #(.N(N), .M(M), .J(J)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic compare(input string what);
    for (int i = 0; i < N; i++) begin
      int c = (J + i + s) % M;
      check(int'(cc2[i]) == c, $sformatf("%s: CC2(%0d,%0d)=%0d expected %0d", what, J, i, cc2[i], c));
      check(pe_cell[i] == avail[c], $sformatf("%s: cell of OP(%0d,%0d)", what, J, i));
    end
    for (int p = 0; p < M; p++)
      check(ocsr[p] == avail[(J + p + s) % M], $sformatf("%s: OCSR cell %0d", what, p));
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < M; c++) avail[c] = 1;
    compare("reset");
    for (int t = 0; t < 200; t++) begin
      shift  = $urandom_range(3) != 0;
      we     = N'($urandom) & N'($urandom);
      wd     = N'($urandom);
      reload = (s % M == 0) && ($urandom_range(3) == 0);
      if (reload) shift = 0;     // as in PREP: counters reload, ring stands
      set_all = ($urandom_range(40) == 0);
      @(negedge clk);
      if (set_all) for (int c = 0; c < M; c++) avail[c] = 1;
      else for (int i = 0; i < N; i++) if (we[i]) avail[(J + i + s) % M] = wd[i];
      if (reload) s = 0;
      else if (shift) s++;
      compare($sformatf("step %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
