// tb_circ_counter: checks the modulo-M circular counter CC.
// With M = 9 and INIT = 7 (IP(3,4) of C(5,9,5)) the counter must start at 7
// after reset, count 7 8 0 1 ... when incremented, hold when not, and return
// to 7 on reload; the expected values come from (INIT + increments) mod M.
module tb_circ_counter;
  localparam int M = 9;
  localparam int INIT = 7;
  logic clk = 0, rst_n = 0, reload = 0, inc = 0;
  logic [dpr_pkg::COL_W-1:0] q;
  int checks = 0, failures = 0, n_inc = 0;

  circ_counter #(.M(M), .INIT(INIT)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(q == INIT, "reset value");
    for (int t = 0; t < 60; t++) begin
      inc    = ($urandom_range(3) != 0);
      reload = ($urandom_range(19) == 0);
      @(negedge clk);
      if (reload) n_inc = 0;
      else if (inc) n_inc++;
      check(int'(q) == (INIT + n_inc) % M, $sformatf("step %0d: q=%0d expected %0d", t, q, (INIT + n_inc) % M));
    end
    inc = 0; reload = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
