// tb_csr_ring: checks the M-cell circular shift register against an array
// model: per-cell writes of the first NA cells applied before the shift,
// shift toward cell 0 with wrap-around, set_all, load and their priorities.
// It also checks that M shifts bring every bit back to its own cell.
module tb_csr_ring;
  localparam int M = 9;
  localparam int NA = 5;
  logic clk = 0, rst_n = 0, shift = 0, set_all = 0, load = 0;
  logic [M-1:0]  load_val = '0;
  logic [NA-1:0] we = '0, wd = '0;
  logic [NA-1:0] pe_cell;
  logic [M-1:0]  ring;
  bit model [M];
  bit tmp [M];
  int checks = 0, failures = 0;

  csr_ring #(.M(M), .NA(NA)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic compare(input string what);
    for (int k = 0; k < M; k++) check(ring[k] == model[k], $sformatf("%s: cell %0d", what, k));
    for (int k = 0; k < NA; k++) check(pe_cell[k] == model[k], $sformatf("%s: pe cell %0d", what, k));
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
    for (int k = 0; k < M; k++) model[k] = 1;
    compare("reset");
    // a single 0 walks once around the ring
    load = 1; load_val = 9'b111101111; @(negedge clk); load = 0;
    for (int k = 0; k < M; k++) model[k] = (k == 4) ? 0 : 1;
    compare("load");
    for (int s = 1; s <= M; s++) begin
      shift = 1; @(negedge clk);
      for (int k = 0; k < M; k++) model[k] = (k == ((4 - s) % M + M) % M) ? 0 : 1;
      compare($sformatf("walk %0d", s));
    end
    shift = 0;
    // random operations
    for (int t = 0; t < 300; t++) begin
      shift = $urandom_range(1); set_all = ($urandom_range(15) == 0);
      load = ($urandom_range(15) == 0); load_val = M'($urandom);
      we = NA'($urandom); wd = NA'($urandom);
      @(negedge clk);
      if (load) for (int k = 0; k < M; k++) model[k] = load_val[k];
      else if (set_all) for (int k = 0; k < M; k++) model[k] = 1;
      else begin
        tmp = model;
        for (int k = 0; k < NA; k++) if (we[k]) tmp[k] = wd[k];
        for (int k = 0; k < M; k++) model[k] = shift ? tmp[(k + 1) % M] : tmp[k];
      end
      compare($sformatf("random %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
