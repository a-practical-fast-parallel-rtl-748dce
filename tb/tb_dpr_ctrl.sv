// tb_dpr_ctrl: checks the routing-cycle sequencer of C(5,9,5).
// A circuit-mode cycle must run PREP, N-1 DIST steps (numbered 1..N-1), M
// ERASE and M ASSIGN steps (0..M-1), N-1 RETURN steps and RESULT: 2N+2M-2
// steps plus two cycles. A packet-mode cycle skips ERASE and frees every
// colour in PREP. With `run` held high cycles follow back to back; with
// `run` low the controller stops in IDLE.
module tb_dpr_ctrl;
  import dpr_pkg::*;
  localparam int N = 5;
  localparam int M = 9;
  logic clk = 0, rst_n = 0, run = 0, packet_mode = 0;
  phase_e phase;
  logic [COL_W-1:0] step;
  logic shift, set_all, mode;
  int checks = 0, failures = 0;

  dpr_ctrl #(.N(N), .M(M)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Expect `cnt` cycles of phase `ph` with steps first..first+cnt-1.
  task automatic expect_phase(input phase_e ph, input int first, input int cnt, input bit sh, input bit sa);
    for (int s = 0; s < cnt; s++) begin
      check(phase == ph, $sformatf("phase %s expected %s", phase.name(), ph.name()));
      if (ph != PH_PREP && ph != PH_RESULT)
        check(int'(step) == first + s, $sformatf("%s step %0d expected %0d", ph.name(), step, first + s));
      check(shift == sh && set_all == sa, $sformatf("%s shift/set_all", ph.name()));
      @(negedge clk);
    end
  endtask

  task automatic expect_cycle(input bit pkt);
    expect_phase(PH_PREP, 0, 1, 0, pkt);
    check(mode == pkt, "mode of the cycle");
    expect_phase(PH_DIST, 1, N - 1, 0, 0);
    if (!pkt) expect_phase(PH_ERASE, 0, M, 1, 0);
    expect_phase(PH_ASSIGN, 0, M, 1, 0);
    expect_phase(PH_RETURN, 1, N - 1, 0, 0);
    expect_phase(PH_RESULT, 0, 1, 0, 0);
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
    check(phase == PH_IDLE, "idle after reset");
    run = 1;
    @(negedge clk);
    expect_cycle(1'b0);           // circuit mode, back to back
    packet_mode = 1;              // sampled in RESULT of the first cycle
    expect_cycle(1'b0);
    expect_cycle(1'b1);
    run = 0;
    packet_mode = 0;
    expect_cycle(1'b1);           // mode was sampled before it changed
    repeat (3) begin
      check(phase == PH_IDLE && !shift, "stays idle with run low");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
