// tb_input_pe: checks input PE IP(1,2) of C(5,9,5) on its own, with the
// testbench acting as sequencer, as the neighbouring PEs and as the cells.
//   PREP    the PE's own input asks for group 0 (a CAR token that must leave)
//           and deletes a connection to group 2, colour 5 (a CDR token that
//           stays, this PE being the agent for group 2).
//   DIST    tokens for group 2 arriving from IP(1,3) are kept, the others
//           are passed on one step later.
//   ERASE   colours 5 and 1 (two CDR tokens) are freed when the counter,
//           which runs 3, 4, 5, ... from (1+2) mod 9, reaches them.
//   ASSIGN  with colours 3 and 4 taken at the input group and 6 at the
//           output group, the tokens from inputs 3 and 4 get colours 5 and 7,
//           lowest input first; a blocked step raises ev_wait.
//   RETURN  the stored tokens leave in the steps that match their distance
//           to home (input 3 in step 1, input 4 in step 2), tokens in
//           transit are passed on, and the token for input 2 ends in `res`.
module tb_input_pe;
  import dpr_pkg::*;
  localparam int N = 5, M = 9, I = 1, J = 2;
  logic clk = 0, rst_n = 0;
  phase_e phase = PH_IDLE;
  logic [COL_W-1:0] step = '0;
  logic shift = 0;
  req_t req = '0;
  token_t car_in = '0, cdr_in = '0, car_out, cdr_out, res;
  logic c1 = 0, c2 = 0, cell_we, cell_wd;
  logic [COL_W-1:0] cc;
  logic ev_assign, ev_erase, ev_wait;
  logic pool_load = 0;
  token_t pool_in [N];
  token_t pool_out [N];
  int checks = 0, failures = 0, n_wait = 0;

  input_pe #(.N(N), .M(M), .I(I), .J(J)) dut (.*);
  always #5 clk = ~clk;
  always_comb for (int p = 0; p < N; p++) pool_in[p] = TOKEN_NONE;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic token_t car(input int src, input int grp, input bit col = 0, input int c = 0);
    car = '{valid: 1'b1, del: 1'b0, src: idx_t'(src), grp: idx_t'(grp), colored: col, color: color_t'(c)};
  endfunction
  function automatic token_t cdr(input int src, input int grp, input int c);
    cdr = '{valid: 1'b1, del: 1'b1, src: idx_t'(src), grp: idx_t'(grp), colored: 1'b1, color: color_t'(c)};
  endfunction

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // PREP
    phase = PH_PREP;
    req = '{add: 1'b1, add_grp: idx_t'(0), del: 1'b1, del_grp: idx_t'(2), del_color: color_t'(5)};
    @(negedge clk);
    req = '0;
    // DIST
    phase = PH_DIST;
    step = 1; car_in = car(3, 2); cdr_in = cdr(3, 1, 8);
    #1 check(car_out == car(2, 0) && !cdr_out.valid, "DIST 1: own CAR token leaves");
    @(negedge clk);
    step = 2; car_in = car(4, 2); cdr_in = cdr(0, 2, 1);
    #1 check(!car_out.valid && cdr_out == cdr(3, 1, 8), "DIST 2: transit CDR passed on");
    @(negedge clk);
    step = 3; car_in = car(0, 3); cdr_in = '0;
    #1 check(!car_out.valid && !cdr_out.valid, "DIST 3: nothing to send");
    @(negedge clk);
    step = 4; car_in = '0;
    #1 check(car_out == car(0, 3) && !cdr_out.valid, "DIST 4: transit CAR passed on");
    @(negedge clk);
    // ERASE
    phase = PH_ERASE; shift = 1;
    for (int k = 0; k < M; k++) begin
      step = COL_W'(k);
      #1;
      check(int'(cc) == (I + J + k) % M, $sformatf("ERASE %0d: counter %0d", k, cc));
      check(cell_we == (int'(cc) == 5 || int'(cc) == 1) && (!cell_we || cell_wd),
            $sformatf("ERASE %0d: cell write %0d%0d at colour %0d", k, cell_we, cell_wd, cc));
      check(ev_erase == cell_we, "ERASE event");
      @(negedge clk);
    end
    // ASSIGN
    phase = PH_ASSIGN;
    for (int k = 0; k < M; k++) begin
      int c;
      step = COL_W'(k);
      c = (I + J + k) % M;
      c1 = !(c == 3 || c == 4);
      c2 = (c != 6);
      #1;
      check(int'(cc) == c, $sformatf("ASSIGN %0d: counter", k));
      check(cell_we == (c == 5 || c == 7) && !cell_wd, $sformatf("ASSIGN %0d: cell write at colour %0d", k, c));
      check(ev_wait == (c == 3 || c == 4 || c == 6), $sformatf("ASSIGN %0d: wait flag", k));
      if (ev_wait) n_wait++;
      @(negedge clk);
    end
    shift = 0; c1 = 0; c2 = 0;
    // RETURN
    phase = PH_RETURN;
    step = 1; car_in = car(2, 0, 1, 6);
    #1 check(car_out == car(3, 2, 1, 5), "RETURN 1: token of input 3, colour 5");
    @(negedge clk);
    step = 2; car_in = '0;
    #1 check(car_out == car(4, 2, 1, 7), "RETURN 2: token of input 4, colour 7");
    @(negedge clk);
    step = 3; car_in = car(1, 4, 1, 2);
    #1 check(!car_out.valid, "RETURN 3: nothing to send");
    @(negedge clk);
    step = 4; car_in = '0;
    #1 check(car_out == car(1, 4, 1, 2), "RETURN 4: transit token passed on");
    @(negedge clk);
    phase = PH_RESULT;
    #1 check(res == car(2, 0, 1, 6), "result token of input 2");
    check(n_wait == 3, "three blocked steps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
