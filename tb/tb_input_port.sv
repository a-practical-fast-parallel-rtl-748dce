// tb_input_port: checks the connection state of input I(i,3).
//   1. add (group 3, port 1): CAR request only; colour 6 comes back and the
//      input is connected with header (6, 3, 1).
//   2. add (group 0, port 4) while connected: CAR plus a CDR request for
//      (3, 6); the old connection ends at PREP; an uncoloured token raises
//      route_fail and leaves the input unconnected.
//   3. add again, coloured 2; then delete: CDR request only, connection ends.
//   4. packet mode: a connection is dropped at the next PREP without a CDR
//      request.
module tb_input_port;
  import dpr_pkg::*;
  localparam int N = 5, M = 9, P = 3;
  logic clk = 0, rst_n = 0;
  logic add = 0, del = 0, req_taken = 0, cycle_packet = 0, res_valid = 0;
  logic [IDX_W-1:0] add_grp = '0, add_port = '0;
  req_t req;
  token_t res = '0;
  logic conn_valid, pending, route_fail;
  logic [IDX_W-1:0] conn_grp, conn_port;
  logic [COL_W-1:0] conn_color;
  int checks = 0, failures = 0;

  input_port #(.N(N), .M(M), .P(P)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic request(input bit a, input int g, input int q, input bit d);
    add = a; add_grp = IDX_W'(g); add_port = IDX_W'(q); del = d;
    @(negedge clk);
    add = 0; del = 0;
    check(pending, "request pending");
  endtask

  // One routing cycle: PREP, some steps, RESULT with the given token.
  task automatic route(input bit ra, input int rg, input bit rd, input int dg, input int dc,
                       input bit colored, input int col, input string what);
    req_taken = 1;
    #1;
    check(req.add == ra && (!ra || int'(req.add_grp) == rg), {what, ": CAR request"});
    check(req.del == rd && (!rd || (int'(req.del_grp) == dg && int'(req.del_color) == dc)), {what, ": CDR request"});
    @(negedge clk);
    req_taken = 0;
    if (rd || cycle_packet) check(!conn_valid, {what, ": connection ends at PREP"});
    repeat (5) @(negedge clk);
    res_valid = 1;
    res = '{valid: ra, del: 1'b0, src: idx_t'(P), grp: idx_t'(rg), colored: colored, color: color_t'(col)};
    @(negedge clk);
    res_valid = 0; res = '0;
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!conn_valid && !pending, "idle after reset");
    request(1, 3, 1, 0);
    route(1, 3, 0, 0, 0, 1, 6, "first add");
    check(conn_valid && conn_grp == 3 && conn_port == 1 && conn_color == 6 && !pending, "connected (6,3,1)");
    request(1, 0, 4, 0);
    req_taken = 1;
    #1 check(req.add && req.del && req.del_grp == 3 && req.del_color == 6, "replace issues CAR and CDR");
    req_taken = 0;
    route(1, 0, 1, 3, 6, 0, 0, "replace");
    #1 check(route_fail && !conn_valid, "uncoloured token: route_fail");
    @(negedge clk);
    check(!route_fail, "route_fail is a pulse");
    request(1, 0, 4, 0);
    route(1, 0, 0, 0, 0, 1, 2, "retry");
    check(conn_valid && conn_grp == 0 && conn_port == 4 && conn_color == 2, "connected (2,0,4)");
    request(0, 0, 0, 1);
    route(0, 0, 1, 0, 2, 0, 0, "delete");
    check(!conn_valid && !pending, "deleted");
    // packet mode
    cycle_packet = 1;
    request(1, 2, 2, 0);
    route(1, 2, 0, 0, 0, 1, 5, "packet slot 1");
    check(conn_valid && conn_color == 5, "connected for one slot");
    route(0, 0, 0, 0, 0, 0, 0, "packet slot 2");
    check(!conn_valid, "dropped at the next slot");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
