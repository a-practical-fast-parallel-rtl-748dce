// tb_crossbar: checks a 5 x 9 crossbar module. Random sets of inputs are
// switched to distinct random outputs and every output must carry exactly
// the payload of the input that selected it; two inputs selecting the same
// output must raise `conflict`.
module tb_crossbar;
  localparam int NI = 5;
  localparam int NO = 9;
  localparam int PW = 8;
  logic [NI-1:0] in_valid;
  logic [$clog2(NO)-1:0] in_sel [NI];
  logic [PW-1:0] in_data [NI];
  logic [NO-1:0] out_valid;
  logic [PW-1:0] out_data [NO];
  logic conflict;
  int checks = 0, failures = 0;

  crossbar #(.NI(NI), .NO(NO), .PW(PW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int outs [NO];
    int src [NO];
    for (int t = 0; t < 200; t++) begin
      for (int o = 0; o < NO; o++) begin outs[o] = o; src[o] = -1; end
      outs.shuffle();
      for (int k = 0; k < NI; k++) begin
        in_valid[k] = ($urandom_range(3) != 0);
        in_sel[k]   = 4'(outs[k]);
        in_data[k]  = 8'($urandom);
        if (in_valid[k]) src[outs[k]] = k;
      end
      #1;
      check(!conflict, "conflict without collision");
      for (int o = 0; o < NO; o++) begin
        check(out_valid[o] == (src[o] >= 0), $sformatf("out_valid[%0d]", o));
        if (src[o] >= 0) check(out_data[o] == in_data[src[o]], $sformatf("out_data[%0d]", o));
      end
    end
    // collision
    in_valid = '1;
    for (int k = 0; k < NI; k++) begin in_sel[k] = 4'(k); in_data[k] = 8'(k + 1); end
    in_sel[3] = 4'd1;
    #1;
    check(conflict, "collision not flagged");
    check(out_data[1] == 8'd2, "lowest input wins");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
