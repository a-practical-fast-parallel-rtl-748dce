// crossbar: one crossbar module of the Clos network, NI inputs by NO outputs.
//
// The network is self-routing: every active input carries, next to its
// payload, the index of the output it must be switched to (`in_sel`). Each
// output takes the payload of the input that selects it. Routes produced by
// a proper edge colouring never make two inputs select the same output; if
// that happens anyway the lowest-numbered input wins and `conflict` is
// raised for that cycle. Purely combinational.
module crossbar #(
  parameter int unsigned NI = 5,
  parameter int unsigned NO = 9,
  parameter int unsigned PW = 8
) (
  input  logic [NI-1:0]               in_valid,
  input  logic [$clog2(NO)-1:0]       in_sel  [NI],
  input  logic [PW-1:0]               in_data [NI],
  output logic [NO-1:0]               out_valid,
  output logic [PW-1:0]               out_data [NO],
  output logic                        conflict
);
  always_comb begin
    out_valid = '0;
    conflict  = 1'b0;
    for (int o = 0; o < NO; o++) out_data[o] = '0;
    for (int k = NI - 1; k >= 0; k--) begin
      if (in_valid[k] && int'(in_sel[k]) < NO) begin
        if (out_valid[in_sel[k]]) conflict = 1'b1;
        out_valid[in_sel[k]] = 1'b1;
        out_data[in_sel[k]]  = in_data[k];
      end
    end
  end

  initial begin
    assert (NI >= 1 && NO >= 2) else $error("crossbar: need NI >= 1, NO >= 2");
  end
endmodule
