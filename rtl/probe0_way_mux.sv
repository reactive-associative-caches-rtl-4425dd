// probe0_way_mux: picks the way number that indexes the direct-mapped data array.
//
// Three candidates: the direct-mapped way (low bits of the set-associative tag),
// the predicted way from the way predictor, and the probe1 way found by the tag
// compare. The select is first turned into a one-hot code and the output is a
// single AND-OR level, the logic equivalent of one level of pass gates, so that
// the select path can settle before the address arrives. The mux always has
// three inputs, whatever the associativity.
//
// Interface: sel (probe_sel_e), three WAY_W-bit way numbers; way is the chosen
// way, sel_onehot the decoded select (bit 0 d-m, bit 1 predicted, bit 2 probe1).
// Purely combinational. An undefined select code drives way 0 and is flagged by
// an assertion.
module probe0_way_mux
  import ra_pkg::*;
#(
  parameter int unsigned WAY_W = 2
) (
  input  probe_sel_e        sel,
  input  logic [WAY_W-1:0]  dm_way,
  input  logic [WAY_W-1:0]  pred_way,
  input  logic [WAY_W-1:0]  p1_way,
  output logic [2:0]        sel_onehot,
  output logic [WAY_W-1:0]  way
);

  always_comb begin
    sel_onehot[0] = (sel == SEL_P0_DM);
    sel_onehot[1] = (sel == SEL_P0_PRED);
    sel_onehot[2] = (sel == SEL_P1);
  end

  always_comb begin
    way = ({WAY_W{sel_onehot[0]}} & dm_way)
        | ({WAY_W{sel_onehot[1]}} & pred_way)
        | ({WAY_W{sel_onehot[2]}} & p1_way);
  end

  always_comb begin
    assert (sel != 2'd3 || $isunknown(sel)) else $error("probe0_way_mux: undefined select");
  end

endmodule
