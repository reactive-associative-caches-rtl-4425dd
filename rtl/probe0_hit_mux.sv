// probe0_hit_mux: forms the probe0 hit signal.
//
// Every tag bank of the set is compared in parallel; this mux selects the match
// line of the way that probe0 read from the data array (the direct-mapped or the
// predicted way). The way number is decoded to one-hot first, so the select is
// ready before the match lines arrive and the mux adds one AND-OR level.
//
// Interface: match (one bit per way), way (binary probe0 way number); hit is
// match[way]. Purely combinational.
module probe0_hit_mux #(
  parameter int unsigned WAYS  = 4,
  parameter int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic [WAYS-1:0]  match,
  input  logic [WAY_W-1:0] way,
  output logic             hit
);

  logic [WAYS-1:0] onehot;

  always_comb begin
    for (int i = 0; i < WAYS; i++) onehot[i] = (way == WAY_W'(i));
    hit = |(onehot & match);
  end

endmodule
