// probe1_way_encoder: turns the tag match lines into the probe1 way number and
// the overall hit.
//
// After probe0 the tag side knows where the block is: the match line that is set
// is encoded to a binary way number, which the probe0 way# mux uses for probe1.
// The OR of all match lines is the overall hit (the block is somewhere in the
// set). At most one way can match; if several did, the lowest is taken and an
// assertion fires.
//
// Interface: match (one bit per way) -> way (binary), hit. Purely combinational.
module probe1_way_encoder #(
  parameter int unsigned WAYS  = 4,
  parameter int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic [WAYS-1:0]  match,
  output logic [WAY_W-1:0] way,
  output logic             hit
);

  always_comb begin
    way = '0;
    for (int i = WAYS - 1; i >= 0; i--) if (match[i]) way = WAY_W'(i);
    hit = |match;
  end

endmodule
