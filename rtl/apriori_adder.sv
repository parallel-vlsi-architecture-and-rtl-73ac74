// apriori_adder: the per-lane adders in front of the SISOs.
//
// For each of the LANES lanes, y = saturate(u + e): the systematic channel value plus
// the a-priori value, which is the extrinsic value of the previous half-iteration
// read from the interleaver memory. zero_e forces the a-priori value to 0 (first
// half-iteration). Combinational. The adders follow the document; saturation to W
// bits and zero_e are this design's choices.
module apriori_adder #(
  parameter int LANES = 16,
  parameter int W     = 8
) (
  input  logic [LANES-1:0][W-1:0] u,
  input  logic [LANES-1:0][W-1:0] e,
  input  logic                    zero_e,
  output logic [LANES-1:0][W-1:0] y
);
  always_comb begin
    for (int j = 0; j < LANES; j++) begin
      logic signed [W:0] s;
      s = {u[j][W-1], u[j]} + (zero_e ? '0 : {e[j][W-1], e[j]});
      if (s[W] != s[W-1]) y[j] = s[W] ? {1'b1, {(W-1){1'b0}}} : {1'b0, {(W-1){1'b1}}};
      else                y[j] = s[W-1:0];
    end
  end
endmodule
