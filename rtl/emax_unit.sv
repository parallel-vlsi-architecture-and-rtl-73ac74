// emax_unit: the E-function operator of the log-domain MAP algorithm,
// y = max(a,b) + ln(1 + exp(-|a-b|)), evaluated combinationally.
//
// The correction term comes from a four-entry table for soft values scaled to
// 1/4 nat per LSB: 3 for |a-b| = 0, 2 for 1..3, 1 for 4..8 and 0 above. The operator
// and its use follow the document; the scaling and table are this design's choice.
// Inputs and output are W-bit two's complement; the caller keeps enough headroom
// (the output can exceed max(a,b) by 3).
module emax_unit #(
  parameter int W = 16
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] y
);
  logic signed [W:0]   diff;
  logic        [W:0]   mag;
  logic signed [W-1:0] mx;
  logic        [1:0]   corr;

  always_comb begin
    diff = {a[W-1], a} - {b[W-1], b};
    mag  = diff[W] ? -diff : diff;
    mx   = diff[W] ? b : a;
    if (mag == '0)             corr = 2'd3;
    else if (mag <= (W+1)'(3)) corr = 2'd2;
    else if (mag <= (W+1)'(8)) corr = 2'd1;
    else                       corr = 2'd0;
    y = mx + W'(corr);
  end
endmodule
