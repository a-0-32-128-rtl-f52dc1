// pe_postproc: post-processing of one finished 24-bit accumulation into an
// 8-bit output activation: bias addition, scaling (multiply by an unsigned
// 8-bit factor, then arithmetic right shift), optional ReLU and truncation
// with saturation to the signed 8-bit range.
//   y = sat8( ((acc + bias) * scale) >>> shift ),  then max(y, 0) if relu
// Combinational. The list of functions (bias, ReLU, scaling, truncation)
// follows the published PE; the fixed-point format and the order of the steps
// are this design's choices. Pooling is done by the PE around this unit.
module pe_postproc #(
  parameter int unsigned ACC_W = 24,
  parameter int unsigned DW    = 8
) (
  input  logic signed [ACC_W-1:0] acc,
  input  logic signed [ACC_W-1:0] bias,
  input  logic        [7:0]       scale,
  input  logic        [4:0]       shift,
  input  logic                    relu,
  output logic signed [DW-1:0]    y
);
  localparam int unsigned PW = ACC_W + 10;
  localparam logic signed [PW-1:0] MAXV = PW'((1 << (DW - 1)) - 1);
  localparam logic signed [PW-1:0] MINV = -PW'(1 << (DW - 1));
  logic signed [PW-1:0] biased, scaled;
  always_comb begin
    biased = PW'(acc) + PW'(bias);
    scaled = (biased * $signed({2'b0, scale})) >>> shift;
    if (relu && scaled < 0)   y = '0;
    else if (scaled > MAXV)   y = DW'(MAXV);
    else if (scaled < MINV)   y = DW'(MINV);
    else                      y = DW'(scaled);
  end
endmodule
