// pe_vector_mac: the arithmetic of one PE lane. An 8-element vector of signed
// 8-bit input activations (one element per input channel) is multiplied with
// an 8-element vector of signed 8-bit weights, the eight products are summed in
// an adder tree and the sum is added to a 24-bit partial sum read from the
// accumulation buffer. When `clear` is set the partial sum is taken as zero
// (first reduction step of a new output).
// Purely combinational; the PE registers the result into its accumulation
// buffer in the same cycle, giving 8 MACs per lane per cycle.
// The vector width of 8 follows the published PE; the 8-bit signed operands
// and the 24-bit wrapping accumulator (8 lanes x 24 bits = the 192-bit
// accumulation-buffer word) are this design's reading of it.
module pe_vector_mac #(
  parameter int unsigned VEC   = 8,
  parameter int unsigned DW    = 8,
  parameter int unsigned ACC_W = 24
) (
  input  logic signed [DW-1:0]    act [VEC],
  input  logic signed [DW-1:0]    wt  [VEC],
  input  logic signed [ACC_W-1:0] acc_in,
  input  logic                    clear,
  output logic signed [ACC_W-1:0] acc_out
);
  logic signed [ACC_W-1:0] sum;
  always_comb begin
    sum = '0;
    for (int i = 0; i < VEC; i++) sum += ACC_W'(act[i]) * ACC_W'(wt[i]);
    acc_out = (clear ? '0 : acc_in) + sum;
  end
endmodule
