// mxg_dfu: Data Filtering Unit, extracts the inner product from a product.
//
// The product of two input-clusters holds the wanted inner product in the
// cw-bit slice [slice_lsb + cw - 1 : slice_lsb], with slice_lsb = (ics-1)*cw
// (Eq. 3 to 5 of binary segmentation). Lower partial sums sit below the slice
// and higher ones above it.
//
// For unsigned operands the slice is taken as is. When either operand is
// signed the lower partial sums can be negative and borrow one unit out of the
// slice; this design then adds bit slice_lsb-1 to the slice (round to nearest),
// which restores the exact value because the cw bound keeps the lower sums
// below half a slice unit. The cw-bit field is sign-extended (signed) or
// zero-extended (unsigned) to ACC_W bits. The rounding step is this design's
// own; the slice is the document's.
//
// Purely combinational; the caller registers the result.
module mxg_dfu #(
  parameter int unsigned MUL_W = 64,
  parameter int unsigned ACC_W = 32
) (
  input  logic [2*MUL_W-1:0] prod,
  input  logic [6:0]         slice_lsb,
  input  logic [6:0]         cw,
  input  logic               sgn,      // either operand signed
  output logic [ACC_W-1:0]   ip
);
  always_comb begin
    logic [2*MUL_W-1:0] s;
    logic [2*MUL_W-1:0] f;
    logic [2*MUL_W-1:0] m;
    s = prod >> slice_lsb;
    if (sgn && (slice_lsb != 7'd0)) s = s + (2*MUL_W)'(prod[slice_lsb-7'd1]);
    m = ((2*MUL_W)'(1) << cw) - (2*MUL_W)'(1);
    f = s & m;
    if (sgn && s[cw-7'd1]) f = f | ~m;
    ip = f[ACC_W-1:0];
  end
endmodule
