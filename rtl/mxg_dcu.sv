// mxg_dcu: Data Conversion Unit, builds one input-cluster.
//
// Binary segmentation turns an inner product of ics narrow elements into one
// wide multiplication: the elements of each operand are placed cw bits apart
// in a multiplier operand (the input-cluster), with one operand in reversed
// order. The product then holds the inner product in the slice starting at
// (ics-1)*cw. This block takes the elements [base, base+ics) of an element
// window (element e at bits [e*bw +: bw]), zero- or sign-extends each one and
// places lane l at bit (ics-1-l)*cw (REVERSE = 0, the A operand) or at bit
// l*cw (REVERSE = 1, the reversed B operand), following the packing of the
// worked example of the document (a = 4,7 -> 1031; b reversed -> 515 with
// cw = 8).
//
// Elements at or past n_valid (beyond the end of the reduction) are zero. The
// lanes are merged by addition, which equals the OR of the document's figure
// for unsigned data and keeps negative elements exact for signed data.
// Purely combinational.
module mxg_dcu #(
  parameter int unsigned VEC_W   = 64,
  parameter int unsigned MUL_W   = 64,
  parameter int unsigned ICS_MAX = 7,
  parameter bit          REVERSE = 1'b0
) (
  input  logic [2*VEC_W-1:0] window,
  input  logic [4:0]         base,     // index of the first element used
  input  logic [4:0]         n_valid,  // elements of the window that are real
  input  logic [3:0]         ics,
  input  logic [6:0]         cw,
  input  logic [3:0]         bw,
  input  logic               sgn,
  output logic [MUL_W-1:0]   cluster
);
  always_comb begin
    logic [MUL_W-1:0] acc;
    logic [2*VEC_W-1:0] raw;
    logic [MUL_W-1:0] el;
    logic [7:0] mask;
    logic [4:0] idx;
    logic [11:0] pos;
    acc = '0;
    raw = '0;
    el  = '0;
    idx = '0;
    pos = '0;
    mask = 8'((9'd1 << bw) - 9'd1);
    for (int l = 0; l < ICS_MAX; l++) begin
      idx = base + 5'(l);
      if ((4'(l) < ics) && (idx < n_valid)) begin
        raw = window >> (8'(idx) * 8'(bw));
        el  = MUL_W'(raw[7:0] & mask);
        if (sgn && raw[7'(bw) - 7'd1]) el = el | ~MUL_W'(mask);
        pos = REVERSE ? 12'(l) * 12'(cw) : (12'(ics) - 12'd1 - 12'(l)) * 12'(cw);
        acc = acc + (el << pos);
      end
    end
    cluster = acc;
  end
endmodule
