// mxg_pkg: types and helper functions shared by the mu-engine blocks.
//
// The mu-engine is driven by four R-type instructions (set, put_a, put_b,
// get). This package defines their opcode encoding, the layout of the
// configuration word written by mxg.set, the bookkeeping that travels with a
// computation through the pipeline, and the "elements per mu-vector" rule of
// the packed data format (floor(64/bw) narrow elements per 64-bit word, the
// unused top bits set to zero).
//
// The opcode values and the bit layout of the configuration word are this
// design's own choice; the set of fields follows the description of mxg.set
// (data sizes, signedness, number of vectors to reduce, input-cluster size,
// clustering width and result slice).
package mxg_pkg;

  // Width of a mu-vector, the unit moved by put_a/put_b.
  localparam int unsigned VEC_W = 64;

  // Instruction selector seen by the mu-engine (funct field of the R-type op).
  typedef enum logic [1:0] {
    MXG_SET   = 2'd0,
    MXG_PUT_A = 2'd1,
    MXG_PUT_B = 2'd2,
    MXG_GET   = 2'd3
  } mxg_op_e;

  // Configuration word, carried in rs1 (low 64 bits) and rs2 (high 64 bits)
  // of mxg.set. Field order is MSB first.
  typedef struct packed {
    logic [63:0] rsvd_hi;   // rs2[63:0] upper part unused
    logic [15:0] n_ctx;     // contexts (kca/kua) accumulated before a result is final
    logic [7:0]  nr;        // columns of the C mu-panel
    logic [7:0]  mr;        // rows of the C mu-panel
    logic [7:0]  kub;       // B mu-vectors per reduction
    logic [7:0]  kua;       // A mu-vectors per reduction
    logic [6:0]  slice_lsb; // Eq. (4): (ics-1)*cw
    logic [6:0]  cw;        // clustering width
    logic [3:0]  ics;       // input-cluster size (elements per multiplication)
    logic        sgn_b;     // B elements are two's complement
    logic        sgn_a;     // A elements are two's complement
    logic [3:0]  bw_b;      // B element width, 2..8
    logic [3:0]  bw_a;      // A element width, 2..8
  } mxg_cfg_t;

  // Bookkeeping of one issued computation cycle.
  typedef struct packed {
    logic       valid;
    logic [7:0] slot;   // Acc SP slot, row + col*mr
    logic       first;  // first cycle of a reduction
    logic       ctx0;   // first context: overwrite instead of accumulate
    logic       fin;    // last cycle of the last context: result is final
  } mxg_meta_t;

  // Narrow elements that fit in one 64-bit mu-vector.
  function automatic logic [5:0] elems_per_vec(input logic [3:0] bw);
    case (bw)
      4'd2:    return 6'd32;
      4'd3:    return 6'd21;
      4'd4:    return 6'd16;
      4'd5:    return 6'd12;
      4'd6:    return 6'd10;
      4'd7:    return 6'd9;
      4'd8:    return 6'd8;
      default: return 6'd8;
    endcase
  endfunction

endpackage
