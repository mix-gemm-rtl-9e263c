// mxg_acc_sp: accumulator scratchpad holding the C mu-panel.
//
// One slot per element of the mr x nr C mu-panel (slot = row + col*mr). Each
// computation cycle delivers one inner product per multiplier; they are added
// together (dual-issue) and accumulated into the slot of the reduction being
// computed. The first cycle of a reduction in the first context overwrites the
// slot, so no clearing is needed between mu-kernels; every later cycle, and
// every later context, adds to it. The partial sums stay in place across the
// kca/kua contexts of a mu-kernel and are read out once at the end.
//
// Slot handshake (this design's own): a slot is reserved (resv) when the last
// cycle of its last reduction is issued and marked done when that cycle's
// value has been written. mxg.get(idx) stalls (get_ready low) until slot idx
// is done, returns it sign-extended by the caller, and releases the slot. The
// control unit does not start the next mu-kernel's reduction into a slot that
// is still reserved, so a result is never overwritten before it is read.
//
// Storage is flip-flops (latches in the document). Accumulation is a
// read-modify-write in one cycle; get reads combinationally.
//
// Lint note: rst_n drives the asynchronous reset of the flip-flops and also
// the `disable iff` of the assertions, which samples it on the clock; a lint
// tool may report that as a net used both synchronously and asynchronously.
// This is intended and has no effect on the circuit.
//
// Slot indices are 8 bits wide at the ports (room for larger tiles); only
// the low $clog2(MR*NR) bits are used.
module mxg_acc_sp
  import mxg_pkg::*;
#(
  parameter int unsigned MR      = 8,
  parameter int unsigned NR      = 8,
  parameter int unsigned NUM_MUL = 2,
  parameter int unsigned ACC_W   = 32
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // accumulate port (from the DFUs)
  input  mxg_meta_t                       in_meta,
  input  logic [NUM_MUL-1:0][ACC_W-1:0]   in_ip,
  // reservation from the issue stage
  input  logic                            resv_set,
  input  logic [7:0]                      resv_slot,
  output logic [MR*NR-1:0]                resv,
  // mxg.get
  input  logic                            get_valid,
  input  logic [7:0]                      get_idx,
  output logic                            get_ready,
  output logic [ACC_W-1:0]                get_data
);
  localparam int unsigned SLOTS = MR * NR;
  localparam int unsigned SW    = (SLOTS > 1) ? $clog2(SLOTS) : 1;

  logic [ACC_W-1:0] mem [SLOTS];
  logic [SLOTS-1:0] done;
  logic [ACC_W-1:0] sum;
  logic             get_fire;
  logic             idx_ok;
  logic [SW-1:0]    in_s, get_s, resv_s;

  assign in_s   = in_meta.slot[SW-1:0];
  assign get_s  = get_idx[SW-1:0];
  assign resv_s = resv_slot[SW-1:0];

  always_comb begin
    sum = '0;
    for (int m = 0; m < NUM_MUL; m++) sum = sum + in_ip[m];
  end

  assign idx_ok    = (32'(get_idx) < SLOTS);
  assign get_ready = idx_ok && done[get_s];
  assign get_data  = mem[get_s];
  assign get_fire  = get_valid && get_ready;

  always_ff @(posedge clk) begin
    if (in_meta.valid) begin
      if (in_meta.first && in_meta.ctx0) mem[in_s] <= sum;
      else                               mem[in_s] <= mem[in_s] + sum;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= '0;
      resv <= '0;
    end else begin
      if (in_meta.valid && in_meta.fin) done[in_s] <= 1'b1;
      if (resv_set) resv[resv_s] <= 1'b1;
      if (get_fire) begin
        done[get_s] <= 1'b0;
        resv[get_s] <= 1'b0;
      end
    end
  end

  // A slot is only written again after it has been read out.
  property p_no_overwrite;
    @(posedge clk) disable iff (!rst_n)
      (in_meta.valid && in_meta.first && in_meta.ctx0) |-> !done[in_s];
  endproperty
  assert property (p_no_overwrite);

endmodule
