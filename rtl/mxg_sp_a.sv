// mxg_sp_a: input scratchpad for the A operand, with its hardware loop.
//
// mxg.put_a writes up to two 64-bit mu-vectors per cycle, in the order the
// software library sends them: row 0 of the A mu-panel (kua vectors along the
// reduction dimension), then row 1, and so on up to row mr-1. When kua is odd
// the last put of a row carries a dummy second word, which is dropped here.
//
// Read side (hardware loop): the read pointer walks the mr*kua vectors of a
// context linearly, once per column of the C mu-panel (nr passes). At the end
// of each pass it returns to the first vector. During the last pass every
// vector is freed as soon as it has been read, so the next context can already
// be written while the current one finishes.
//
// Storage is a circular buffer of DEPTH = MR*KU words (128 B single-issue,
// 512 B dual-issue). The document builds it from latches; this RTL uses
// flip-flops. The read data is combinational from the array (rd_valid says the
// addressed word has been written); rd_pop consumes it at the clock edge.
// wr_ready is asserted when the words of the current put fit; a put held
// while wr_ready is low stalls the processor.
//
// Lint note: rst_n drives the asynchronous reset of the flip-flops and also
// the `disable iff` of the assertions, which samples it on the clock; a lint
// tool may report that as a net used both synchronously and asynchronously.
// This is intended and has no effect on the circuit.
module mxg_sp_a #(
  parameter int unsigned MR    = 8,
  parameter int unsigned KU    = 8,
  parameter int unsigned VEC_W = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,      // mxg.set: restart the loop, drop contents
  input  logic [7:0]       cfg_mr,
  input  logic [7:0]       cfg_nr,
  input  logic [7:0]       cfg_k,      // kua
  // write port (mxg.put_a)
  input  logic             wr_valid,
  input  logic [VEC_W-1:0] wr_data0,
  input  logic [VEC_W-1:0] wr_data1,
  output logic             wr_ready,
  // read port (DSU)
  output logic             rd_valid,
  output logic [VEC_W-1:0] rd_data,
  input  logic             rd_pop,
  output logic             empty
);
  localparam int unsigned DEPTH = MR * KU;
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW    = $clog2(DEPTH + 1);

  logic [VEC_W-1:0] mem [DEPTH];

  logic [AW-1:0] wr_ptr, base;
  logic [CW-1:0] count;
  logic [7:0]    wk;          // write position inside the current row
  logic [15:0]   off;         // read offset inside the context
  logic [7:0]    pass;        // read pass (column of C)

  logic [15:0] ctx_len;
  logic        last_pass;
  logic [1:0]  n_wr;
  logic        do_wr, do_free;

  function automatic logic [AW-1:0] wrap_add(input logic [AW-1:0] a, input logic [15:0] b);
    logic [16:0] s;
    s = 17'(a) + 17'(b);
    // both operands are below DEPTH, so one correction is enough
    if (s >= 17'(DEPTH)) s = s - 17'(DEPTH);
    return AW'(s);
  endfunction

  assign ctx_len   = 16'(cfg_mr) * 16'(cfg_k);
  assign last_pass = (pass == cfg_nr - 8'd1);
  assign n_wr      = ((cfg_k - wk) >= 8'd2) ? 2'd2 : 2'd1;
  assign wr_ready  = (32'(count) + 32'(n_wr)) <= DEPTH;
  assign do_wr     = wr_valid && wr_ready;
  assign do_free   = rd_pop && last_pass;
  assign empty     = (count == '0);

  // In the last pass the oldest word is always the one read.
  assign rd_valid = last_pass ? (count != '0) : (32'(off) < 32'(count));
  assign rd_data  = mem[last_pass ? base : wrap_add(base, off)];

  always_ff @(posedge clk) begin
    if (do_wr) begin
      mem[wr_ptr] <= wr_data0;
      if (n_wr == 2'd2) mem[wrap_add(wr_ptr, 16'd1)] <= wr_data1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      base   <= '0;
      count  <= '0;
      wk     <= '0;
      off    <= '0;
      pass   <= '0;
    end else if (clear) begin
      wr_ptr <= '0;
      base   <= '0;
      count  <= '0;
      wk     <= '0;
      off    <= '0;
      pass   <= '0;
    end else begin
      count <= count + (do_wr ? CW'(n_wr) : '0) - (do_free ? CW'(1) : '0);
      if (do_wr) begin
        wr_ptr <= wrap_add(wr_ptr, 16'(n_wr));
        wk     <= (wk + 8'(n_wr) >= cfg_k) ? 8'd0 : wk + 8'(n_wr);
      end
      if (do_free) base <= wrap_add(base, 16'd1);
      if (rd_pop) begin
        if (off == ctx_len - 16'd1) begin
          off  <= '0;
          pass <= last_pass ? 8'd0 : pass + 8'd1;
        end else begin
          off <= off + 16'd1;
        end
      end
    end
  end

  // A pop is only legal when the addressed word is present.
  property p_pop_valid;
    @(posedge clk) disable iff (!rst_n) rd_pop |-> rd_valid;
  endproperty
  assert property (p_pop_valid);

endmodule
