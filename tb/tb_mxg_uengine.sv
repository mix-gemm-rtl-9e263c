// tb_mxg_uengine: end-to-end test of the mu-engine at its default (dual-issue)
// parameters.
//
// The testbench plays the software side: it draws random narrow-integer
// matrices, packs them into 64-bit mu-vectors, sends one mxg.set, then the
// put_a/put_b sequence of each context (rows of A, then columns of B, two
// mu-vectors per put, a dummy second word when kua or kub is odd), then one
// mxg.get per C element. Instructions go through both issue slots, sometimes
// two at a time. Every result is compared with a plain integer GEMM computed
// here. The number of issued computation cycles is compared with
// mr*nr*contexts*ceil(K/(2*ics)). It also counts how often each mechanism
// occurred (put stall on a full scratchpad, get stall, paired-instruction
// stall, odd-kua/kub dummy word, mu-vector concatenation in the DSU, signed
// and mixed-width data, multi-context accumulation, next-kernel wait on an
// unread accumulator slot) and fails if one never did.
module tb_mxg_uengine;
  import mxg_pkg::*;

  localparam int unsigned NUM_MUL = 2;
  localparam int unsigned MUL_W   = 64;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0]  in_valid;
  mxg_op_e     in_op  [2];
  logic [63:0] in_rs1 [2];
  logic [63:0] in_rs2 [2];
  logic        pair_stall;
  logic [63:0] rd     [2];
  logic        mul_valid;
  logic [NUM_MUL-1:0][MUL_W-1:0]   mul_a, mul_b;
  logic [NUM_MUL-1:0][2*MUL_W-1:0] mul_res;

  mxg_uengine dut (
    .clk, .rst_n, .in_valid, .in_op, .in_rs1, .in_rs2, .pair_stall, .rd,
    .mul_valid, .mul_a, .mul_b, .mul_res
  );
  mxg_mul_model #(.NUM_MUL(NUM_MUL), .MUL_W(MUL_W), .LAT(1)) u_mul (
    .clk, .a(mul_a), .b(mul_b), .res(mul_res)
  );

  int checks = 0, failures = 0;
  // mechanism counters
  int n_put_stall = 0, n_get_stall = 0, n_pair = 0, n_pair_stall = 0, n_odd = 0;
  int n_concat = 0, n_signed = 0, n_mixed = 0, n_multictx = 0, n_resv_wait = 0;
  int n_fire = 0;

  // ---------------- instruction queue ----------------
  typedef struct {
    mxg_op_e     op;
    logic [63:0] rs1;
    logic [63:0] rs2;
    longint      exp;
  } instr_t;
  instr_t q[$];

  task automatic push(mxg_op_e op, logic [63:0] rs1, logic [63:0] rs2, longint exp);
    instr_t t;
    t.op = op; t.rs1 = rs1; t.rs2 = rs2; t.exp = exp;
    q.push_back(t);
  endtask

  task automatic check_rd(instr_t t, logic [63:0] r);
    if (t.op == MXG_GET) begin
      checks++;
      if ($signed(r) != t.exp) begin
        failures++;
        $display("FAIL get(%0d): got %0d expected %0d", t.rs1, $signed(r), t.exp);
      end
    end
  endtask

  // Issue the whole queue; pairs are formed at random.
  task automatic drain_queue();
    instr_t t0, t1;
    bit two;
    int stall;
    while (q.size() > 0) begin
      t0 = q.pop_front();
      two = (q.size() > 0) && ($urandom_range(0, 2) == 0);
      if (two) t1 = q.pop_front();
      in_valid = {two, 1'b1};
      in_op[0] = t0.op; in_rs1[0] = t0.rs1; in_rs2[0] = t0.rs2;
      if (two) begin
        in_op[1] = t1.op; in_rs1[1] = t1.rs1; in_rs2[1] = t1.rs2;
        n_pair++;
      end
      stall = 0;
      @(negedge clk);
      while (pair_stall) begin
        if (dut.i_valid && !dut.i_ready) begin
          if (dut.i_op == MXG_GET) n_get_stall++;
          if (dut.i_op == MXG_PUT_A || dut.i_op == MXG_PUT_B) n_put_stall++;
        end else if (two) begin
          n_pair_stall++;
        end
        stall++;
        @(negedge clk);
      end
      check_rd(t0, rd[0]);
      if (two) check_rd(t1, rd[1]);
      @(posedge clk);
      #1 in_valid = 2'b00;
    end
  endtask

  // ---------------- monitors ----------------
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.fire) n_fire++;
      if (dut.fire && ((dut.u_dsu.u_sel_a.need_vec && dut.u_dsu.u_sel_a.rem != 0) ||
                       (dut.u_dsu.u_sel_b.need_vec && dut.u_dsu.u_sel_b.rem != 0)))
        n_concat++;
      if (dut.u_ctrl.configured && !dut.u_ctrl.slot_free) n_resv_wait++;
    end
  end

  // ---------------- GEMM data ----------------
  int amat [8][1024];
  int bmat [1024][8];

  function automatic int rnd_el(int bw, bit sgn);
    if (sgn) return int'($urandom_range(0, (1 << bw) - 1)) - (1 << (bw - 1));
    return int'($urandom_range(0, (1 << bw) - 1));
  endfunction

  function automatic int epv_of(int bw);
    return 64 / bw;
  endfunction

  function automatic int clog2i(int v);
    int r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  // Queue one mu-kernel: set (optional), puts of every context; return config.
  task automatic queue_kernel(int bwa, int bwb, bit sa, bit sb, int mr, int nr, int k,
                              int nctx, bit do_set, output int fires_exp);
    mxg_cfg_t cfg;
    int ics, cw, epa, epb, kua, kub, kel, step;
    logic [63:0] vecs [16];
    epa = epv_of(bwa); epb = epv_of(bwb);
    kua = (k + epa - 1) / epa; kub = (k + epb - 1) / epb;
    if ((kua % 2) || (kub % 2)) n_odd++;
    if (sa || sb) n_signed++;
    if (bwa != bwb) n_mixed++;
    if (nctx > 1) n_multictx++;
    for (ics = 7; ics > 1; ics--) begin
      cw = 1 + bwa + bwb + clog2i(ics + 1);
      if (ics * cw <= 64) break;
    end
    cw = 1 + bwa + bwb + clog2i(ics + 1);
    cfg = '0;
    cfg.bw_a = 4'(bwa); cfg.bw_b = 4'(bwb); cfg.sgn_a = sa; cfg.sgn_b = sb;
    cfg.ics = 4'(ics); cfg.cw = 7'(cw); cfg.slice_lsb = 7'((ics - 1) * cw);
    cfg.kua = 8'(kua); cfg.kub = 8'(kub); cfg.mr = 8'(mr); cfg.nr = 8'(nr);
    cfg.n_ctx = 16'(nctx);
    kel = (kua * epa < kub * epb) ? kua * epa : kub * epb;
    step = NUM_MUL * ics;
    fires_exp = mr * nr * nctx * ((kel + step - 1) / step);
    // data
    for (int i = 0; i < mr; i++)
      for (int kk = 0; kk < k * nctx; kk++) amat[i][kk] = rnd_el(bwa, sa);
    for (int kk = 0; kk < k * nctx; kk++)
      for (int j = 0; j < nr; j++) bmat[kk][j] = rnd_el(bwb, sb);
    if (do_set) push(MXG_SET, cfg[63:0], cfg[127:64], 0);
    for (int c = 0; c < nctx; c++) begin
      for (int i = 0; i < mr; i++) begin
        for (int v = 0; v < kua; v++) begin
          vecs[v] = '0;
          for (int e = 0; e < epa; e++)
            if (v * epa + e < k)
              vecs[v] |= 64'((amat[i][c*k + v*epa + e]) & ((1 << bwa) - 1)) << (e * bwa);
        end
        for (int v = 0; v < kua; v += 2)
          push(MXG_PUT_A, vecs[v], (v + 1 < kua) ? vecs[v+1] : 64'd0, 0);
      end
      for (int j = 0; j < nr; j++) begin
        for (int v = 0; v < kub; v++) begin
          vecs[v] = '0;
          for (int e = 0; e < epb; e++)
            if (v * epb + e < k)
              vecs[v] |= 64'((bmat[c*k + v*epb + e][j]) & ((1 << bwb) - 1)) << (e * bwb);
        end
        for (int v = 0; v < kub; v += 2)
          push(MXG_PUT_B, vecs[v], (v + 1 < kub) ? vecs[v+1] : 64'd0, 0);
      end
    end
  endtask

  // Queue the gets of a kernel, in slot order (row + col*mr).
  task automatic queue_gets(int mr, int nr, int ktot);
    longint s;
    for (int j = 0; j < nr; j++)
      for (int i = 0; i < mr; i++) begin
        s = 0;
        for (int kk = 0; kk < ktot; kk++) s += longint'(amat[i][kk]) * longint'(bmat[kk][j]);
        push(MXG_GET, 64'(i + j * mr), 64'd0, s);
      end
  endtask

  task automatic run_case(int bwa, int bwb, bit sa, bit sb, int mr, int nr, int k, int nctx);
    int fexp, f0;
    f0 = n_fire;
    queue_kernel(bwa, bwb, sa, sb, mr, nr, k, nctx, 1'b1, fexp);
    queue_gets(mr, nr, k * nctx);
    drain_queue();
    checks++;
    if (n_fire - f0 != fexp) begin
      failures++;
      $display("FAIL a%0d-w%0d: %0d compute cycles, expected %0d", bwa, bwb, n_fire - f0, fexp);
    end
  endtask

  // Two kernels queued back to back: the second one's puts come before the
  // first one's gets, so its first reductions wait for the slots to be read.
  task automatic run_back_to_back(int bw, int mr, int nr, int k);
    instr_t g1[$];
    int fexp;
    queue_kernel(bw, bw, 1'b1, 1'b1, mr, nr, k, 1, 1'b1, fexp);
    queue_gets(mr, nr, k);
    // move the gets of kernel 1 aside
    for (int n = 0; n < mr * nr; n++) g1.push_front(q.pop_back());
    drain_queue();
    // kernel 2: same config, no new set (the engine is still busy)
    queue_kernel(bw, bw, 1'b1, 1'b1, mr, nr, k, 1, 1'b0, fexp);
    drain_queue();
    repeat (300) @(posedge clk);
    #1;
    while (g1.size() > 0) q.push_back(g1.pop_front());
    drain_queue();
    queue_gets(mr, nr, k);
    drain_queue();
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("  %-28s %0d", what, n);
    end
  endtask

  initial begin
    in_valid = '0;
    for (int s = 0; s < 2; s++) begin in_op[s] = MXG_SET; in_rs1[s] = '0; in_rs2[s] = '0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;

    run_case(8, 8, 1'b0, 1'b0, 8, 8, 64, 2);   // full scratchpads, put stalls
    run_case(8, 6, 1'b1, 1'b1, 4, 3, 30, 3);
    run_case(6, 4, 1'b0, 1'b1, 8, 8, 50, 1);
    run_case(2, 2, 1'b1, 1'b1, 2, 5, 200, 2);
    run_case(3, 7, 1'b0, 1'b0, 5, 2, 40, 1);
    run_case(5, 3, 1'b1, 1'b0, 3, 4, 61, 2);
    for (int r = 0; r < 6; r++) begin
      int bwa, bwb, mr, nr, k, epa, epb;
      bwa = $urandom_range(2, 8); bwb = $urandom_range(2, 8);
      epa = 64 / bwa; epb = 64 / bwb;
      k = $urandom_range(1, 8 * ((epa < epb) ? epa : epb));
      mr = $urandom_range(1, 8); nr = $urandom_range(1, 8);
      run_case(bwa, bwb, 1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)), mr, nr, k,
               $urandom_range(1, 3));
    end
    run_back_to_back(4, 4, 4, 48);

    $display("mechanisms:");
    need("put stall (scratchpad full)", n_put_stall);
    need("get stall (result not ready)", n_get_stall);
    need("paired mxg instructions", n_pair);
    need("pair serialisation stall", n_pair_stall);
    need("odd kua/kub dummy word", n_odd);
    need("mu-vector concatenation", n_concat);
    need("signed operands", n_signed);
    need("mixed precision", n_mixed);
    need("multi-context accumulation", n_multictx);
    need("wait for unread acc slot", n_resv_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
