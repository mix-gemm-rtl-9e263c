// tb_mxg_workloads: every activation/weight bit-width pair of the throughput
// table (a2-w2 up to a8-w8, activations at least as wide as weights) run
// through the engine at its default (dual-issue) parameters.
//
// For each pair the testbench computes a full 8 x 8 mu-kernel with the deepest
// reduction the scratchpads allow in one context (ku = 8 mu-vectors of the
// wider operand), in two contexts, with random signedness. It checks every C
// element against a plain integer GEMM and the number of issued computation
// cycles against mr*nr*contexts*ceil(K/(2*ics)), then prints the MAC/cycle the
// engine reached on the kernel (issue cycles only, puts and gets excluded).
// Then it computes two complete 128 x 128 x 128 GEMMs (the smallest square
// size of the throughput study), a8-w8 and a4-w2, tiled into 8 x 8 blocks of
// C exactly as the software would, checks all 16384 results of each and the
// compute-cycle count, and prints the overall MAC/cycle including the put and
// get instructions (with no memory stalls, since no core is modelled).
// The instruction driver, packing and golden model are the same as in the
// end-to-end testbench.
module tb_mxg_workloads;
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

  // Full square GEMM operands; when keep_data is set, queue_kernel packs the
  // tile already copied into amat/bmat instead of drawing a random one.
  localparam int unsigned GN = 128;
  int     ga [GN][GN];
  int     gb [GN][GN];
  bit     keep_data = 1'b0;
  longint clk_count = 0;
  always @(posedge clk) clk_count++;

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
    if (!keep_data) begin
      for (int i = 0; i < mr; i++)
        for (int kk = 0; kk < k * nctx; kk++) amat[i][kk] = rnd_el(bwa, sa);
      for (int kk = 0; kk < k * nctx; kk++)
        for (int j = 0; j < nr; j++) bmat[kk][j] = rnd_el(bwb, sb);
    end
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

  // C = A x B for GN x GN x GN matrices, tiled as the software does it: one
  // mxg.set, then for each 8 x 8 tile of C (rows inner, columns outer) the
  // puts of all contexts and the 64 gets. Each context covers as many
  // elements as ku = 8 mu-vectors of the wider operand hold.
  task automatic run_gemm(int bwa, int bwb, bit sa, bit sb);
    int epa, epb, kctx, nctx, fexp, f0, ftot;
    longint c0;
    epa = 64 / bwa; epb = 64 / bwb;
    kctx = 8 * ((epa < epb) ? epa : epb);
    if (kctx > GN) kctx = GN;
    nctx = GN / kctx;
    for (int i = 0; i < GN; i++)
      for (int j = 0; j < GN; j++) begin
        ga[i][j] = rnd_el(bwa, sa);
        gb[i][j] = rnd_el(bwb, sb);
      end
    keep_data = 1'b1;
    f0 = n_fire; ftot = 0;
    c0 = clk_count;
    for (int jt = 0; jt < GN / 8; jt++)
      for (int it = 0; it < GN / 8; it++) begin
        for (int i = 0; i < 8; i++)
          for (int kk = 0; kk < GN; kk++) amat[i][kk] = ga[it * 8 + i][kk];
        for (int kk = 0; kk < GN; kk++)
          for (int j = 0; j < 8; j++) bmat[kk][j] = gb[kk][jt * 8 + j];
        queue_kernel(bwa, bwb, sa, sb, 8, 8, kctx, nctx, (it == 0 && jt == 0), fexp);
        queue_gets(8, 8, GN);
        drain_queue();
        ftot += fexp;
      end
    keep_data = 1'b0;
    checks++;
    if (n_fire - f0 != ftot) begin
      failures++;
      $display("FAIL GEMM a%0d-w%0d: %0d compute cycles, expected %0d", bwa, bwb, n_fire - f0, ftot);
    end
    $display("GEMM %0dx%0dx%0d a%0d-w%0d: %0d clock cycles, %0d compute cycles, %0d.%02d MAC/cycle overall",
             GN, GN, GN, bwa, bwb, clk_count - c0, n_fire - f0,
             (GN * GN * GN) / (clk_count - c0), ((100 * GN * GN * GN) / (clk_count - c0)) % 100);
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

    for (int bwa = 2; bwa <= 8; bwa++) begin
      for (int bwb = 2; bwb <= bwa; bwb++) begin
        int epa, epb, k, ics, f0;
        epa = 64 / bwa; epb = 64 / bwb;
        k = 8 * ((epa < epb) ? epa : epb);
        for (ics = 7; ics > 1; ics--) if (ics * (1 + bwa + bwb + clog2i(ics + 1)) <= 64) break;
        f0 = n_fire;
        run_case(bwa, bwb, 1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)), 8, 8, k, 2);
        $display("a%0d-w%0d: ics %0d, K %0d, %0d cycles per reduction, %0d MAC/cycle", bwa, bwb,
                 ics, k, (k + 2 * ics - 1) / (2 * ics), (128 * k) / (n_fire - f0));
      end
    end
    run_gemm(8, 8, 1'b1, 1'b1);
    run_gemm(4, 2, 1'b0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
