// tb_mxg_dfu: checks inner-product extraction from a cluster product.
//
// The two products of the 16-bit worked example (530965 and 198144, slice
// [15:8]) must give 26 and 6. Then random binary-segmentation inner products
// at 64 bits: the testbench packs random (un)signed elements with the largest
// legal cluster size for the widths (cw = 1 + bw_a + bw_b +
// ceil(log2(ics+1)), ics*cw <= 64), multiplies the clusters and compares the
// DFU output with the directly computed dot product.
module tb_mxg_dfu;
  int checks = 0, failures = 0;

  logic [31:0] p16;
  logic [31:0] ip16;
  mxg_dfu #(.MUL_W(16), .ACC_W(32)) u_16 (.prod(p16), .slice_lsb(7'd8), .cw(7'd8), .sgn(1'b0), .ip(ip16));

  logic [127:0] prod;
  logic [6:0]   lsb, cw;
  logic         sgn;
  logic [31:0]  ip;
  mxg_dfu u_dfu (.prod, .slice_lsb(lsb), .cw, .sgn, .ip);

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int clog2i(int v);
    int r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  initial begin
    p16 = 32'd530965; #1; chk("fig tick 3", longint'($signed(ip16)), 26);
    p16 = 32'd198144; #1; chk("fig tick 4", longint'($signed(ip16)), 6);

    for (int t = 0; t < 3000; t++) begin
      int bwa, bwb, ics, c;
      bit sa, sb;
      longint a, b, dot, ca, cb;
      bwa = $urandom_range(2, 8); bwb = $urandom_range(2, 8);
      sa = 1'($urandom_range(0, 1)); sb = 1'($urandom_range(0, 1));
      for (ics = 7; ics > 1; ics--) if (ics * (1 + bwa + bwb + clog2i(ics + 1)) <= 64) break;
      c = 1 + bwa + bwb + clog2i(ics + 1);
      dot = 0; ca = 0; cb = 0;
      for (int l = 0; l < ics; l++) begin
        a = $urandom_range(0, (1 << bwa) - 1); if (sa) a -= (1 << (bwa - 1));
        b = $urandom_range(0, (1 << bwb) - 1); if (sb) b -= (1 << (bwb - 1));
        if (t < 50) begin  // extreme values
          a = sa ? -(longint'(1) << (bwa - 1)) : (longint'(1) << bwa) - 1;
          b = sb ? -(longint'(1) << (bwb - 1)) : (longint'(1) << bwb) - 1;
          if (t % 2 == 1 && sb) b = (longint'(1) << (bwb - 1)) - 1;
        end
        dot += a * b;
        ca += a * (longint'(1) << ((ics - 1 - l) * c));
        cb += b * (longint'(1) << (l * c));
      end
      prod = 128'($signed(ca) * $signed(cb));
      prod = {{64{prod[63]}}, prod[63:0]};
      lsb = 7'((ics - 1) * c); cw = 7'(c); sgn = sa || sb;
      #1;
      chk($sformatf("a%0d%s-w%0d%s ics=%0d", bwa, sa ? "s" : "u", bwb, sb ? "s" : "u", ics),
          longint'($signed(ip)), dot);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
