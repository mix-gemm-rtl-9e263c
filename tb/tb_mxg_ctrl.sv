// tb_mxg_ctrl: checks the Control Unit's configuration and sequencing.
//
// Single-multiplier instance (NUM_MUL = 1, 4 x 4 panel). For the three data
// size examples of the document (a8-w8, a8-w6, a6-w4, with 4/4, 4/3 and 3/2
// mu-vectors per reduction) it checks elements per mu-vector, that each
// reduction takes 11, 10 and 8 issued cycles, that n_take sums to K, that the
// slots are visited row-inner/column-outer for every context, that only the
// last cycle of the last context is marked final, that nothing issues while
// a needed operand is missing, and that a reserved slot holds back the first
// cycle of a new kernel.
module tb_mxg_ctrl;
  import mxg_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         set_fire, clear, idle, need_a, need_b, sp_a_valid, sp_b_valid;
  logic [127:0] set_data;
  mxg_cfg_t     cfg;
  logic [5:0]   epv_a, epv_b;
  logic [15:0]  resv;
  logic         fire, red_last, resv_set;
  logic [4:0]   n_take;
  mxg_meta_t    meta;
  logic [7:0]   resv_slot;

  mxg_ctrl #(.MR(4), .NR(4), .NUM_MUL(1)) dut (
    .clk, .rst_n, .set_fire, .set_data, .clear, .idle, .cfg, .epv_a, .epv_b,
    .need_a, .need_b, .sp_a_valid, .sp_b_valid, .resv, .fire, .n_take, .red_last,
    .meta, .resv_set, .resv_slot);

  int checks = 0, failures = 0;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run(int bwa, int bwb, int kua, int kub, int ics, int cw, int exp_epa,
                     int exp_epb, int exp_cyc);
    mxg_cfg_t c;
    int cyc, ksum, nfin;
    c = '0;
    c.bw_a = 4'(bwa); c.bw_b = 4'(bwb); c.ics = 4'(ics); c.cw = 7'(cw);
    c.slice_lsb = 7'((ics - 1) * cw); c.kua = 8'(kua); c.kub = 8'(kub);
    c.mr = 8'd4; c.nr = 8'd4; c.n_ctx = 16'd2;
    set_data = 128'(c); set_fire = 1;
    @(posedge clk); #1 set_fire = 0;
    chk("epv_a", epv_a, exp_epa);
    chk("epv_b", epv_b, exp_epb);
    nfin = 0;
    for (int x = 0; x < 2; x++)
      for (int j = 0; j < 4; j++)
        for (int i = 0; i < 4; i++) begin
          cyc = 0; ksum = 0;
          forever begin
            need_a = 1'($urandom_range(0, 1)); need_b = 1'($urandom_range(0, 1));
            sp_a_valid = 1'($urandom_range(0, 3) != 0); sp_b_valid = 1'($urandom_range(0, 3) != 0);
            #1;
            chk("fire rule", fire, (!need_a || sp_a_valid) && (!need_b || sp_b_valid));
            if (fire) begin
              chk("slot order", meta.slot, i + 4 * j);
              chk("first flag", meta.first, cyc == 0);
              chk("ctx0 flag", meta.ctx0, x == 0);
              if (meta.fin) nfin++;
              chk("final flag", meta.fin, (x == 1) && red_last);
              cyc++; ksum += n_take;
              if (red_last) begin
                @(posedge clk); #1;
                break;
              end
            end
            @(posedge clk); #1;
          end
          chk($sformatf("a%0d-w%0d cycles per reduction", bwa, bwb), cyc, exp_cyc);
          chk("elements per reduction", ksum,
              (kua * exp_epa < kub * exp_epb) ? kua * exp_epa : kub * exp_epb);
        end
    chk("final cycles", nfin, 16);
  endtask

  initial begin
    set_fire = 0; set_data = '0; need_a = 0; need_b = 0; sp_a_valid = 0; sp_b_valid = 0;
    resv = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run(8, 8, 4, 4, 3, 19, 8, 8, 11);
    run(8, 6, 4, 3, 3, 17, 8, 10, 10);
    run(6, 4, 3, 2, 4, 14, 10, 16, 8);
    // a reserved slot 0 holds back the next kernel's first reduction
    resv = 16'h0001; need_a = 0; need_b = 0; #1;
    chk("reserved slot blocks issue", fire, 0);
    resv = 16'h0002; #1;
    chk("other slot does not block", fire, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
