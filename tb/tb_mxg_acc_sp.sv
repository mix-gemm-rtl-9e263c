// tb_mxg_acc_sp: checks the accumulator scratchpad.
//
// Three mu-kernels of three contexts each are streamed into a 4 x 4 slot
// accumulator with two inner products per cycle and 1 to 4 cycles per
// reduction. A reference model here keeps the expected sums (the first cycle
// of the first context overwrites, everything else adds). The testbench
// checks that get is refused before a slot is final, that every slot reads
// back its exact sum, sign included, that a read releases the slot (done and
// reservation cleared), and that a new kernel overwrites instead of adding to
// the old value.
module tb_mxg_acc_sp;
  import mxg_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int S = 16;
  mxg_meta_t        in_meta;
  logic [1:0][31:0] in_ip;
  logic             resv_set, get_valid, get_ready;
  logic [7:0]       resv_slot, get_idx;
  logic [S-1:0]     resv;
  logic [31:0]      get_data;

  mxg_acc_sp #(.MR(4), .NR(4), .NUM_MUL(2), .ACC_W(32)) dut (
    .clk, .rst_n, .in_meta, .in_ip, .resv_set, .resv_slot, .resv,
    .get_valid, .get_idx, .get_ready, .get_data);

  int checks = 0, failures = 0;
  int model [S];

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int ncyc, a, b;
    in_meta = '0; in_ip = '0; resv_set = 0; resv_slot = '0; get_valid = 0; get_idx = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int kern = 0; kern < 3; kern++) begin
      for (int c = 0; c < 3; c++)
        for (int s = 0; s < S; s++) begin
          ncyc = $urandom_range(1, 4);
          for (int y = 0; y < ncyc; y++) begin
            a = $urandom_range(0, 2000) - 1000; b = $urandom_range(0, 2000) - 1000;
            in_meta.valid = 1; in_meta.slot = 8'(s);
            in_meta.first = (y == 0); in_meta.ctx0 = (c == 0);
            in_meta.fin = (c == 2) && (y == ncyc - 1);
            resv_set = in_meta.fin; resv_slot = 8'(s);
            in_ip[0] = 32'(a); in_ip[1] = 32'(b);
            model[s] = ((y == 0 && c == 0) ? 0 : model[s]) + a + b;
            // not final yet: get must be refused
            get_idx = 8'(s); #1;
            chk("get refused before final", longint'(get_ready), 0);
            @(posedge clk); #1;
          end
        end
      in_meta = '0; resv_set = 0;
      @(posedge clk); #1;
      chk("all slots reserved", longint'(resv), (1 << S) - 1);
      for (int s = S - 1; s >= 0; s--) begin
        get_idx = 8'(s); get_valid = 1; #1;
        chk("get ready when final", longint'(get_ready), 1);
        chk($sformatf("kernel %0d slot %0d", kern, s), longint'($signed(get_data)), longint'(model[s]));
        @(posedge clk); #1;
        get_valid = 0; #1;
        chk("slot released", longint'(get_ready), 0);
        chk("reservation cleared", longint'(resv[s]), 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
