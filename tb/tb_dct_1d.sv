// tb_dct_1d: self-checking test of the time-shared 1-D DCT.
// Random rows and coefficient indices (and the extreme rows of all -128 /
// all +127 and coefficient-sized inputs) are offered with random gaps; each
// result is compared with the reference, whose weights are computed from the
// DCT-II basis with $cos. Row-pass results must appear on tr_writeEn one cycle
// after acceptance; column-pass results on ob_writeEn, held while the output
// buffer is full, with full raised towards the pong buffer meanwhile.
module tb_dct_1d;
  import jpeg_ref_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic [95:0] wdata;
  logic [2:0] k;
  logic twod, we, full, tr_we, ob_we, ob_full;
  logic [11:0] coef;
  int checks = 0, failures = 0;
  int expq[$], expt[$];
  int n_bp = 0;

  dct_1d dut (.clk, .rst, .writeData (wdata), .coef_idx (k), .twod_in (twod),
              .writeEn (we), .full, .coef_out (coef), .tr_writeEn (tr_we),
              .ob_writeEn (ob_we), .ob_full);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer side: compare every coefficient that leaves
  always @(posedge clk) begin
    if (!rst) begin
      if (full) n_bp++;
      if (tr_we || (ob_we && !ob_full)) begin
        check(expq.size() > 0, "unexpected output");
        if (expq.size() > 0) begin
          check($signed(coef) == 12'(expq[0]), $sformatf("coef got %0d exp %0d", $signed(coef), expq[0]));
          check(tr_we == (expt[0] == 0) && ob_we == (expt[0] == 1), "routed to the right buffer");
          void'(expq.pop_front());
          void'(expt.pop_front());
        end
      end
    end
  end

  initial begin
    int x[8];
    we = 0; wdata = '0; k = '0; twod = 0; ob_full = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      ob_full = ($urandom_range(0, 3) == 0);
      we = ($urandom_range(0, 4) != 0);
      twod = (n % 200) >= 100;
      k = 3'($urandom);
      for (int i = 0; i < 8; i++) begin
        case (n % 50)
          0: x[i] = -128;
          1: x[i] = 127;
          default: x[i] = twod ? int'($urandom_range(0, 1000)) - 500 : int'($urandom_range(0, 255)) - 128;
        endcase
        wdata[i*12 +: 12] = 12'(x[i]);
      end
      @(posedge clk);
      if (we && !full) begin
        expq.push_back(ref_dct1(x, int'(k)));
        expt.push_back(int'(twod));
      end
    end
    @(negedge clk);
    we = 0; ob_full = 0;
    repeat (5) @(posedge clk);
    check(expq.size() == 0, "all results delivered");
    check(n_bp > 0, "back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
