// tb_zigzag_quantizer: self-checking test of quantization in zigzag order.
// Blocks of column-major coefficients (random, extreme +-1024 and small values)
// are written with random gaps, read with random stalls, and compared with the
// reference (standard zigzag order, Q* = round(2048/Q), rounding of the
// product). Luminance and chrominance tables are both used. Checks that the
// input is refused while a block is read out (64 write + 64 read cycles per
// block when streaming) and that blk_done pulses once per block.
module tb_zigzag_quantizer;
  import jpeg_ref_pkg::*;
  localparam int NBLK = 10;
  logic clk = 1'b0, rst = 1'b1;
  logic [11:0] wdata;
  logic [10:0] rdata;
  logic we, re, full, empty, chrom, blk_done;
  int checks = 0, failures = 0;
  blk_t coef [NBLK];
  blk_t expv [NBLK];
  int done_cnt = 0, refused = 0;
  int cycle = 0, t_first [NBLK];

  zigzag_quantizer dut (.clk, .rst, .writeData (wdata), .writeEn (we), .full, .chrom,
                        .readData (rdata), .readEn (re), .empty, .blk_done);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (blk_done) done_cnt <= done_cnt + 1;
    if (we && full) refused <= refused + 1;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // chrom follows the block being read: blocks 2,3 and 6,7 are chrominance
  function automatic bit blk_chrom(int b);
    return (b % 4) >= 2;
  endfunction

  initial begin
    for (int b = 0; b < NBLK; b++) begin
      for (int i = 0; i < 64; i++) begin
        if (b == 0) coef[b][i] = (i % 2) ? -1024 : 1024;
        else if (b == 1) coef[b][i] = int'($urandom_range(0, 40)) - 20;
        else coef[b][i] = int'($urandom_range(0, 2047)) - 1024;
      end
      expv[b] = ref_quant(coef[b], blk_chrom(b));
    end
    we = 0; wdata = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 64; i++) begin
        if (b < NBLK / 2) while ($urandom_range(0, 3) == 0) begin
          we = 0; @(negedge clk);
        end
        we = 1; wdata = 12'(coef[b][i]);
        @(posedge clk);
        while (full) @(posedge clk);
        @(negedge clk);
      end
    we = 0;
  end

  initial begin
    int b, i;
    b = 0; i = 0; re = 0;
    @(negedge rst);
    while (b < NBLK) begin
      @(negedge clk);
      re = (b < NBLK / 2) ? ($urandom_range(0, 3) != 0) : 1'b1;
      @(posedge clk);
      if (re && !empty) begin
        if (i == 0) t_first[b] = cycle;
        check($signed(rdata) == 11'(expv[b][i]),
              $sformatf("blk %0d zz %0d: got %0d exp %0d", b, i, $signed(rdata), expv[b][i]));
        i++;
        if (i == 64) begin i = 0; b++; end
      end
    end
    check(done_cnt == NBLK, $sformatf("blk_done pulses %0d", done_cnt));
    check(refused > 0, "input refused during read_ram");
    for (int k = NBLK / 2 + 2; k < NBLK; k++)
      check(t_first[k] - t_first[k-1] == 128, $sformatf("streaming period %0d", t_first[k] - t_first[k-1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // chrom for the block currently read out of the RAM (changes on blk_done)
  int rd_blk = 0;
  always @(posedge clk) if (blk_done) rd_blk <= rd_blk + 1;
  assign chrom = blk_chrom(rd_blk);
endmodule
