// tb_dct_2d: self-checking test of the row-column 2-D DCT.
// Random 8x8 blocks of level-shifted samples (including the extreme all -128 and
// all +127 blocks) are pushed through, first with random input gaps and output
// stalls, then streaming. Every coefficient is compared with the fixed-point
// reference model (column-major order). The streaming phase checks the block
// period of 144 cycles between the first coefficients of consecutive blocks.
module tb_dct_2d;
  import jpeg_ref_pkg::*;
  localparam int NBLK = 24;
  localparam int NSTALL = 12;   // blocks with random gaps/stalls
  localparam int LAT = 75;      // clock edges from loading row 0 into the pong buffer to the first coefficient (76 cycles counting the load)
  logic clk = 1'b0, rst = 1'b1;
  logic [11:0] wdata, rdata;
  logic we, re, full, empty;
  int checks = 0, failures = 0;
  blk_t pix [NBLK];
  blk_t expv [NBLK];
  int first_out_cycle [NBLK];
  int row0_done [NBLK];
  int cycle = 0;
  int stall_cnt = 0;

  dct_2d dut (.clk, .rst, .writeData (wdata), .writeEn (we), .full,
              .readData (rdata), .readEn (re), .empty);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  // cycle in which the pong buffer loads row 0 of each block
  int rows_loaded = 0;
  always @(posedge clk)
    if (!rst && dut.u_pong.row_readEn && !dut.u_ping.empty) begin
      if (rows_loaded % 8 == 0 && rows_loaded / 8 < NBLK) row0_done[rows_loaded / 8] = cycle;
      rows_loaded++;
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

  // stimulus
  initial begin
    for (int b = 0; b < NBLK; b++) begin
      for (int i = 0; i < 64; i++) begin
        if (b == 0) pix[b][i] = -128;
        else if (b == 1) pix[b][i] = 127;
        else if (b % 3 == 0) pix[b][i] = int'($urandom_range(0, 255)) - 128;
        else pix[b][i] = ((i % 8) * 9 + (i / 8) * 5 + b * 7) % 256 - 128;  // smooth ramps
      end
      expv[b] = ref_dct2(pix[b]);
    end
    we = 0; wdata = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);
    for (int b = 0; b < NBLK; b++) begin
      for (int i = 0; i < 64; i++) begin
        if (b < NSTALL) while ($urandom_range(0, 3) == 0) begin
          we = 0; @(negedge clk);
        end
        we = 1; wdata = 12'(pix[b][i]);
        @(posedge clk);
        while (full) @(posedge clk);   // not accepted while full
        @(negedge clk);
      end
    end
    we = 0;
  end

  // output monitor
  initial begin
    int b, i;
    b = 0; i = 0;
    re = 0;
    @(negedge rst);
    while (b < NBLK) begin
      @(negedge clk);
      re = (b < NSTALL) ? ($urandom_range(0, 2) != 0) : 1'b1;
      if (!re && !empty) stall_cnt++;
      @(posedge clk);
      if (re && !empty) begin
        if (i == 0) first_out_cycle[b] = cycle;
        check($signed(rdata) == 12'(expv[b][i]),
              $sformatf("blk %0d coef %0d: got %0d exp %0d", b, i, $signed(rdata), expv[b][i]));
        i++;
        if (i == 64) begin i = 0; b++; end
      end
    end
    // throughput in the streaming phase
    for (int k = NSTALL + 2; k < NBLK; k++)
      check(first_out_cycle[k] - first_out_cycle[k-1] == 144,
            $sformatf("block period %0d", first_out_cycle[k] - first_out_cycle[k-1]));
    check(stall_cnt > 0, "output stalls exercised");
    // latency: pong buffer loads row 0 -> first 2-D coefficient readable
    for (int k = NSTALL + 2; k < NBLK; k++)
      check(first_out_cycle[k] - row0_done[k] == LAT,
            $sformatf("first-coefficient latency %0d", first_out_cycle[k] - row0_done[k]));
    $display("first-coefficient latency %0d cycles", first_out_cycle[NBLK-1] - row0_done[NBLK-1]);
    $display("DC of block 0 = %0d, block 1 = %0d; output stalls %0d", expv[0][0], expv[1][0], stall_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
