// tb_rlc: self-checking test of the run-length coder.
// Zigzag blocks cover: all-zero AC (EOB only), sparse random, runs of exactly
// 16, 32 and 62 zeros (one to three ZRL symbols, pending ZRLs dropped by EOB),
// a non-zero last coefficient (no EOB) and dense blocks. The output words
// {dc, run, value} are compared with the standard run-length algorithm, with
// random input gaps and output stalls. In a streaming phase a block without ZRLs
// must take exactly 64 input cycles.
module tb_rlc;
  import jpeg_ref_pkg::*;
  localparam int NBLK = 36;
  logic clk = 1'b0, rst = 1'b1;
  logic [10:0] wdata;
  logic [15:0] rdata;
  logic we, re, full, empty;
  int checks = 0, failures = 0;
  blk_t q [NBLK];
  int expw[$];
  int n_zrl = 0, n_eob = 0, cycle = 0, t_in[NBLK];

  rlc dut (.clk, .rst, .writeData (wdata), .writeEn (we), .full,
           .readData (rdata), .readEn (re), .empty);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < NBLK; b++) begin
      for (int i = 0; i < 64; i++) q[b][i] = 0;
      q[b][0] = int'($urandom_range(0, 2047)) - 1024;
      case (b % 6)
        0: ;
        1: for (int i = 1; i < 64; i++) if ($urandom_range(0, 7) == 0) q[b][i] = int'($urandom_range(1, 30));
        2: begin q[b][17] = 5; q[b][50] = -3; end          // 16 zeros, then 32 zeros
        3: q[b][63] = -1;                                   // 62 zeros then last
        4: begin q[b][2] = 7; q[b][18] = 2; q[b][40] = 1; end  // runs of 15 and 21 zeros
        default: for (int i = 1; i < 64; i++) q[b][i] = int'($urandom_range(0, 2046)) - 1023;
      endcase
      ref_rlc(q[b], expw);
    end
    foreach (expw[i]) begin
      if (expw[i] == (15 << 11)) n_zrl++;
      if (expw[i] == 0) n_eob++;
    end
  end

  initial begin
    we = 0; wdata = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 64; i++) begin
        if (b < NBLK / 2) while ($urandom_range(0, 3) == 0) begin we = 0; @(negedge clk); end
        we = 1; wdata = 11'(q[b][i]);
        @(posedge clk);
        while (full) @(posedge clk);
        if (i == 0) t_in[b] = cycle;
        @(negedge clk);
      end
    we = 0;
  end

  initial begin
    int n, idle;
    n = 0; idle = 0; re = 0;
    @(negedge rst);
    while (idle < 200) begin
      @(negedge clk);
      re = (n < expw.size() / 2) ? ($urandom_range(0, 2) != 0) : 1'b1;
      @(posedge clk);
      idle++;
      if (re && !empty) begin
        idle = 0;
        if (n < expw.size())
          check(rdata == 16'(expw[n]), $sformatf("word %0d: got %h exp %h", n, rdata, 16'(expw[n])));
        n++;
      end
    end
    check(n == expw.size(), $sformatf("word count %0d exp %0d", n, expw.size()));
    // streaming: blocks 30 (no AC), 31 (sparse) need no ZRL: 64 cycles each
    check(t_in[31] - t_in[30] == 64, $sformatf("block of 64 coefficients in %0d cycles", t_in[31] - t_in[30]));
    check(n_zrl > 0 && n_eob > 0, "ZRL and EOB exercised");
    $display("ZRL %0d EOB %0d", n_zrl, n_eob);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
