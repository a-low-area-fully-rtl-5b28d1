// tb_entropy_coder: self-checking test of run-length coder + Huffman coder +
// assembler. Zigzag-ordered blocks are generated to hit every coding case: an
// all-zero AC block (EOB only), sparse and dense blocks, runs longer than 16
// zeros (one, two and three ZRL symbols), a non-zero last coefficient (no EOB),
// AC values up to +-1023 (category 10) and DC values whose differences are
// large. The run uses 4:2:2 colour order so luminance and chrominance tables
// and all three DC predictors are used. The 32-bit output words are compared
// with the bit stream built by the reference model; output stalls are random
// in the first half of the run.
module tb_entropy_coder;
  import jpeg_ref_pkg::*;
  localparam int NBLK = 40;
  logic clk = 1'b0, rst = 1'b1;
  logic [10:0] wdata;
  logic [31:0] rdata;
  logic we, re, full, empty;
  logic color = 1'b1;
  int checks = 0, failures = 0;
  blk_t q [NBLK];
  int unsigned expw[$];
  int n_zrl = 0, n_eob = 0, n_stall = 0;

  entropy_coder dut (.clk, .rst, .color, .writeData (wdata), .writeEn (we), .full,
                     .readData (rdata), .readEn (re), .empty);

  always #5 clk = ~clk;

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

  function automatic int rnz(int m);   // random non-zero in [-m, m]
    int v;
    v = int'($urandom_range(1, m));
    return $urandom_range(0, 1) ? v : -v;
  endfunction

  initial begin
    int prev[3];
    bit bits[$];
    int words[$];
    prev = '{0, 0, 0};
    for (int b = 0; b < NBLK; b++) begin
      for (int i = 0; i < 64; i++) q[b][i] = 0;
      q[b][0] = int'($urandom_range(0, 1000)) - 500;
      case (b % 6)
        0: ;                                                   // EOB only
        1: for (int i = 1; i < 64; i++) if ($urandom_range(0, 9) == 0) q[b][i] = rnz(60);
        2: begin q[b][1] = rnz(5); q[b][20] = rnz(300); q[b][55] = rnz(7); q[b][63] = rnz(3); end
        3: for (int i = 1; i < 64; i++) q[b][i] = (i < 40) ? rnz(1023) : 0;
        4: q[b][63] = rnz(2);                                  // 62 zeros: 3 ZRL
        default: begin q[b][17] = rnz(9); q[b][50] = rnz(9); end  // 16 zeros then 32 zeros
      endcase
      words.delete();
      ref_rlc(q[b], words);
      foreach (words[k]) begin
        if (words[k] == (15 << 11)) n_zrl++;
        if (words[k] == 0) n_eob++;
        ref_code_word(words[k], ref_comp(color, b) != 0, prev[ref_comp(color, b)], bits);
      end
    end
    pop_words(bits, expw);
    $display("expected %0d words, %0d ZRL, %0d EOB", expw.size(), n_zrl, n_eob);
  end

  initial begin
    we = 0; wdata = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 64; i++) begin
        if (b % 2 == 0) while ($urandom_range(0, 4) == 0) begin
          we = 0; @(negedge clk);
        end
        we = 1; wdata = 11'(q[b][i]);
        @(posedge clk);
        while (full) @(posedge clk);
        @(negedge clk);
      end
    we = 0;
  end

  initial begin
    int n, idle;
    n = 0; idle = 0; re = 0;
    @(negedge rst);
    while (idle < 400) begin
      @(negedge clk);
      re = (n < 150) ? ($urandom_range(0, 3) != 0) : 1'b1;
      if (!re && !empty) n_stall++;
      @(posedge clk);
      idle++;
      if (re && !empty) begin
        idle = 0;
        if (n < expw.size())
          check(rdata == expw[n], $sformatf("word %0d: got %h exp %h", n, rdata, expw[n]));
        n++;
      end
    end
    check(n == expw.size(), $sformatf("word count %0d exp %0d", n, expw.size()));
    check(n_zrl >= 3 && n_eob > 0 && n_stall > 0, "ZRL, EOB and stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
