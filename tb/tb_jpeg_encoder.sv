// tb_jpeg_encoder: end-to-end test of the JPEG encoder core at its default
// configuration.
// Two runs, each from reset: grey-scale (every block luminance) and 4:2:2
// colour (Y, Y, Cb, Cr). The image blocks mix flat blocks (EOB only), smooth
// ramps, random noise (dense coefficients), a checkerboard (a lone
// highest-frequency coefficient: three ZRL symbols before it) and the extreme
// all-0 / all-255 blocks. Every 32-bit output word is compared with a reference
// built from the fixed-point DCT, zigzag quantization, run-length and Huffman
// models. Part of each run has random input gaps and random output stalls; the
// rest streams, where the input must accept one 8x8 block every 144 cycles.
// The test counts how often each mechanism occurred (input back-pressure,
// output stall, row/column pass switch of the pong buffer, quantizer input
// refused, ZRL, EOB, chrominance tables, full output buffer) and fails any
// that never did.
module tb_jpeg_encoder;
  import jpeg_ref_pkg::*;
  localparam int NBLK = 24;
  localparam int NSTALL = 8;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] wdata;
  logic [31:0] rdata;
  logic we, re, full, empty, color;
  int checks = 0, failures = 0;
  blk_t pix [NBLK];
  int unsigned expw[$];
  int cycle = 0;
  int blk_start [NBLK];
  // mechanism counters
  int n_inbp = 0, n_outstall = 0, n_pass = 0, n_qrefuse = 0, n_zrl = 0, n_eob = 0,
      n_chrom = 0, n_obfull = 0;
  bit run_done = 0;

  jpeg_encoder dut (.clk, .rst, .color, .writeData (wdata), .writeEn (we), .full,
                    .readData (rdata), .readEn (re), .empty);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst) begin
      if (we && full) n_inbp++;
      if (dut.u_dct.u_pong.muxsel != $past(dut.u_dct.u_pong.muxsel)) n_pass++;
      if (!dut.u_dct.empty && dut.u_quant.full) n_qrefuse++;
      if (dut.u_dct.u_ob.full) n_obfull++;
    end
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void make_blocks(int seed);
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 64; i++) begin
        int r, c;
        r = i / 8; c = i % 8;
        case ((b + seed) % 6)
          0: pix[b][i] = 100 + seed;                                  // flat
          1: pix[b][i] = (r * 12 + c * 9 + b * 3) % 256;              // ramp
          2: pix[b][i] = int'($urandom_range(0, 255));                // noise
          3: pix[b][i] = ((r + c) % 2) ? 200 : 56;                    // checkerboard
          4: pix[b][i] = (b % 12 < 6) ? 0 : 255;                      // extremes
          default: pix[b][i] = 128 + ((c < 4) ? 40 : -40) + r;        // edge
        endcase
      end
  endfunction

  function automatic void make_expected(bit col);
    int prev[3];
    bit bits[$];
    int words[$];
    blk_t sh, q;
    prev = '{0, 0, 0};
    expw.delete();
    for (int b = 0; b < NBLK; b++) begin
      for (int i = 0; i < 64; i++) sh[i] = pix[b][i] - 128;
      q = ref_quant(ref_dct2(sh), ref_comp(col, b) != 0);
      words.delete();
      ref_rlc(q, words);
      foreach (words[k]) begin
        if (words[k] == (15 << 11)) n_zrl++;
        if (words[k] == 0) n_eob++;
        ref_code_word(words[k], ref_comp(col, b) != 0, prev[ref_comp(col, b)], bits);
      end
      if (ref_comp(col, b) != 0) n_chrom++;
    end
    pop_words(bits, expw);
  endfunction

  task automatic drive();
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 64; i++) begin
        if (b < NSTALL) while ($urandom_range(0, 3) == 0) begin
          we = 0; @(negedge clk);
        end
        we = 1; wdata = 8'(pix[b][i]);
        @(posedge clk);
        while (full) @(posedge clk);
        if (i == 0) blk_start[b] = cycle;
        @(negedge clk);
      end
    we = 0;
  endtask

  task automatic collect();
    int n, idle;
    bit long_done;
    n = 0; idle = 0; long_done = 0;
    while (idle < 600) begin
      @(negedge clk);
      re = (n < 60) ? ($urandom_range(0, 2) == 0) : 1'b1;
      if (n == 10 && !long_done && !empty) begin
        long_done = 1;        // one long stall: back-pressure reaches the DCT
        re = 0;
        repeat (1500) begin
          if (!empty) n_outstall++;
          @(negedge clk);
        end
      end
      if (!re && !empty) n_outstall++;
      @(posedge clk);
      idle++;
      if (re && !empty) begin
        idle = 0;
        if (n < expw.size())
          check(rdata == expw[n], $sformatf("color=%0d word %0d: got %h exp %h", color, n, rdata, expw[n]));
        n++;
      end
    end
    check(n == expw.size(), $sformatf("color=%0d word count %0d exp %0d", color, n, expw.size()));
    $display("color=%0d: %0d words checked", color, n);
  endtask

  initial begin
    we = 0; re = 0; wdata = '0;
    for (int run = 0; run < 2; run++) begin
      color = 1'(run);
      make_blocks(run);
      make_expected(color);
      rst = 1;
      repeat (3) @(posedge clk);
      rst = 0;
      @(negedge clk);
      fork
        drive();
        collect();
      join
      for (int b = NBLK - 8; b < NBLK; b++)
        check(blk_start[b] - blk_start[b-1] == 144,
              $sformatf("input block period %0d", blk_start[b] - blk_start[b-1]));
    end
    $display("mechanisms: input back-pressure %0d, output stall %0d, pass switch %0d, quantizer refusal %0d, ZRL %0d, EOB %0d, chroma blocks %0d, DCT output buffer full %0d",
             n_inbp, n_outstall, n_pass, n_qrefuse, n_zrl, n_eob, n_chrom, n_obfull);
    check(n_inbp > 0, "input back-pressure");
    check(n_outstall > 0, "output stall");
    check(n_pass > 0, "pass switch");
    check(n_qrefuse > 0, "quantizer refusal");
    check(n_zrl > 0, "ZRL");
    check(n_eob > 0, "EOB");
    check(n_chrom > 0, "chrominance blocks");
    check(n_obfull > 0, "output buffer full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
