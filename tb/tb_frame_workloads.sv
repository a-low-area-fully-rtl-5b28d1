// tb_frame_workloads: whole-frame runs at the video formats the core is rated
// for: 720x480 (SDTV) and 1280x720 (HD Ready), each in grey scale and in 4:2:2
// colour. A synthetic picture (gradients plus texture) is cut into 8x8 blocks,
// in colour as minimum coded units Y(left) Y(right) Cb Cr covering 16x8
// pixels. Pixels stream in without gaps and the output is always read; every
// 32-bit word is compared with the reference model. The test checks that a
// frame needs no more than 144 cycles per block (plus the pipeline latency)
// and prints the frame rate this gives at a 111.92 MHz clock.
module tb_frame_workloads;
  import jpeg_ref_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] wdata;
  logic [31:0] rdata;
  logic we, re, full, empty, color;
  int checks = 0, failures = 0;
  int unsigned expw[$];
  int n_out = 0;
  longint cycle = 0;

  jpeg_encoder dut (.clk, .rst, .color, .writeData (wdata), .writeEn (we), .full,
                    .readData (rdata), .readEn (re), .empty);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (9000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // synthetic picture: comp 0 = luma, 1/2 = chroma planes
  function automatic int picture(int comp, int x, int y);
    int v;
    case (comp)
      0: v = (x / 3 + y / 2) + (((x / 16 + y / 16) % 2) ? 40 : 0) + (((x * 7) ^ (y * 13)) % 9);
      1: v = 128 + (x - y) / 16;
      default: v = 128 + ((x / 32) % 2 ? 20 : -20);
    endcase
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    return v;
  endfunction

  // output side: compare every word
  always @(posedge clk) begin
    if (!rst && re && !empty) begin
      if (n_out < expw.size())
        check(rdata == expw[n_out], $sformatf("word %0d: got %h exp %h", n_out, rdata, expw[n_out]));
      else check(1'b0, "word beyond the expected stream");
      n_out <= n_out + 1;
    end
  end

  task automatic run_frame(int w, int h, bit col, string name);
    int prev[3];
    bit bits[$];
    int words[$];
    blk_t pix, sh, q;
    int nblk, comp, bx, by, ncomp_blocks;
    longint t0, t1;
    prev = '{0, 0, 0};
    expw.delete();
    color = col;
    rst = 1;
    repeat (3) @(posedge clk);
    rst = 0;
    n_out = 0;
    @(negedge clk);
    t0 = cycle;
    // blocks per frame: grey w*h/64; 4:2:2 colour twice that
    ncomp_blocks = col ? (w * h / 64) * 2 : w * h / 64;
    for (int b = 0; b < ncomp_blocks; b++) begin
      if (col) begin
        int mcu;
        mcu = b / 4;                                 // 16x8 luma area per MCU
        bx = (mcu % (w / 16)) * 16;
        by = (mcu / (w / 16)) * 8;
        comp = ref_comp(1'b1, b);
        if (b % 4 == 1) bx += 8;
        for (int i = 0; i < 64; i++)
          pix[i] = (comp == 0) ? picture(0, bx + i % 8, by + i / 8)
                               : picture(comp, bx / 2 + i % 8, by + i / 8);
      end else begin
        comp = 0;
        bx = (b % (w / 8)) * 8;
        by = (b / (w / 8)) * 8;
        for (int i = 0; i < 64; i++) pix[i] = picture(0, bx + i % 8, by + i / 8);
      end
      for (int i = 0; i < 64; i++) sh[i] = pix[i] - 128;
      q = ref_quant(ref_dct2(sh), comp != 0);
      words.delete();
      ref_rlc(q, words);
      foreach (words[k]) ref_code_word(words[k], comp != 0, prev[comp], bits);
      pop_words(bits, expw);
      for (int i = 0; i < 64; i++) begin
        we = 1; wdata = 8'(pix[i]);
        @(posedge clk);
        while (full) @(posedge clk);
        @(negedge clk);
      end
    end
    we = 0;
    t1 = cycle;
    repeat (400) @(negedge clk);
    nblk = ncomp_blocks;
    check(n_out == expw.size(), $sformatf("%s: %0d words, expected %0d", name, n_out, expw.size()));
    check(t1 - t0 <= longint'(nblk) * 144 + 80, $sformatf("%s: %0d cycles for %0d blocks", name, t1 - t0, nblk));
    $display("%s: %0d blocks, %0d input cycles (%0.2f per block), %0d words; %0.1f frames/s at 111.92 MHz",
             name, nblk, t1 - t0, real'(t1 - t0) / nblk, n_out, 111.92e6 / real'(t1 - t0));
  endtask

  initial begin
    we = 0; re = 1; wdata = '0; color = 0;
    run_frame(720, 480, 1'b0, "SDTV grey");
    run_frame(720, 480, 1'b1, "SDTV 4:2:2");
    run_frame(1280, 720, 1'b0, "HD grey");
    run_frame(1280, 720, 1'b1, "HD 4:2:2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
