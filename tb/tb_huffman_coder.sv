// tb_huffman_coder: self-checking test of the four-stage Huffman coder.
// First, codes printed in the JPEG standard's tables are looked up directly
// (luminance/chrominance EOB, ZRL, DC category 0 and 11, AC 0/1 and F/A) to
// check the generated tables. Then run-length words of random blocks are fed in
// 4:2:2 colour order with random gaps and output stalls; every 36-bit output
// {code, len, cat, Z+} is compared with the reference (DC differences per
// component, Annex C codes, Z+ = value - 1 for negative values). Without stalls
// a word must take four cycles from input to readData.
module tb_huffman_coder;
  import jpeg_pkg::*;
  import jpeg_ref_pkg::*;
  localparam int NBLK = 24;
  logic clk = 1'b0, rst = 1'b1, color = 1'b1;
  rlc_word_t wdata;
  huf_word_t rdata;
  logic we, re, full, empty;
  int checks = 0, failures = 0;
  int inw[$], comp_of[$];
  longint unsigned expw[$];

  huffman_coder dut (.clk, .rst, .color, .writeData (wdata), .writeEn (we), .full,
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

  // table entries printed in the standard (code, length)
  task automatic spot(bit chrom, bit dc, int sym, int code, int len);
    logic [255:0][19:0] ac;
    logic [15:0][14:0] dct;
    ac  = build_ac_table(chrom);
    dct = build_dc_table(chrom);
    if (dc) check(dct[sym] == {11'(code), 4'(len)}, $sformatf("DC table chrom=%0d cat %0d", chrom, sym));
    else    check(ac[sym] == {16'(code), 4'(len - 1)}, $sformatf("AC table chrom=%0d sym %h", chrom, sym));
  endtask

  initial begin
    int prev[3];
    int words[$];
    blk_t q;
    int code, len, x, cat, dc;
    spot(0, 0, 8'h00, 'b1010, 4);
    spot(0, 0, 8'hf0, 'b11111111001, 11);
    spot(0, 0, 8'h01, 'b00, 2);
    spot(0, 0, 8'hfa, 'hfffe, 16);
    spot(1, 0, 8'h00, 'b00, 2);
    spot(1, 0, 8'hf0, 'b1111111010, 10);
    spot(1, 0, 8'h01, 'b01, 2);
    spot(0, 1, 0, 'b00, 2);
    spot(0, 1, 11, 'b111111110, 9);
    spot(1, 1, 0, 'b00, 2);
    spot(1, 1, 11, 'b11111111110, 11);
    prev = '{0, 0, 0};
    for (int b = 0; b < NBLK; b++) begin
      for (int i = 0; i < 64; i++) q[i] = ($urandom_range(0, 3) == 0) ? int'($urandom_range(0, 2046)) - 1023 : 0;
      q[0] = int'($urandom_range(0, 1000)) - 500;
      if (b % 4 == 1) for (int i = 1; i < 64; i++) q[i] = (i == 40) ? 3 : 0;
      words.delete();
      ref_rlc(q, words);
      foreach (words[k]) begin
        int cp;
        cp = ref_comp(color, b);
        inw.push_back(words[k]);
        dc = (words[k] >> 15) & 1;
        x = sext(words[k], 11);
        if (dc) begin
          int v;
          v = x;
          x = sext(v - prev[cp], 11);
          prev[cp] = v;
        end
        cat = ref_cat(x);
        ref_huff(cp != 0, dc != 0, dc ? cat : (((words[k] >> 11) & 15) * 16 + cat), code, len);
        expw.push_back({16'(code), 5'(len), 4'(cat), 11'((x < 0) ? x - 1 : x)});
      end
    end
  end

  initial begin
    we = 0; wdata = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);
    foreach (inw[i]) begin
      if (i < inw.size() / 2) while ($urandom_range(0, 3) == 0) begin we = 0; @(negedge clk); end
      we = 1; wdata = rlc_word_t'(16'(inw[i]));
      @(posedge clk);
      while (full) @(posedge clk);
      @(negedge clk);
    end
    we = 0;
    // latency: one isolated word after the pipeline has drained
    repeat (20) @(negedge clk);
    we = 1; wdata = '{dc: 1'b0, run: 4'd0, value: 11'sd1};
    @(negedge clk);
    we = 0;
  end

  initial begin
    int n, t0;
    n = 0; re = 0;
    @(negedge rst);
    while (n < expw.size()) begin
      @(negedge clk);
      re = (n < expw.size() / 2) ? ($urandom_range(0, 2) != 0) : 1'b1;
      @(posedge clk);
      if (re && !empty) begin
        check(rdata == 36'(expw[n]), $sformatf("word %0d: got %h exp %h", n, rdata, 36'(expw[n])));
        n++;
      end
    end
    // isolated word: AC (0,1) value 1 -> luminance/chrominance code 00/01, len 2
    re = 1;
    wait (we);
    t0 = $time / 10;
    @(posedge clk);
    while (empty) @(posedge clk);
    check(($time / 10) - t0 == 4, $sformatf("latency %0d", ($time / 10) - t0));
    check(rdata.cat == 4'd1 && rdata.zp == 11'd1 && rdata.len == 5'd2, "isolated word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
