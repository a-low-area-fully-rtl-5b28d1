// tb_assembler: self-checking test of the 32-bit word assembler.
// Random {code, len, cat, Z+} words (code lengths 1..16, categories 0..11,
// including the longest 16 + 11 = 27-bit case) are packed and the 32-bit output
// words are compared with a bit-serial reference: code bits MSB first, then the
// low cat bits of Z+. Random input gaps and output stalls exercise the three
// length-B updates (merge only, emit only, merge and emit).
module tb_assembler;
  import jpeg_pkg::*;
  import jpeg_ref_pkg::*;
  localparam int NW = 3000;
  logic clk = 1'b0, rst = 1'b1;
  huf_word_t wdata;
  logic [31:0] rdata;
  logic we, re, full, empty;
  int checks = 0, failures = 0;
  huf_word_t inw[$];
  int unsigned expw[$];
  int n_merge = 0, n_emit = 0, n_both = 0;

  assembler dut (.clk, .rst, .writeData (wdata), .writeEn (we), .full,
                 .readData (rdata), .readEn (re), .empty);

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) begin
    if (dut.merge && !dut.out_fire) n_merge++;
    if (!dut.merge && dut.out_fire) n_emit++;
    if (dut.merge && dut.out_fire) n_both++;
  end

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
    bit bits[$];
    huf_word_t w;
    for (int i = 0; i < NW; i++) begin
      w.len  = 5'($urandom_range(1, 16));
      w.code = 16'($urandom) & 16'((32'd1 << w.len) - 1);
      w.cat  = 4'($urandom_range(0, 11));
      w.zp   = 11'($urandom);                 // bits above cat must be ignored
      if (i % 97 == 0) begin w.len = 5'd16; w.cat = 4'd11; end
      inw.push_back(w);
      push_bits(bits, int'(w.code), int'(w.len));
      push_bits(bits, int'(w.zp), int'(w.cat));
    end
    pop_words(bits, expw);
  end

  initial begin
    we = 0; wdata = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);
    foreach (inw[i]) begin
      if (i < NW / 2) while ($urandom_range(0, 3) == 0) begin we = 0; @(negedge clk); end
      we = 1; wdata = inw[i];
      @(posedge clk);
      while (full) @(posedge clk);
      @(negedge clk);
    end
    we = 0;
  end

  initial begin
    int n;
    n = 0; re = 0;
    @(negedge rst);
    while (n < expw.size()) begin
      @(negedge clk);
      re = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (re && !empty) begin
        check(rdata == expw[n], $sformatf("word %0d: got %h exp %h", n, rdata, expw[n]));
        n++;
      end
    end
    check(n_merge > 0 && n_emit > 0 && n_both > 0, "all three length-B updates");
    $display("merge only %0d, emit only %0d, both %0d", n_merge, n_emit, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
