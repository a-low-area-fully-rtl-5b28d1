// tb_pong_buffer: self-checking test of the pass sequencer.
// The ping side always has a row ready and the transpose side offers the
// column words of the current block once the row pass is over. The consumer
// (1-D DCT side) accepts with random stalls in the first blocks and always in
// the later ones. For every accepted operand the test checks the data word
// (row r or column u), the coefficient index k = 0..7 in order, the pass flag,
// the mux select, and, without stalls, the 144-cycle block period.
module tb_pong_buffer;
  import jpeg_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic [95:0] row_data, col_data, rdata;
  logic row_empty, row_rd, col_empty, col_rd, empty, pfull, re, twod, muxsel;
  logic [2:0] k;
  int checks = 0, failures = 0;
  int blk = 0, line = 0, rows_given = 0, cols_given = 0;
  int cycle = 0, t_blk[$];

  pong_buffer dut (.clk, .rst, .row_data, .row_empty, .row_readEn (row_rd),
                   .col_data, .col_empty, .col_readEn (col_rd),
                   .readData (rdata), .coef_idx (k), .twod, .empty, .full (pfull),
                   .readEn (re), .muxsel);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  function automatic logic [95:0] word(int b, int n, bit col);
    return {32'(b), 32'(n), 31'h5a5a, col};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sources: row n of block b, then column n of block b after its 8 rows
  assign row_empty = 1'b0;
  assign row_data  = word(rows_given / 8, rows_given % 8, 1'b0);
  assign col_empty = !(cols_given < rows_given - (rows_given % 8) && cols_given / 8 < rows_given / 8);
  assign col_data  = word(cols_given / 8, cols_given % 8, 1'b1);

  int exp_k = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst) begin
      if (row_rd && !row_empty) begin
        if (rows_given % 64 == 0) t_blk.push_back(cycle);
        rows_given <= rows_given + 1;
      end
      if (col_rd && !col_empty) cols_given <= cols_given + 1;
      check(muxsel == (col_rd || twod), "muxsel follows the pass");
      if (col_rd) check(rows_given % 8 == 0, "column pass only after eight rows");
      if (re && !empty) begin
        check(rdata == word(blk, line, twod), $sformatf("blk %0d line %0d twod %0d data", blk, line, twod));
        check(k == 3'(exp_k), "coefficient index order");
        exp_k = (exp_k + 1) % 8;
        if (exp_k == 0) begin
          line++;
          if (line == 8 && twod) begin line = 0; blk++; end
          else if (line == 8) line = 0;
        end
      end
    end
  end

  initial begin
    re = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    while (blk < 10) begin
      @(negedge clk);
      re = (blk < 3) ? ($urandom_range(0, 2) != 0) : 1'b1;
    end
    for (int i = 5; i < t_blk.size(); i++)
      check(t_blk[i] - t_blk[i-1] == 144, $sformatf("block period %0d", t_blk[i] - t_blk[i-1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
