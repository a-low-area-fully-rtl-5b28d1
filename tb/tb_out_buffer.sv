// tb_out_buffer: self-checking test of the two-register output buffer.
// Random writeEn/readEn patterns are checked against a queue model: every word
// read must be the oldest word written, full must be raised exactly when two
// words are held and empty exactly when none is. A back-to-back phase checks
// one word per cycle throughput and one cycle of latency.
module tb_out_buffer;
  logic clk = 1'b0, rst = 1'b1;
  logic [11:0] wdata, rdata;
  logic we, re, full, empty;
  int checks = 0, failures = 0;
  int unsigned model[$];
  int full_seen = 0;

  out_buffer #(.W(12)) dut (.clk, .rst, .writeData (wdata), .writeEn (we), .full,
                            .readData (rdata), .readEn (re), .empty);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; wdata = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);
    check(empty && !full, "empty after reset");
    for (int i = 0; i < 3000; i++) begin
      we = ($urandom_range(0, 99) < 60);
      re = ($urandom_range(0, 99) < (i < 1500 ? 40 : 70));
      wdata = 12'($urandom);
      // check flags and data against the model before the edge
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == 2), "full flag");
      if (!empty) check(rdata == 12'(model[0]), $sformatf("data %h vs %h", rdata, model[0]));
      if (full) full_seen++;
      begin
        bit do_wr, do_rd;
        do_wr = we && (model.size() < 2);
        do_rd = re && (model.size() > 0);
        @(posedge clk);
        if (do_rd) void'(model.pop_front());
        if (do_wr) model.push_back(32'(wdata));
      end
      @(negedge clk);
    end
    // drain
    we = 0; re = 1;
    repeat (3) @(negedge clk);
    model.delete();
    // back-to-back streaming: one word per cycle, one cycle latency
    re = 1; we = 1;
    for (int i = 0; i < 20; i++) begin
      wdata = 12'(i);
      @(posedge clk); #1;
      check(!empty && rdata == 12'(i), "streaming latency/throughput");
      @(negedge clk);
    end
    we = 0; re = 0;
    check(full_seen > 0, "full state reached");
    $display("full state seen %0d times", full_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
