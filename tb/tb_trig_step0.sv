// tb_trig_step0: sample words strobed in at random are forwarded, one cycle
// later and in order, to a FIFO model whose full_n toggles at random. Words
// that meet a full FIFO must be dropped and counted; nothing moves before
// run.
module tb_trig_step0;
  logic clk = 0, rst_n = 0, run = 0;
  logic [31:0] samp_data = '0, fifo_wdata, word_count, drop_count;
  logic samp_we = 0, fifo_full_n = 1, fifo_wr;
  int checks = 0, failures = 0;
  logic [31:0] sent[$];
  logic        pend_ok;
  int exp_words = 0, exp_drops = 0;

  trig_step0 dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: a word strobed at edge E is offered during the next cycle
  logic        exp_pend = 0;
  logic [31:0] exp_data = '0;
  always @(negedge clk) if (rst_n) begin
    check(fifo_wr == (exp_pend && fifo_full_n), "fifo_wr");
    if (exp_pend) check(fifo_wdata == exp_data, "fifo_wdata");
    check(word_count == 32'(exp_words) && drop_count == 32'(exp_drops), "counters");
  end
  always @(posedge clk) if (rst_n) begin
    if (exp_pend) begin
      if (fifo_full_n) exp_words++;
      else             exp_drops++;
    end
    exp_pend <= run && samp_we;
    if (run && samp_we) exp_data <= samp_data;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) begin @(negedge clk); samp_we = 1; samp_data = 32'hABCD; end
    @(negedge clk); samp_we = 0;
    repeat (2) @(negedge clk);
    check(word_count == 0 && drop_count == 0, "idle before run");
    run = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      samp_we     = ($urandom_range(0, 2) != 0);
      samp_data   = $urandom;
      fifo_full_n = ($urandom_range(0, 4) != 0);
    end
    @(negedge clk); samp_we = 0;
    repeat (3) @(negedge clk);
    check(exp_words > 1000, "words forwarded");
    check(exp_drops > 50, "words dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
