// tb_ts_sync: a master and two slaves in a daisy chain. The boards leave
// reset at different times, so their counters differ; after START all three
// must restart on the same edge and stay equal. A START held high restarts
// only once; a second START restarts again.
module tb_ts_sync;
  logic clk = 0;
  logic rst_m = 0, rst_s1 = 0, rst_s2 = 0, start = 0;
  logic c01, c12, c2x, dummy_in = 0;
  logic e0, e1, e2;
  logic [63:0] t0, t1, t2;
  int checks = 0, failures = 0, n_evt = 0;

  ts_sync u_m  (.clk, .rst_n(rst_m),  .is_master(1'b1), .start_cmd(start), .ts_rst_in(dummy_in),
                .ts_rst_out(c01), .ts_rst_evt(e0), .timestamp(t0));
  ts_sync u_s1 (.clk, .rst_n(rst_s1), .is_master(1'b0), .start_cmd(start), .ts_rst_in(c01),
                .ts_rst_out(c12), .ts_rst_evt(e1), .timestamp(t1));
  ts_sync u_s2 (.clk, .rst_n(rst_s2), .is_master(1'b0), .start_cmd(1'b0), .ts_rst_in(c12),
                .ts_rst_out(c2x), .ts_rst_evt(e2), .timestamp(t2));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (e0) n_evt++;

  initial begin
    repeat (2) @(posedge clk); rst_m = 1;
    repeat (7) @(posedge clk); rst_s1 = 1;
    repeat (13) @(posedge clk); rst_s2 = 1;
    repeat (20) @(posedge clk); #1;
    check(t0 != t1 && t1 != t2, "unsynchronised before START");
    check(t0 - t1 == 7 && t1 - t2 == 13, "free-running counters");
    @(negedge clk); start = 1;               // held high for a while
    repeat (3) @(posedge clk); #1;
    check(t0 == t1 && t1 == t2, "equal right after START");
    check(t0 == 0, "restarted");
    repeat (100) begin
      @(posedge clk); #1;
      check(t0 == t1 && t1 == t2, "stay equal");
    end
    check(n_evt == 1, "one restart for a held START");
    check(t0 == 100, "START-to-restart latency of three clocks");
    @(negedge clk); start = 0;
    repeat (10) @(negedge clk);
    start = 1;
    repeat (3) @(posedge clk); #1;
    check(n_evt == 2 && t0 <= 2 && t0 == t2, "second START");
    // exact timing: restart value one cycle after the registered pulse
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
