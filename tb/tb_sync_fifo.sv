// tb_sync_fifo: random push/pop traffic against a queue model.
// Checks the head word, empty_n/full_n and the count every cycle, and that
// writes while full and reads while empty are ignored.
module tb_sync_fifo;
  localparam int W = 16, D = 8;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, full_n, empty_n;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  int n_full = 0, n_empty = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 1500; cyc++) begin
      // alternate 250-cycle stretches biased towards filling and draining
      @(negedge clk);
      check(empty_n == (q.size() != 0), "empty_n");
      check(full_n  == (q.size() != D), "full_n");
      check(int'(count) == q.size(), "count");
      if (q.size() != 0) check(rd_data == q[0], "head data");
      if (q.size() == D) n_full++;
      if (q.size() == 0) n_empty++;
      wr_en   = ($urandom_range(0, 99) < ((cyc / 250) % 2 ? 30 : 70));
      rd_en   = ($urandom_range(0, 99) < ((cyc / 250) % 2 ? 70 : 30));
      wr_data = W'($urandom);
      @(posedge clk);
      #1;
    end
    check(n_full > 0, "reached full");
    check(n_empty > 0, "reached empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model update on the clock edge, using the values seen before it
  always @(posedge clk) if (rst_n) begin
    automatic bit can_rd = (q.size() != 0);
    automatic bit can_wr = (q.size() != D);
    if (rd_en && can_rd) void'(q.pop_front());
    if (wr_en && can_wr) q.push_back(wr_data);
  end
endmodule
