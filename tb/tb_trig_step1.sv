// tb_trig_step1: the moving-average trigger against a reference model.
// A queue stands for the FIFO. The words mix baseline noise, negative-going
// pulses, words whose low half is zero (high half used) and negative
// averages. After every consumed word the average (`calculated`) and
// trig_out are compared with the model two cycles after the pop; the pop
// spacing must never be below two cycles and, with data always present,
// must be exactly two (initiation interval 2).
module tb_trig_step1;
  localparam int DIM = 8;
  logic clk = 0, rst_n = 0, run = 0;
  logic [31:0] fifo_data, threshold = 32'd2000, calculated;
  logic fifo_empty_n, fifo_rd, trig_out;
  logic [31:0] q[$];
  int checks = 0, failures = 0;

  trig_step1 #(.DIM_BUFFER(DIM)) dut (.*);
  always #5 clk = ~clk;

  assign fifo_empty_n = (q.size() != 0);
  assign fifo_data    = (q.size() != 0) ? q[0] : 32'h0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  int ref_tab[DIM];
  int ref_l = 0, ref_n = 0, ref_sum = 0;
  logic [31:0] exp_avg[$];
  logic        exp_trig[$];
  int n_trig = 0, n_hi = 0, n_neg = 0;

  task automatic model(input logic [31:0] w);
    logic [15:0] half;
    int v, avg;
    half = (w[15:0] == 0) ? w[31:16] : w[15:0];
    if (w[15:0] == 0) n_hi++;
    v = 32'h8000 - int'(half);
    if (v > 32767) v -= 65536;
    if (ref_n >= DIM) ref_sum -= ref_tab[ref_l];
    ref_tab[ref_l] = v;
    ref_sum += v;
    ref_l = (ref_l + 1) % DIM;
    ref_n++;
    avg = (ref_sum < 0) ? 0 : ref_sum / DIM;
    if (ref_sum < 0) n_neg++;
    exp_avg.push_back(avg);
    exp_trig.push_back(avg > threshold && avg != 32'h8000);
    if (avg > threshold) n_trig++;
  endtask

  // Pops are decided at the falling edge (inputs are stable there) and
  // applied to the queue just after the rising edge the block samples on.
  int last_pop = -10, cyc = 0, n_pop = 0, n_gap2 = 0;
  always @(negedge clk) begin
    cyc++;
    if (rst_n && fifo_rd && fifo_empty_n) begin
      check(cyc - last_pop >= 2, "initiation interval >= 2");
      if (cyc - last_pop == 2) n_gap2++;
      last_pop = cyc;
      n_pop++;
      model(q[0]);
      fork begin
        @(posedge clk); #1;
        void'(q.pop_front());
        @(posedge clk); #1;
        check(calculated == exp_avg.pop_front(), "calculated");
        check(trig_out == exp_trig.pop_front(), "trig_out");
      end join_none
    end
  end

  function automatic logic [15:0] ob(input int s);   // signed -> offset binary 16
    return 16'(s + 32768);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    // not started: nothing is read
    q.push_back(32'h1234_5678);
    repeat (5) @(posedge clk);
    check(q.size() == 1, "idle before run");
    q.delete();
    @(negedge clk);
    run = 1;
    for (int n = 0; n < 3000; n++) begin
      int s;
      s = int'($urandom_range(0, 400)) - 200;            // baseline noise
      if ((n % 300) >= 100 && (n % 300) < 130) s -= 9000; // negative pulse
      if ((n % 700) >= 600 && (n % 700) < 640) s += 6000; // positive excursion
      if (n % 5 == 0)      q.push_back({ob(-s), 16'h0000});       // low half off
      else if (n % 5 == 1) q.push_back({ob(12000 + s), ob(-s)});  // both halves on
      else                 q.push_back({16'h0000, ob(-s)});
    end
    while (q.size() != 0) @(posedge clk);
    repeat (4) @(posedge clk);
    check(n_pop == 3000, "all words consumed");
    check(n_gap2 == 2999, "one word every two cycles");
    check(n_trig > 0 && n_trig < 3000, "trigger both high and low");
    check(n_hi > 0, "high-half words seen");
    check(n_neg > 0, "negative averages seen");
    check(exp_avg.size() == 0, "all results checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
