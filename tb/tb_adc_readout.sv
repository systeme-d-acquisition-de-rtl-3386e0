// tb_adc_readout: the readout logic with a model of the ping-pong manager.
// The ADC inputs are functions of the timestamp (A = ts, B = ~ts, 14 bits),
// so every sample word tells when it was taken. The model collects the
// writes of each packet, answers the status write with BRAM_FULL and frees
// the buffer again after a delay. Checks: header (packet number, first-sample
// timestamp), sample format, sample spacing equal to the decimation,
// channel disable, overflow counting while the buffer stays busy, and the
// order of writes (samples, header, status last).
module tb_adc_readout;
  import cali_pkg::*;
  localparam int W = 32, FD = 16;
  logic clk = 0, rst_n = 0;
  logic acq_en = 0;
  logic [1:0]  ch_en = 2'b11;
  logic [15:0] decim = 16'd3;
  logic [13:0] adc_a, adc_b;
  logic [63:0] timestamp = 64'd1000;
  logic [3:0]  web;
  logic [31:0] a, d, status, pkt_count, ovf_count;
  int checks = 0, failures = 0;

  adc_readout #(.BRAM_WORDS(W), .FIFO_DEPTH(FD)) dut (.*);
  always #5 clk = ~clk;

  assign adc_a = timestamp[13:0];
  assign adc_b = ~timestamp[13:0];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) timestamp <= timestamp + 1;

  // manager model
  logic [31:0] mem [W];
  logic [31:0] stat_r = BRAM_FULL;
  int busy_cycles = 10;       // how long the "processor" keeps a packet
  int busy_cnt = 0;
  int n_pkts = 0, gap_total = 0, n_wr = 0;
  logic [63:0] last_ts = '0;
  bit have_last = 0;
  int exp_decim = 3;
  bit exp_b_on = 1;
  int mixed_pkt = -1;   // packet spanning a settings change
  assign status = stat_r;

  function automatic logic [13:0] ts_of_a(input logic [15:0] h);
    return {~h[15], h[14:2]};
  endfunction

  task automatic check_packet();
    logic [63:0] ts0, ts_k;
    check(mem[HDR_PKTNUM] == 32'(n_pkts), "packet number");
    ts0 = {mem[HDR_TS_HI], mem[HDR_TS_LO]};
    check(ts_of_a(mem[HDR_WORDS][15:0]) == ts0[13:0], "first sample matches header timestamp");
    ts_k = ts0;
    for (int k = HDR_WORDS; k < W; k++) begin
      logic [13:0] ta;
      ta = ts_of_a(mem[k][15:0]);
      check(mem[k][1:0] == 2'b00, "left aligned");
      if (n_pkts != mixed_pkt) begin
        if (exp_b_on) check(ts_of_a(mem[k][31:16]) == ~ta, "channel B sample");
        else          check(mem[k][31:16] == 16'h0, "channel B off");
      end
      if (k > HDR_WORDS) begin
        int delta;
        delta = int'(14'(ta - ts_k[13:0]));
        check(delta >= exp_decim && delta % exp_decim == 0, "sample spacing");
        gap_total += delta / exp_decim - 1;
      end
      ts_k[13:0] = ta;
    end
    if (have_last) begin
      int delta;
      delta = int'(14'(ts0[13:0] - last_ts[13:0]));
      check(delta >= exp_decim, "packets in time order");
      gap_total += delta / exp_decim - 1;
    end
    last_ts = {50'd0, ts_k[13:0]}; have_last = 1;
  endtask

  int pos = 0;    // write order check
  always @(posedge clk) if (rst_n) begin
    if (busy_cnt > 0) begin
      busy_cnt <= busy_cnt - 1;
      if (busy_cnt == 1) stat_r <= BRAM_FREE;
    end
    if (web != 0) begin
      n_wr++;
      check(web == 4'hF, "full-word writes");
      check(stat_r == BRAM_FREE, "write only while free");
      mem[a[4:0]] = d;
      // expected address order: W-HDR samples, then header 1..3, then 0
      if (pos < W - HDR_WORDS) check(a == 32'(HDR_WORDS + pos), "sample address order");
      else if (pos < W - 1)    check(a == 32'(pos - (W - HDR_WORDS) + 1), "header address order");
      else                     check(a == 0 && d == BRAM_FULL, "status last");
      pos = (pos == W - 1) ? 0 : pos + 1;
      if (a == 0) begin
        check_packet();
        n_pkts++;
        stat_r   <= BRAM_FULL;
        busy_cnt <= busy_cycles;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    stat_r = BRAM_FREE;
    repeat (10) @(negedge clk);
    check(n_wr == 0, "nothing written before acq_en");
    acq_en = 1;
    // phase 1: decimation 3, processor quick: no overflow
    wait (n_pkts == 6);
    check(ovf_count == 0, "no overflow with a quick processor");
    check(gap_total == 0, "no missing sample");
    check(pkt_count == 6, "packet counter");
    // phase 2: slow processor forces FIFO overflow
    busy_cycles = 300;
    wait (n_pkts == 9);
    check(ovf_count > 0, "overflow counted");
    // phase 3: channel B disabled, decimation 1, quick processor again
    @(negedge clk);
    wait (stat_r == BRAM_FULL);
    @(negedge clk);
    acq_en = 0;        // stop: FIFOs drain into the current packet only
    busy_cycles = 5;
    repeat (400) @(negedge clk);
    $display("gaps %0d overflow %0d", gap_total, ovf_count);
    check(gap_total == int'(ovf_count), "every lost sample counted once");
    // restart with new settings: the FIFOs are empty at this point
    have_last = 0;
    mixed_pkt = n_pkts;
    ch_en = 2'b01; decim = 16'd1; exp_decim = 1; exp_b_on = 0;
    @(negedge clk);
    acq_en = 1;
    wait (n_pkts == 14);
    repeat (3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
