// tb_redpitaya_cali_top: end-to-end run of the acquisition firmware at its
// default sizes (1024-word packet buffers, 512-entry FIFOs, 16-sample
// average).
//
// The ADC inputs are functions of the board timestamp: channel B is the
// timestamp itself (14 bits), channel A a baseline with a negative pulse
// every 4096 clocks. A processor model programs both IPs over AXI4-Lite,
// sends START, then polls the two packet buffers in turn, checks every
// packet it finds full (packet number, header timestamp, sample format,
// sample spacing, the pulse shape on channel A) and frees it. A reference
// model of the trigger follows the words written into the trigger FIFO; the
// number of trigger pulses and the last average read over AXI must match it.
//
// Phase 1: decimation 4 and a quick processor: nothing may be lost.
// Phase 2: full rate and a slow processor: the readout must stall, the ADC
// FIFOs overflow and the trigger FIFO drops words (the trigger consumes
// one word per two clocks). Each of these mechanisms is counted and must
// occur at least once.
module tb_redpitaya_cali_top;
  import cali_pkg::*;
  localparam int W = 1024;
  logic clk = 0, rst_n = 0;
  logic [13:0] adc_a, adc_b;
  logic acq_en = 0, is_master = 1, start_cmd = 0, ts_rst_in = 0, ts_rst_out;
  logic [1:0]  ch_en = 2'b11;
  logic [15:0] decim = 16'd4;
  logic [63:0] timestamp;
  logic [9:0]  ps_addr_0 = '0, ps_addr_1 = '0;
  logic [3:0]  ps_we_0 = '0, ps_we_1 = '0;
  logic [31:0] ps_wdata_0 = '0, ps_wdata_1 = '0, ps_rdata_0, ps_rdata_1;
  logic [5:0]  pp_awaddr = '0, pp_araddr = '0, tr_awaddr = '0, tr_araddr = '0;
  logic        pp_awvalid = 0, pp_wvalid = 0, pp_bready = 0, pp_arvalid = 0, pp_rready = 0;
  logic        tr_awvalid = 0, tr_wvalid = 0, tr_bready = 0, tr_arvalid = 0, tr_rready = 0;
  logic [31:0] pp_wdata = '0, tr_wdata = '0, pp_rdata, tr_rdata;
  logic [3:0]  pp_wstrb = '0, tr_wstrb = '0;
  logic        pp_awready, pp_wready, pp_bvalid, pp_arready, pp_rvalid;
  logic        tr_awready, tr_wready, tr_bvalid, tr_arready, tr_rvalid;
  logic [1:0]  pp_bresp, pp_rresp, tr_bresp, tr_rresp;
  logic        trig_out;
  logic [31:0] pkt_count, ovf_count, trig_word_count, trig_drop_count;
  int checks = 0, failures = 0;

  redpitaya_cali_top dut (.*);
  always #4 clk = ~clk;     // 125 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- ADC stimulus ----------------
  localparam int THRESH = 10000;
  function automatic int sig_a(input logic [63:0] ts);
    int ph;
    ph = int'(ts % 4096);
    if (ph >= 1000 && ph < 1200) return -5000;
    return 100 + int'(ts % 4);
  endfunction
  assign adc_a = 14'(sig_a(timestamp));
  assign adc_b = timestamp[13:0];

  function automatic logic [15:0] ob16(input logic [13:0] s);
    return {~s[13], s[12:0], 2'b00};
  endfunction

  // ---------------- AXI4-Lite masters ----------------
  task automatic axi_wr(input bit tr, input logic [5:0] addr, input logic [31:0] data);
    @(negedge clk);
    if (tr) begin tr_awaddr = addr; tr_wdata = data; tr_wstrb = 4'hF; tr_awvalid = 1; tr_wvalid = 1; tr_bready = 1; end
    else    begin pp_awaddr = addr; pp_wdata = data; pp_wstrb = 4'hF; pp_awvalid = 1; pp_wvalid = 1; pp_bready = 1; end
    @(posedge clk); #1;
    if (tr) begin tr_awvalid = 0; tr_wvalid = 0; end else begin pp_awvalid = 0; pp_wvalid = 0; end
    check(tr ? tr_bvalid : pp_bvalid, "axi write response");
    @(posedge clk); #1;
    tr_bready = 0; pp_bready = 0;
  endtask
  task automatic axi_rd(input bit tr, input logic [5:0] addr, output logic [31:0] data);
    @(negedge clk);
    if (tr) begin tr_araddr = addr; tr_arvalid = 1; end else begin pp_araddr = addr; pp_arvalid = 1; end
    @(posedge clk); #1;
    tr_arvalid = 0; pp_arvalid = 0;
    data = tr ? tr_rdata : pp_rdata;
    check(tr ? tr_rvalid : pp_rvalid, "axi read response");
    @(negedge clk); tr_rready = 1; pp_rready = 1;
    @(negedge clk); tr_rready = 0; pp_rready = 0;
  endtask

  // ---------------- trigger reference ----------------
  int ref_tab[16];
  int ref_l = 0, ref_n = 0, ref_sum = 0, ref_avg = 0;
  bit ref_trig = 0;
  int ref_edges = 0, dut_edges = 0;
  logic trig_q = 0;
  // sampled at the falling edge: the write takes place on the next rising edge
  always @(negedge clk) if (rst_n && dut.tf_wr) begin
    logic [15:0] half;
    int v;
    half = (dut.tf_wdata[15:0] == 0) ? dut.tf_wdata[31:16] : dut.tf_wdata[15:0];
    v = 32'h8000 - int'(half);
    if (v > 32767) v -= 65536;
    if (ref_n >= 16) ref_sum -= ref_tab[ref_l];
    ref_tab[ref_l] = v;
    ref_sum += v;
    ref_l = (ref_l + 1) % 16;
    ref_n++;
    ref_avg = (ref_sum < 0) ? 0 : ref_sum / 16;
    if (!ref_trig && ref_avg > THRESH) ref_edges++;
    ref_trig = (ref_avg > THRESH);
  end
  always @(negedge clk) begin
    trig_q <= trig_out;
    if (trig_out && !trig_q) dut_edges++;
  end

  // ---------------- mechanisms ----------------
  int n_buf[2] = '{0, 0};
  int n_stall = 0, n_ts_reset = 0;
  int stall_run = 0;
  always @(negedge clk) if (rst_n) begin
    if (ts_rst_out) n_ts_reset++;
    if (dut.pp_state == STATE_BRAM_WAIT_FREE_0 || dut.pp_state == STATE_BRAM_WAIT_FREE_1) begin
      stall_run++;
      if (stall_run == 100) n_stall++;     // readout held off for a long time
    end else stall_run = 0;
  end

  // ---------------- processor model ----------------
  int ps_delay = 20;
  int exp_pkt = 0;
  int exp_decim = 4;
  bit strict = 1;           // no loss expected
  int n_checked_samples = 0, n_pulse_samples = 0;

  task automatic ps_read(input int b, input int addr, output logic [31:0] data);
    @(negedge clk);
    if (b == 0) ps_addr_0 = 10'(addr); else ps_addr_1 = 10'(addr);
    @(posedge clk); #1;
    data = (b == 0) ? ps_rdata_0 : ps_rdata_1;
  endtask
  task automatic ps_write(input int b, input int addr, input logic [31:0] data);
    @(negedge clk);
    if (b == 0) begin ps_addr_0 = 10'(addr); ps_wdata_0 = data; ps_we_0 = 4'hF; end
    else        begin ps_addr_1 = 10'(addr); ps_wdata_1 = data; ps_we_1 = 4'hF; end
    @(negedge clk); ps_we_0 = '0; ps_we_1 = '0;
  endtask

  task automatic ps_take_packet(input int b);
    logic [31:0] w, hdr[4];
    logic [13:0] prev_t, t;
    logic [63:0] ts0;
    for (int i = 1; i < HDR_WORDS; i++) ps_read(b, i, hdr[i]);
    check(hdr[HDR_PKTNUM] == 32'(exp_pkt), "packet number");
    ts0 = {hdr[HDR_TS_HI], hdr[HDR_TS_LO]};
    for (int i = HDR_WORDS; i < W; i++) begin
      ps_read(b, i, w);
      t = {~w[31], w[30:18]};
      check(w[17:16] == 2'b00 && w[1:0] == 2'b00, "sample format");
      if (i == HDR_WORDS) check(t == ts0[13:0], "header timestamp");
      else begin
        if (strict) check(14'(t - prev_t) == 14'(exp_decim), "sample spacing");
        else        check(14'(t - prev_t) >= 14'(exp_decim), "samples in order");
      end
      // channel A belongs to the same instant (sig_a needs only ts mod 4096)
      check(w[15:0] == ob16(14'(sig_a({50'd0, t}))), "channel A sample");
      if (w[15:0] == ob16(14'(-5000))) n_pulse_samples++;
      n_checked_samples++;
      prev_t = t;
    end
    repeat (ps_delay) @(negedge clk);
    ps_write(b, 0, BRAM_FREE);
    n_buf[b]++;
    exp_pkt++;
  endtask

  logic [31:0] r;
  int cur = 0;
  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    // program the IPs
    axi_rd(0, 6'h00, r);  check(r[2] == 1'b1, "manager idle before start");
    axi_wr(1, 6'h10, 32'(THRESH));
    axi_rd(1, 6'h10, r);  check(r == 32'(THRESH), "threshold readback");
    axi_wr(0, 6'h00, 32'h1);
    axi_wr(1, 6'h00, 32'h1);
    axi_rd(0, 6'h00, r);  check(r[0] == 1'b1 && r[2] == 1'b0, "manager running");
    // START: timestamps restart, acquisition enabled
    @(negedge clk); start_cmd = 1;
    repeat (4) @(negedge clk);
    check(timestamp < 4, "timestamp restarted by START");
    start_cmd = 0;
    acq_en = 1;
    // phase 1
    while (exp_pkt < 6) begin
      ps_read(cur, 0, r);
      if (r == BRAM_FULL) begin ps_take_packet(cur); cur ^= 1; end
    end
    check(ovf_count == 0 && trig_drop_count == 0, "phase 1 lossless");
    check(n_checked_samples == 6 * (W - HDR_WORDS), "phase 1 sample count");
    // phase 2: full rate, slow processor
    @(negedge clk);
    decim = 16'd1; exp_decim = 1; strict = 0; ps_delay = 3000;
    while (exp_pkt < 10) begin
      ps_read(cur, 0, r);
      if (r == BRAM_FULL) begin ps_take_packet(cur); cur ^= 1; end
    end
    // stop and let the trigger drain
    @(negedge clk); acq_en = 0;
    repeat (3000) @(negedge clk);
    axi_rd(1, 6'h18, r);
    check(r == 32'(ref_avg), "last average over AXI");
    axi_rd(0, 6'h10, r);
    check(r == ERR_NONE, "no protocol error");
    if (dut_edges != ref_edges) $display("ref edges %0d", ref_edges);
    check(dut_edges == ref_edges, "trigger pulse count");
    $display("packets %0d (BRAM#0 %0d, BRAM#1 %0d) stalls %0d overflow %0d trig words %0d drops %0d trig pulses %0d ts resets %0d pulse samples %0d",
             exp_pkt, n_buf[0], n_buf[1], n_stall, ovf_count, trig_word_count, trig_drop_count,
             dut_edges, n_ts_reset, n_pulse_samples);
    check(n_buf[0] > 0 && n_buf[1] > 0, "mechanism: ping-pong between both buffers");
    check(n_stall > 0,            "mechanism: readout held off");
    check(ovf_count > 0,          "mechanism: ADC FIFO overflow");
    check(trig_drop_count > 0,    "mechanism: trigger FIFO full");
    check(dut_edges > 0,          "mechanism: trigger fired");
    check(n_ts_reset == 1,        "mechanism: timestamp reset sent");
    check(pkt_count >= 10,        "packet counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
