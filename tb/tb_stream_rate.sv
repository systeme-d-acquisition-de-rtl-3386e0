// tb_stream_rate: continuous streaming through a processor limited to about
// 400 Mbit/s, at default sizes.
//
// The processor model reads packet memory at one 32-bit word every 10 clocks
// (12.5 Mword/s = 400 Mbit/s at 125 MHz), status polls included. A packet
// is 1024 words for 1020 sample words, so keeping up needs
// 125e6/decim * 1024/1020 <= 12.5e6 words/s, i.e. decim >= 11.
// Run 1: decim = 11 over 16 packets must lose nothing.
// Run 2: decim = 8 must overflow the ADC FIFOs (lost samples are counted
// and show up as gaps in the sample sequence).
module tb_stream_rate;
  import cali_pkg::*;
  localparam int W = 1024, PS_CLKS = 10;
  logic clk = 0, rst_n = 0;
  logic [13:0] adc_a, adc_b;
  logic acq_en = 0;
  logic [15:0] decim = 16'd11;
  logic [63:0] timestamp;
  logic [9:0]  ps_addr_0 = '0, ps_addr_1 = '0;
  logic [3:0]  ps_we_0 = '0, ps_we_1 = '0;
  logic [31:0] ps_rdata_0, ps_rdata_1;
  logic        pp_awvalid = 0, pp_wvalid = 0;
  logic [31:0] pkt_count, ovf_count;
  logic        ts_rst_out, trig_out;
  int checks = 0, failures = 0;

  redpitaya_cali_top dut (
    .clk, .rst_n, .adc_a, .adc_b, .acq_en, .ch_en(2'b11), .decim,
    .is_master(1'b1), .start_cmd(1'b0), .ts_rst_in(1'b0), .ts_rst_out, .timestamp,
    .ps_addr_0, .ps_we_0, .ps_wdata_0(32'h0), .ps_rdata_0,
    .ps_addr_1, .ps_we_1, .ps_wdata_1(32'h0), .ps_rdata_1,
    .pp_awaddr(6'h0), .pp_awvalid, .pp_awready(), .pp_wdata(32'h1), .pp_wstrb(4'hF),
    .pp_wvalid, .pp_wready(), .pp_bresp(), .pp_bvalid(), .pp_bready(1'b1),
    .pp_araddr(6'h0), .pp_arvalid(1'b0), .pp_arready(), .pp_rdata(), .pp_rresp(), .pp_rvalid(),
    .pp_rready(1'b1),
    .tr_awaddr(6'h0), .tr_awvalid(1'b0), .tr_awready(), .tr_wdata(32'h0), .tr_wstrb(4'h0),
    .tr_wvalid(1'b0), .tr_wready(), .tr_bresp(), .tr_bvalid(), .tr_bready(1'b1),
    .tr_araddr(6'h0), .tr_arvalid(1'b0), .tr_arready(), .tr_rdata(), .tr_rresp(), .tr_rvalid(),
    .tr_rready(1'b1), .trig_out, .pkt_count, .ovf_count, .trig_word_count(), .trig_drop_count());

  always #4 clk = ~clk;
  assign adc_a = 14'(timestamp >> 3);
  assign adc_b = timestamp[13:0];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ps_rd(input int b, input int addr, output logic [31:0] d);
    @(negedge clk);
    if (b == 0) ps_addr_0 = 10'(addr); else ps_addr_1 = 10'(addr);
    @(posedge clk); #1;
    d = (b == 0) ? ps_rdata_0 : ps_rdata_1;
    repeat (PS_CLKS - 1) @(posedge clk);
  endtask
  task automatic ps_free(input int b);
    @(negedge clk);
    if (b == 0) begin ps_addr_0 = 0; ps_we_0 = 4'hF; end
    else        begin ps_addr_1 = 0; ps_we_1 = 4'hF; end
    @(negedge clk); ps_we_0 = 0; ps_we_1 = 0;
    repeat (PS_CLKS - 2) @(posedge clk);
  endtask

  int cur = 0, gaps = 0;
  logic [13:0] prev_t;
  bit have_prev = 0;
  task automatic stream(input int npkt);
    logic [31:0] d;
    int k = 0;
    while (k < npkt) begin
      ps_rd(cur, 0, d);
      if (d == BRAM_FULL) begin
        for (int i = 1; i < W; i++) begin
          ps_rd(cur, i, d);
          if (i >= HDR_WORDS) begin
            logic [13:0] t;
            t = {~d[31], d[30:18]};
            if (have_prev && 14'(t - prev_t) != 14'(decim)) gaps++;
            prev_t = t; have_prev = 1;
          end
        end
        ps_free(cur);
        cur ^= 1; k++;
      end
    end
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    @(negedge clk); pp_awvalid = 1; pp_wvalid = 1;
    @(negedge clk); pp_awvalid = 0; pp_wvalid = 0;
    acq_en = 1;
    stream(16);
    $display("decim 11: packets %0d overflow %0d gaps %0d", pkt_count, ovf_count, gaps);
    check(ovf_count == 0, "decim 11 keeps up with 400 Mbit/s");
    check(gaps == 0, "decim 11 sample sequence unbroken");
    @(negedge clk); decim = 16'd8;
    stream(12);
    $display("decim 8: overflow %0d gaps %0d", ovf_count, gaps);
    check(ovf_count > 0, "decim 8 overflows");
    check(gaps > 0, "decim 8 loses samples");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
