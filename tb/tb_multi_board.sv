// tb_multi_board: six boards in a master/slave daisy chain, 11 channels in
// all (the last board has channel B switched off), at default sizes.
//
// All boards see the same analog signals: channel A a pulse train, channel
// B a ramp, both functions of one global cycle count. The boards leave
// reset at different times, so their timestamps start unequal. The master
// then receives START, which restarts every timestamp through the chain,
// and all boards are enabled together. A processor model per board starts
// its manager over AXI4-Lite and reads three packets. Packet k of every
// board must carry the same header timestamp and the same samples, and the
// disabled channel must read 0.
module tb_multi_board;
  import cali_pkg::*;
  localparam int NB = 6, NPKT = 3, W = 1024;
  logic clk = 0;
  logic rst_n [NB];
  logic [13:0] adc_a, adc_b;
  logic acq_en = 0, start_cmd = 0;
  logic [15:0] decim = 16'd2;
  logic chain [NB+1];
  logic [63:0] timestamp [NB];
  logic [9:0]  ps_addr_0 [NB], ps_addr_1 [NB];
  logic [31:0] ps_rdata_0 [NB], ps_rdata_1 [NB];
  logic [3:0]  ps_we_0 [NB], ps_we_1 [NB];
  logic [5:0]  pp_awaddr [NB];
  logic        pp_awvalid [NB], pp_wvalid [NB];
  logic [31:0] pp_wdata [NB];
  int checks = 0, failures = 0;
  longint g = 0;

  always #4 clk = ~clk;
  always @(posedge clk) g <= g + 1;
  assign adc_a = (g % 3000 < 150) ? 14'(-4000) : 14'(50);
  assign adc_b = 14'(g);
  assign chain[0] = 1'b0;

  for (genvar b = 0; b < NB; b++) begin : board
    logic unused_o;
    redpitaya_cali_top dut (
      .clk, .rst_n(rst_n[b]), .adc_a, .adc_b, .acq_en,
      .ch_en(b == NB - 1 ? 2'b01 : 2'b11), .decim,
      .is_master(b == 0), .start_cmd(b == 0 ? start_cmd : 1'b0),
      .ts_rst_in(chain[b]), .ts_rst_out(chain[b+1]), .timestamp(timestamp[b]),
      .ps_addr_0(ps_addr_0[b]), .ps_we_0(ps_we_0[b]), .ps_wdata_0(32'h0), .ps_rdata_0(ps_rdata_0[b]),
      .ps_addr_1(ps_addr_1[b]), .ps_we_1(ps_we_1[b]), .ps_wdata_1(32'h0), .ps_rdata_1(ps_rdata_1[b]),
      .pp_awaddr(pp_awaddr[b]), .pp_awvalid(pp_awvalid[b]), .pp_awready(), .pp_wdata(pp_wdata[b]),
      .pp_wstrb(4'hF), .pp_wvalid(pp_wvalid[b]), .pp_wready(), .pp_bresp(), .pp_bvalid(),
      .pp_bready(1'b1), .pp_araddr(6'h0), .pp_arvalid(1'b0), .pp_arready(), .pp_rdata(),
      .pp_rresp(), .pp_rvalid(), .pp_rready(1'b1),
      .tr_awaddr(6'h0), .tr_awvalid(1'b0), .tr_awready(), .tr_wdata(32'h0), .tr_wstrb(4'h0),
      .tr_wvalid(1'b0), .tr_wready(), .tr_bresp(), .tr_bvalid(), .tr_bready(1'b1),
      .tr_araddr(6'h0), .tr_arvalid(1'b0), .tr_arready(), .tr_rdata(), .tr_rresp(), .tr_rvalid(),
      .tr_rready(1'b1), .trig_out(unused_o), .pkt_count(), .ovf_count(), .trig_word_count(),
      .trig_drop_count());
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // what each board's processor saw
  logic [63:0] hdr_ts [NB][NPKT];
  logic [31:0] words  [NB][NPKT][W];

  task automatic ps_rd(input int b, input int buf_i, input int addr, output logic [31:0] d);
    @(negedge clk);
    if (buf_i == 0) ps_addr_0[b] = 10'(addr); else ps_addr_1[b] = 10'(addr);
    @(posedge clk); #1;
    d = (buf_i == 0) ? ps_rdata_0[b] : ps_rdata_1[b];
  endtask
  task automatic ps_free(input int b, input int buf_i);
    @(negedge clk);
    if (buf_i == 0) begin ps_addr_0[b] = 0; ps_we_0[b] = 4'hF; end
    else            begin ps_addr_1[b] = 0; ps_we_1[b] = 4'hF; end
    @(negedge clk); ps_we_0[b] = 0; ps_we_1[b] = 0;
  endtask

  task automatic ps_model(input int b);
    logic [31:0] d;
    int k = 0, cur = 0;
    // start the manager: write 1 to the control register
    @(negedge clk); pp_awaddr[b] = 6'h00; pp_wdata[b] = 32'h1; pp_awvalid[b] = 1; pp_wvalid[b] = 1;
    @(negedge clk); pp_awvalid[b] = 0; pp_wvalid[b] = 0;
    while (k < NPKT) begin
      ps_rd(b, cur, 0, d);
      if (d == BRAM_FULL) begin
        for (int i = 1; i < W; i++) begin ps_rd(b, cur, i, d); words[b][k][i] = d; end
        hdr_ts[b][k] = {words[b][k][HDR_TS_HI], words[b][k][HDR_TS_LO]};
        ps_free(b, cur);
        cur ^= 1; k++;
      end
    end
  endtask

  initial begin
    for (int b = 0; b < NB; b++) begin
      rst_n[b] = 0; ps_addr_0[b] = 0; ps_addr_1[b] = 0; ps_we_0[b] = 0; ps_we_1[b] = 0;
      pp_awaddr[b] = 0; pp_awvalid[b] = 0; pp_wvalid[b] = 0; pp_wdata[b] = 0;
    end
    // boards come out of reset at different times
    for (int b = 0; b < NB; b++) begin
      repeat (3 + 5 * b) @(negedge clk);
      rst_n[b] = 1;
    end
    repeat (10) @(negedge clk);
    check(timestamp[0] != timestamp[NB-1], "timestamps differ before START");
    start_cmd = 1;
    repeat (5) @(negedge clk);
    start_cmd = 0;
    for (int b = 1; b < NB; b++) check(timestamp[b] == timestamp[0], "timestamps equal after START");
    acq_en = 1;
    for (int b = 0; b < NB; b++) begin
      automatic int bb = b;
      fork ps_model(bb); join_none
    end
    wait fork;
    for (int k = 0; k < NPKT; k++) begin
      check(words[0][k][HDR_PKTNUM] == 32'(k), "packet number");
      for (int b = 1; b < NB; b++) begin
        check(hdr_ts[b][k] == hdr_ts[0][k], "same header timestamp on every board");
        for (int i = HDR_WORDS; i < W; i++) begin
          if (b < NB - 1) check(words[b][k][i] == words[0][k][i], "same samples on every board");
          else begin
            check(words[b][k][i][15:0] == words[0][k][i][15:0], "same channel A");
            check(words[b][k][i][31:16] == 16'h0, "channel B off on the last board");
          end
        end
      end
      // consecutive samples are decim apart (channel B is the global count)
      for (int i = HDR_WORDS + 1; i < W; i++)
        check(14'(words[0][k][i][31:18] ^ 14'h2000) - 14'(words[0][k][i-1][31:18] ^ 14'h2000) == 14'(decim),
              "sample spacing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
