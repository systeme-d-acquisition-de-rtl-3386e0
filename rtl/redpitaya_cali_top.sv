// redpitaya_cali_top: programmable-logic part of the RedPitaya acquisition.
//
// Data path: the two 14-bit ADC channels are sampled by adc_readout, which
// buffers them in FIFOs and builds packets (header + sample words) on a
// single BRAM write bus. bram_pingpong routes that bus to one of two packet
// buffers (bram_tdp, BRAM#0 and BRAM#1) and holds the readout off until the
// processor has emptied the other buffer, so one buffer fills while the
// other is read. The processor reaches the buffers through port B of each
// BRAM (ps_* ports) and frees a buffer by writing 0 into its word 0.
// Trigger path: every sample word the manager writes is also handed to
// trig_step0, which feeds a FIFO; trig_step1 reads it at most once per two
// clocks, averages the last DIM_BUFFER samples and raises trig_out while the
// average is above the programmed threshold. ts_sync keeps a timestamp that
// all boards of a master/slave daisy chain restart together; each packet
// header carries the timestamp of its first sample.
//
// Processor control: two AXI4-Lite slaves (hls_axil_ctrl), one for the
// manager (pp_*: control at 0x00, error register at 0x10, read only) and
// one for the trigger (tr_*: control at 0x00, threshold at 0x10,
// calculated average at 0x18, read only). Each IP runs after ap_start is
// written and then forever. acq_en, ch_en and decim configure the readout
// and start_cmd is the START command; they are plain inputs here (in the
// system they come from processor registers whose map is not given).
// Everything runs on one clock, the 125 MHz ADC clock.
module redpitaya_cali_top
  import cali_pkg::*;
#(
  parameter int unsigned BRAM_WORDS      = 1024,
  parameter int unsigned FIFO_DEPTH      = 512,
  parameter int unsigned TRIG_FIFO_DEPTH = 512,
  parameter int unsigned DIM_BUFFER      = 16,
  parameter int unsigned TS_W            = 64,
  localparam int unsigned BAW            = $clog2(BRAM_WORDS)
) (
  input  logic            clk,
  input  logic            rst_n,
  // ADC
  input  logic [13:0]     adc_a,
  input  logic [13:0]     adc_b,
  // readout configuration
  input  logic            acq_en,
  input  logic [1:0]      ch_en,
  input  logic [15:0]     decim,
  // synchronisation daisy chain
  input  logic            is_master,
  input  logic            start_cmd,
  input  logic            ts_rst_in,
  output logic            ts_rst_out,
  output logic [TS_W-1:0] timestamp,
  // processor ports of BRAM#0 and BRAM#1
  input  logic [BAW-1:0]  ps_addr_0,
  input  logic [3:0]      ps_we_0,
  input  logic [31:0]     ps_wdata_0,
  output logic [31:0]     ps_rdata_0,
  input  logic [BAW-1:0]  ps_addr_1,
  input  logic [3:0]      ps_we_1,
  input  logic [31:0]     ps_wdata_1,
  output logic [31:0]     ps_rdata_1,
  // AXI4-Lite: ping-pong manager
  input  logic [5:0]      pp_awaddr,
  input  logic            pp_awvalid,
  output logic            pp_awready,
  input  logic [31:0]     pp_wdata,
  input  logic [3:0]      pp_wstrb,
  input  logic            pp_wvalid,
  output logic            pp_wready,
  output logic [1:0]      pp_bresp,
  output logic            pp_bvalid,
  input  logic            pp_bready,
  input  logic [5:0]      pp_araddr,
  input  logic            pp_arvalid,
  output logic            pp_arready,
  output logic [31:0]     pp_rdata,
  output logic [1:0]      pp_rresp,
  output logic            pp_rvalid,
  input  logic            pp_rready,
  // AXI4-Lite: trigger
  input  logic [5:0]      tr_awaddr,
  input  logic            tr_awvalid,
  output logic            tr_awready,
  input  logic [31:0]     tr_wdata,
  input  logic [3:0]      tr_wstrb,
  input  logic            tr_wvalid,
  output logic            tr_wready,
  output logic [1:0]      tr_bresp,
  output logic            tr_bvalid,
  input  logic            tr_bready,
  input  logic [5:0]      tr_araddr,
  input  logic            tr_arvalid,
  output logic            tr_arready,
  output logic [31:0]     tr_rdata,
  output logic [1:0]      tr_rresp,
  output logic            tr_rvalid,
  input  logic            tr_rready,
  // trigger output and statistics
  output logic            trig_out,
  output logic [31:0]     pkt_count,
  output logic [31:0]     ovf_count,
  output logic [31:0]     trig_word_count,
  output logic [31:0]     trig_drop_count
);
  // ---------------- timestamp ----------------
  logic ts_rst_evt;
  ts_sync #(.TS_W(TS_W)) u_ts (
    .clk, .rst_n, .is_master, .start_cmd, .ts_rst_in, .ts_rst_out,
    .ts_rst_evt, .timestamp);

  // ---------------- readout ----------------
  logic [3:0]  ro_web;
  logic [31:0] ro_a, ro_d, ro_status;
  adc_readout #(.BRAM_WORDS(BRAM_WORDS), .FIFO_DEPTH(FIFO_DEPTH), .TS_W(TS_W)) u_readout (
    .clk, .rst_n, .acq_en, .ch_en, .decim, .adc_a, .adc_b, .timestamp,
    .web(ro_web), .a(ro_a), .d(ro_d), .status(ro_status),
    .pkt_count, .ovf_count);

  // ---------------- ping-pong manager + control ----------------
  logic        pp_run, pp_auto;
  logic [31:0] pp_arg_out [1];
  logic [31:0] pp_arg_in  [1];
  logic [31:0] aout_0, dout_0, din_0, aout_1, dout_1, din_1;
  logic [3:0]  web_0, web_1;
  logic [31:0] local_err, samp_data;
  logic        samp_we;
  bram_state_e pp_state;

  hls_axil_ctrl #(.N_ARGS(1), .ARG_IS_OUT(8'h01)) u_pp_ctrl (
    .clk, .rst_n,
    .s_awaddr(pp_awaddr), .s_awvalid(pp_awvalid), .s_awready(pp_awready),
    .s_wdata(pp_wdata), .s_wstrb(pp_wstrb), .s_wvalid(pp_wvalid), .s_wready(pp_wready),
    .s_bresp(pp_bresp), .s_bvalid(pp_bvalid), .s_bready(pp_bready),
    .s_araddr(pp_araddr), .s_arvalid(pp_arvalid), .s_arready(pp_arready),
    .s_rdata(pp_rdata), .s_rresp(pp_rresp), .s_rvalid(pp_rvalid), .s_rready(pp_rready),
    .run(pp_run), .auto_restart(pp_auto), .arg_out(pp_arg_out), .arg_in(pp_arg_in));
  assign pp_arg_in[0] = local_err;

  bram_pingpong u_pp (
    .clk, .rst_n, .run(pp_run),
    .web_in(ro_web), .ain(ro_a), .din(ro_d), .dout(ro_status),
    .aout_0, .web_out_0(web_0), .dout_0, .din_0,
    .aout_1, .web_out_1(web_1), .dout_1, .din_1,
    .local_err, .samp_data, .samp_we, .state(pp_state));

  bram_tdp #(.DEPTH(BRAM_WORDS)) u_bram0 (
    .clk, .a_addr(aout_0[BAW-1:0]), .a_we(web_0), .a_wdata(dout_0), .a_rdata(din_0),
    .b_addr(ps_addr_0), .b_we(ps_we_0), .b_wdata(ps_wdata_0), .b_rdata(ps_rdata_0));
  bram_tdp #(.DEPTH(BRAM_WORDS)) u_bram1 (
    .clk, .a_addr(aout_1[BAW-1:0]), .a_we(web_1), .a_wdata(dout_1), .a_rdata(din_1),
    .b_addr(ps_addr_1), .b_we(ps_we_1), .b_wdata(ps_wdata_1), .b_rdata(ps_rdata_1));

  // ---------------- trigger ----------------
  logic        tr_run, tr_auto;
  logic [31:0] tr_arg_out [2];
  logic [31:0] tr_arg_in  [2];
  logic [31:0] calculated;
  logic        tf_wr, tf_full_n, tf_rd, tf_empty_n;
  logic [31:0] tf_wdata, tf_rdata;
  logic [$clog2(TRIG_FIFO_DEPTH+1)-1:0] tf_count;

  hls_axil_ctrl #(.N_ARGS(2), .ARG_IS_OUT(8'h02)) u_tr_ctrl (
    .clk, .rst_n,
    .s_awaddr(tr_awaddr), .s_awvalid(tr_awvalid), .s_awready(tr_awready),
    .s_wdata(tr_wdata), .s_wstrb(tr_wstrb), .s_wvalid(tr_wvalid), .s_wready(tr_wready),
    .s_bresp(tr_bresp), .s_bvalid(tr_bvalid), .s_bready(tr_bready),
    .s_araddr(tr_araddr), .s_arvalid(tr_arvalid), .s_arready(tr_arready),
    .s_rdata(tr_rdata), .s_rresp(tr_rresp), .s_rvalid(tr_rvalid), .s_rready(tr_rready),
    .run(tr_run), .auto_restart(tr_auto), .arg_out(tr_arg_out), .arg_in(tr_arg_in));
  assign tr_arg_in[0] = '0;
  assign tr_arg_in[1] = calculated;

  trig_step0 u_trig0 (
    .clk, .rst_n, .run(tr_run), .samp_data, .samp_we,
    .fifo_full_n(tf_full_n), .fifo_wr(tf_wr), .fifo_wdata(tf_wdata),
    .word_count(trig_word_count), .drop_count(trig_drop_count));

  sync_fifo #(.WIDTH(32), .DEPTH(TRIG_FIFO_DEPTH)) u_trig_fifo (
    .clk, .rst_n, .wr_en(tf_wr), .wr_data(tf_wdata), .full_n(tf_full_n),
    .rd_en(tf_rd), .rd_data(tf_rdata), .empty_n(tf_empty_n), .count(tf_count));

  trig_step1 #(.DIM_BUFFER(DIM_BUFFER)) u_trig1 (
    .clk, .rst_n, .run(tr_run),
    .fifo_data(tf_rdata), .fifo_empty_n(tf_empty_n), .fifo_rd(tf_rd),
    .threshold(tr_arg_out[0]), .calculated, .trig_out);
endmodule
