// hls_axil_ctrl: AXI4-Lite register slave of an HLS-style IP.
//
// Gives the processor the two register groups such an IP exposes: a control
// register to start the IP and see its state, and one 32-bit register per
// argument. Register map (byte addresses):
//   0x00 control: bit 0 ap_start (write 1 to start), bit 1 ap_done,
//        bit 2 ap_idle, bit 3 ap_ready, bit 7 auto_restart (read/write)
//   0x10 + 8*i  argument i. If bit i of ARG_IS_OUT is set the argument is
//        produced by the IP and reads return arg_in[i]; otherwise it is
//        written by the processor (byte strobes honoured) and drives arg_out[i].
// The IPs of this design run an endless loop, so once started they never
// finish: `run` stays high until reset, ap_idle reads 0 and ap_done/ap_ready
// read 0. Writes complete when address and data have both arrived, with an
// OKAY response one cycle later; reads return data one cycle after the
// address. The control-register layout follows the usual HLS convention
// (from common practice, not from the design description); the argument
// spacing of 8 bytes is this design's choice.
module hls_axil_ctrl #(
  parameter int unsigned N_ARGS     = 2,
  parameter logic [7:0]  ARG_IS_OUT = 8'h00,
  parameter int unsigned AW         = 6
) (
  input  logic          clk,
  input  logic          rst_n,
  // AXI4-Lite slave
  input  logic [AW-1:0] s_awaddr,
  input  logic          s_awvalid,
  output logic          s_awready,
  input  logic [31:0]   s_wdata,
  input  logic [3:0]    s_wstrb,
  input  logic          s_wvalid,
  output logic          s_wready,
  output logic [1:0]    s_bresp,
  output logic          s_bvalid,
  input  logic          s_bready,
  input  logic [AW-1:0] s_araddr,
  input  logic          s_arvalid,
  output logic          s_arready,
  output logic [31:0]   s_rdata,
  output logic [1:0]    s_rresp,
  output logic          s_rvalid,
  input  logic          s_rready,
  // IP side
  output logic          run,
  output logic          auto_restart,
  output logic [31:0]   arg_out [N_ARGS],
  input  logic [31:0]   arg_in  [N_ARGS]
);
  // A write is taken when both channels are valid and no response is pending.
  wire wr_take = s_awvalid && s_wvalid && !s_bvalid;
  wire rd_take = s_arvalid && !s_rvalid;

  assign s_awready = wr_take;
  assign s_wready  = wr_take;
  assign s_arready = rd_take;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;

  function automatic logic [31:0] read_reg(input logic [AW-1:0] addr);
    logic [31:0] r;
    r = '0;
    if (addr[AW-1:2] == '0) begin
      r[0] = run;
      r[1] = 1'b0;
      r[2] = !run;
      r[3] = 1'b0;
      r[7] = auto_restart;
    end
    for (int i = 0; i < N_ARGS; i++)
      if (addr[AW-1:2] == (AW-2)'((16 + 8*i) >> 2))
        r = ARG_IS_OUT[i] ? arg_in[i] : arg_out[i];
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run          <= 1'b0;
      auto_restart <= 1'b0;
      s_bvalid     <= 1'b0;
      s_rvalid     <= 1'b0;
      s_rdata      <= '0;
      for (int i = 0; i < N_ARGS; i++) arg_out[i] <= '0;
    end else begin
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (wr_take) begin
        s_bvalid <= 1'b1;
        if (s_awaddr[AW-1:2] == '0 && s_wstrb[0]) begin
          if (s_wdata[0]) run <= 1'b1;
          auto_restart <= s_wdata[7];
        end
        for (int i = 0; i < N_ARGS; i++)
          if (!ARG_IS_OUT[i] && s_awaddr[AW-1:2] == (AW-2)'((16 + 8*i) >> 2))
            for (int b = 0; b < 4; b++)
              if (s_wstrb[b]) arg_out[i][8*b +: 8] <= s_wdata[8*b +: 8];
      end
      if (rd_take) begin
        s_rvalid <= 1'b1;
        s_rdata  <= read_reg(s_araddr);
      end
    end
  end

  // A response, once offered, is held until accepted.
  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             s_bvalid && !s_bready |=> s_bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));
endmodule
