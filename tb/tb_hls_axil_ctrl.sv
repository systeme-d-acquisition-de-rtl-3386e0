// tb_hls_axil_ctrl: AXI4-Lite writes and reads of the control register and
// of input and output argument registers, with byte strobes, address and
// data arriving in different cycles, and a read response held under
// back-pressure.
module tb_hls_axil_ctrl;
  logic clk = 0, rst_n = 0;
  logic [5:0]  s_awaddr = '0, s_araddr = '0;
  logic        s_awvalid = 0, s_wvalid = 0, s_bready = 0, s_arvalid = 0, s_rready = 0;
  logic [31:0] s_wdata = '0, s_rdata;
  logic [3:0]  s_wstrb = '0;
  logic        s_awready, s_wready, s_bvalid, s_arready, s_rvalid;
  logic [1:0]  s_bresp, s_rresp;
  logic        run, auto_restart;
  logic [31:0] arg_out [3];
  logic [31:0] arg_in  [3];
  int checks = 0, failures = 0;

  hls_axil_ctrl #(.N_ARGS(3), .ARG_IS_OUT(8'b010)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic axi_write(input logic [5:0] addr, input logic [31:0] data,
                           input logic [3:0] strb, input int data_delay);
    int n;
    @(negedge clk);
    s_awaddr = addr; s_awvalid = 1;
    if (data_delay == 0) begin s_wdata = data; s_wstrb = strb; s_wvalid = 1; end
    n = 0;
    while (1) begin
      @(posedge clk); #1; n++;
      if (n == data_delay) begin s_wdata = data; s_wstrb = strb; s_wvalid = 1; end
      if (s_bvalid) break;
      if (n > 50) begin check(0, "write timeout"); break; end
    end
    s_awvalid = 0; s_wvalid = 0;
    check(s_bresp == 2'b00, "bresp okay");
    @(negedge clk); s_bready = 1;
    @(posedge clk); #1; s_bready = 0;
    check(!s_bvalid, "bvalid dropped");
  endtask

  task automatic axi_read(input logic [5:0] addr, input int hold, output logic [31:0] data);
    int n;
    @(negedge clk);
    s_araddr = addr; s_arvalid = 1; n = 0;
    while (!s_arready && n < 50) begin @(negedge clk); n++; end
    @(posedge clk); #1; s_arvalid = 0;
    check(s_rvalid, "rvalid one cycle after address");
    data = s_rdata;
    repeat (hold) begin
      @(posedge clk); #1;
      check(s_rvalid && s_rdata == data, "read held");
    end
    @(negedge clk); s_rready = 1;
    @(posedge clk); #1; s_rready = 0;
    check(!s_rvalid, "rvalid dropped");
  endtask

  logic [31:0] r;
  initial begin
    arg_in[0] = 32'h0; arg_in[1] = 32'h1357_9BDF; arg_in[2] = 32'h0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    axi_read(6'h00, 0, r);
    check(r == 32'h0000_0004, "control idle after reset");
    check(!run, "not running");
    // argument 0 (input) with strobes
    axi_write(6'h10, 32'h1122_3344, 4'hF, 0);
    check(arg_out[0] == 32'h1122_3344, "arg0 write");
    axi_write(6'h10, 32'hAABB_CCDD, 4'b0101, 2);
    check(arg_out[0] == 32'h11BB_33DD, "arg0 byte strobes");
    axi_read(6'h10, 3, r);
    check(r == 32'h11BB_33DD, "arg0 readback");
    // argument 1 is an output: reads the IP's value, writes ignored
    axi_write(6'h18, 32'hFFFF_FFFF, 4'hF, 1);
    axi_read(6'h18, 0, r);
    check(r == 32'h1357_9BDF, "arg1 output read");
    arg_in[1] = 32'h0000_0042;
    axi_read(6'h18, 0, r);
    check(r == 32'h0000_0042, "arg1 follows IP");
    axi_write(6'h20, 32'h0000_BEEF, 4'hF, 0);
    check(arg_out[2] == 32'h0000_BEEF && arg_out[0] == 32'h11BB_33DD, "arg2 write only");
    // start with auto_restart
    axi_write(6'h00, 32'h0000_0081, 4'hF, 0);
    check(run && auto_restart, "started");
    axi_read(6'h00, 1, r);
    check(r == 32'h0000_0081, "control running");
    // writing 0 to ap_start does not stop an endless IP
    axi_write(6'h00, 32'h0000_0000, 4'hF, 0);
    check(run && !auto_restart, "still running");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
