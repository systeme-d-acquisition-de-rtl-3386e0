// tb_bram_tdp: byte-enabled writes on both ports against an array model,
// read back on both ports with the one-cycle read latency, and the
// zero initial contents.
module tb_bram_tdp;
  localparam int D = 64;
  logic clk = 0;
  logic [$clog2(D)-1:0] a_addr = '0, b_addr = '0;
  logic [3:0] a_we = '0, b_we = '0;
  logic [31:0] a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  logic [31:0] model [D];
  int checks = 0, failures = 0;

  bram_tdp #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < D; i++) model[i] = '0;
    // initial contents
    for (int i = 0; i < D; i++) begin
      @(negedge clk); a_addr = i[5:0]; b_addr = 6'(D - 1 - i);
      @(posedge clk); #1;
      check(a_rdata == 32'h0 && b_rdata == 32'h0, "initial zero");
    end
    // random writes, port A and port B on different addresses
    for (int n = 0; n < 800; n++) begin
      @(negedge clk);
      a_addr = 6'($urandom); b_addr = 6'($urandom);
      if (b_addr == a_addr) b_addr = b_addr + 1'b1;
      a_we = 4'($urandom); b_we = ($urandom_range(0, 3) == 0) ? 4'($urandom) : 4'h0;
      a_wdata = $urandom; b_wdata = $urandom;
      @(posedge clk);
      for (int b = 0; b < 4; b++) begin
        if (a_we[b]) model[a_addr][8*b +: 8] = a_wdata[8*b +: 8];
        if (b_we[b]) model[b_addr][8*b +: 8] = b_wdata[8*b +: 8];
      end
      #1;
      // read-first: the data returned is the word before this write
    end
    @(negedge clk); a_we = 0; b_we = 0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk); a_addr = i[5:0]; b_addr = i[5:0];
      @(posedge clk); #1;
      check(a_rdata == model[i], "port A readback");
      check(b_rdata == model[i], "port B readback");
    end
    // read latency: data of a new address appears after exactly one edge
    @(negedge clk); a_addr = 6'd3; a_we = 4'hF; a_wdata = 32'hCAFE_0003;
    @(negedge clk); a_we = 4'h0; a_addr = 6'd4;
    check(a_rdata == model[3], "read-first on write");
    @(negedge clk);
    check(a_rdata == model[4], "one-cycle latency");
    b_addr = 6'd3;
    @(negedge clk);
    check(b_rdata == 32'hCAFE_0003, "write seen on port B");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
