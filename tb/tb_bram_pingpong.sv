// tb_bram_pingpong: the ping-pong manager with two packet BRAMs and a
// processor model on their second ports. Checks: readout held off until
// started; a packet lands in BRAM#0, the next in BRAM#1, then BRAM#0 again;
// the status-write to free latency (3 cycles); the stall while the other
// buffer is still full, with writes during the stall ignored; the sample tap;
// the error register on a bad status word.
module tb_bram_pingpong;
  import cali_pkg::*;
  localparam int D = 64;
  logic clk = 0, rst_n = 0, run = 0;
  logic [3:0]  web_in = '0;
  logic [31:0] ain = '0, din = '0, dout;
  logic [31:0] aout_0, dout_0, din_0, aout_1, dout_1, din_1;
  logic [3:0]  web_out_0, web_out_1;
  logic [31:0] local_err, samp_data;
  logic        samp_we;
  bram_state_e state;
  // processor side
  logic [5:0]  pa0 = '0, pa1 = '0;
  logic [3:0]  pw0 = '0, pw1 = '0;
  logic [31:0] pd0 = '0, pd1 = '0, pq0, pq1;
  int checks = 0, failures = 0;
  logic [31:0] exp_samp[$];
  int n_samp = 0;

  bram_pingpong dut (.*);
  bram_tdp #(.DEPTH(D)) m0 (.clk, .a_addr(aout_0[5:0]), .a_we(web_out_0), .a_wdata(dout_0),
    .a_rdata(din_0), .b_addr(pa0), .b_we(pw0), .b_wdata(pd0), .b_rdata(pq0));
  bram_tdp #(.DEPTH(D)) m1 (.clk, .a_addr(aout_1[5:0]), .a_we(web_out_1), .a_wdata(dout_1),
    .a_rdata(din_1), .b_addr(pa1), .b_we(pw1), .b_wdata(pd1), .b_rdata(pq1));

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

  // sample tap monitor
  always @(posedge clk) if (rst_n && samp_we) begin
    n_samp++;
    if (exp_samp.size() == 0) check(0, "unexpected sample tap");
    else check(samp_data == exp_samp.pop_front(), "sample tap data");
  end
  always @(posedge clk) if (rst_n)
    if (web_out_0 != 0 && web_out_1 != 0) check(0, "both BRAMs written");

  task automatic bus_wr(input int addr, input logic [31:0] data);
    @(negedge clk); ain = addr; din = data; web_in = 4'hF;
  endtask
  task automatic bus_idle();
    @(negedge clk); web_in = '0; ain = '0; din = '0;
  endtask

  // one packet: samples at 4..D-1 (value tag+addr), header 1..3, status last
  task automatic packet(input logic [31:0] tag, input logic [31:0] status_word);
    for (int a = HDR_WORDS; a < D; a++) begin
      bus_wr(a, tag + a);
      exp_samp.push_back(tag + a);
    end
    for (int a = 1; a < HDR_WORDS; a++) bus_wr(a, tag ^ a);
    bus_wr(0, status_word);
    bus_idle();
  endtask

  function automatic logic [31:0] bram_word(input int which, input int a);
    return which == 0 ? m0.mem[a] : m1.mem[a];
  endfunction

  task automatic check_packet(input int which, input logic [31:0] tag);
    for (int a = HDR_WORDS; a < D; a++) check(bram_word(which, a) == tag + a, "packet sample word");
    for (int a = 1; a < HDR_WORDS; a++) check(bram_word(which, a) == (tag ^ a), "packet header word");
    check(bram_word(which, 0) == BRAM_FULL, "packet status word");
  endtask

  task automatic ps_free(input int which);
    @(negedge clk);
    if (which == 0) begin pa0 = 0; pw0 = 4'hF; pd0 = BRAM_FREE; end
    else            begin pa1 = 0; pw1 = 4'hF; pd1 = BRAM_FREE; end
    @(negedge clk); pw0 = 0; pw1 = 0;
  endtask

  task automatic wait_free(output int cycles);
    cycles = 0;
    while (dout != BRAM_FREE && cycles < 1000) begin @(posedge clk); #1; cycles++; end
  endtask

  int lat;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk); #1;
    check(dout == BRAM_FULL, "held off before start");
    run = 1;
    wait_free(lat);
    check(lat <= 2, "free after start");
    check(state == STATE_BRAM_0, "starts on BRAM#0");

    // packet A into BRAM#0; BRAM#1 is free, so the switch takes 3 cycles
    packet(32'h1000_0000, BRAM_FULL);
    // bus_idle left us at the negedge after the status cycle: dout is FULL
    check(dout == BRAM_FULL, "blocked after status write");
    wait_free(lat);
    check(lat == 2, "status write to free latency");   // +1 counted in bus_idle
    check(state == STATE_BRAM_1, "switched to BRAM#1");
    repeat (2) @(posedge clk); #1;
    check_packet(0, 32'h1000_0000);
    check(m1.mem[0] == BRAM_FREE, "BRAM#1 untouched");

    // packet B into BRAM#1; BRAM#0 still full: the manager must stall
    packet(32'h2000_0000, BRAM_FULL);
    repeat (40) begin
      @(posedge clk); #1;
      check(dout == BRAM_FULL, "stall while BRAM#0 full");
    end
    check(state == STATE_BRAM_WAIT_FREE_0, "waiting for BRAM#0");
    // writes during the stall are dropped
    bus_wr(5, 32'hDEAD_BEEF); bus_idle();
    repeat (2) @(posedge clk); #1;
    check(m0.mem[5] == 32'h1000_0005 && m1.mem[5] == 32'h2000_0005, "write ignored in stall");
    check_packet(1, 32'h2000_0000);
    // the processor frees BRAM#0
    ps_free(0);
    wait_free(lat);
    check(lat <= 3, "resume after free");
    check(state == STATE_BRAM_0, "back on BRAM#0");
    check(local_err == ERR_NONE, "no error yet");

    // packet C with a wrong status word: error latched, still hands over
    ps_free(1);
    packet(32'h3000_0000, 32'h0000_0055);
    wait_free(lat);
    check(local_err == ERR_WR_BRAM_0_FULL, "error register BRAM#0");
    check(state == STATE_BRAM_1, "switched again");
    packet(32'h4000_0000, 32'h0000_0077);
    repeat (3) @(posedge clk); #1;
    check(local_err == ERR_WR_BRAM_1_FULL, "error register BRAM#1");
    check(n_samp == 4 * (D - HDR_WORDS), "sample tap count");
    check(exp_samp.size() == 0, "all samples tapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
