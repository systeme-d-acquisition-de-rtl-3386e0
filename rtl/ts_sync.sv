// ts_sync: timestamp counter with master/slave reset over a daisy chain.
//
// Several boards acquire in parallel and must stamp samples taken at the
// same instant with the same value. Their clocks are common (the master's
// sampling clock is forwarded), so only the counters need aligning. On a
// rising edge of start_cmd the master drives a one-cycle timestamp-reset
// pulse on ts_rst_out towards the first slave. A slave passes ts_rst_in
// straight on to ts_rst_out for the next board in the chain. Every board,
// master included, registers the pulse once and clears its timestamp on
// that registered pulse, so all counters restart on the same clock edge
// (cable delay ignored). The timestamp counts clock cycles.
// ts_rst_evt marks the cycle in which the local counter restarts.
// Master/slave roles, the START-triggered reset and the daisy chain follow
// the description; the single register stage, the edge detect and the
// 64-bit width are this design's choices.
module ts_sync #(
  parameter int unsigned TS_W = 64
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            is_master,
  input  logic            start_cmd,
  input  logic            ts_rst_in,
  output logic            ts_rst_out,
  output logic            ts_rst_evt,
  output logic [TS_W-1:0] timestamp
);
  logic start_q, pulse, rst_q;

  // Master: one-cycle pulse on the rising edge of the START command.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      start_q <= 1'b0;
      pulse   <= 1'b0;
    end else begin
      start_q <= start_cmd;
      pulse   <= is_master && start_cmd && !start_q;
    end
  end

  assign ts_rst_out = is_master ? pulse : ts_rst_in;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rst_q     <= 1'b0;
      timestamp <= '0;
    end else begin
      rst_q     <= is_master ? pulse : ts_rst_in;
      timestamp <= rst_q ? '0 : timestamp + 1'b1;
    end
  end

  assign ts_rst_evt = rst_q;
endmodule
