// trig_step0: first trigger step, from the manager's sample tap to a FIFO.
//
// The ping-pong manager presents each sample word it writes into a packet
// buffer on samp_data with a one-cycle samp_we strobe (a plain wire
// interface with no flow control). This block registers the word and writes
// it into the trigger FIFO through the FIFO's write handshake (full_n,
// wr_en). A word that arrives while the FIFO is full is dropped and counted
// in drop_count; forwarded words are counted in word_count. One word per
// cycle, latency one clock. Only the block's place between the manager and
// the FIFO and its two interface kinds are given for it; the register stage
// and the counters are this design's choices.
module trig_step0 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  logic [31:0] samp_data,
  input  logic        samp_we,
  input  logic        fifo_full_n,
  output logic        fifo_wr,
  output logic [31:0] fifo_wdata,
  output logic [31:0] word_count,
  output logic [31:0] drop_count
);
  logic        pend;
  logic [31:0] pend_data;

  assign fifo_wr    = pend && fifo_full_n;
  assign fifo_wdata = pend_data;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pend       <= 1'b0;
      pend_data  <= '0;
      word_count <= '0;
      drop_count <= '0;
    end else begin
      pend <= run && samp_we;
      if (run && samp_we) pend_data <= samp_data;
      if (fifo_wr) word_count <= word_count + 1'b1;
      if (pend && !fifo_full_n) drop_count <= drop_count + 1'b1;
    end
  end
endmodule
