// adc_readout: ADC readout logic, from the two ADC channels to packets.
//
// Input stage: every DECIM-th clock (decim = 0 or 1 takes every clock) while
// acq_en is high, the 14-bit two's-complement samples of channels A and B
// are converted to 16-bit offset binary, left aligned ({~s[13], s[12:0],
// 2'b00}); a disabled channel (ch_en bit low) gives 0. The two samples and
// the current timestamp go into three FIFOs written in lockstep (channel A,
// channel B, timestamp). A sample that finds the FIFOs full is lost and
// counted in ovf_count.
//
// Packet stage: the packet buffer seen through the ping-pong manager is
// BRAM_WORDS 32-bit words. Once the status input reads BRAM_FREE the stage
// pops FIFO entries and writes one sample word {B, A} per entry at
// addresses HDR_WORDS .. BRAM_WORDS-1, then the header words (packet number,
// timestamp of the first sample low/high) and finally BRAM_FULL at address
// 0, which hands the buffer over. After a guard cycle it waits again for
// BRAM_FREE. The write bus (web, a, d) is registered: one word per clock at
// most.
//
// The two ADC channel FIFOs and the packet of a header followed by sample
// words holding two 16-bit samples each come from the description; the
// sample format, header contents, status handshake, decimation and FIFO
// depth are this design's choices.
module adc_readout
  import cali_pkg::*;
#(
  parameter int unsigned BRAM_WORDS = 1024,
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned TS_W       = 64
) (
  input  logic            clk,
  input  logic            rst_n,
  // configuration
  input  logic            acq_en,
  input  logic [1:0]      ch_en,
  input  logic [15:0]     decim,
  // ADC
  input  logic [13:0]     adc_a,
  input  logic [13:0]     adc_b,
  input  logic [TS_W-1:0] timestamp,
  // write bus towards the ping-pong manager
  output logic [3:0]      web,
  output logic [31:0]     a,
  output logic [31:0]     d,
  input  logic [31:0]     status,
  // statistics
  output logic [31:0]     pkt_count,
  output logic [31:0]     ovf_count
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  // ---------------- input stage ----------------
  logic [15:0] dec_cnt;
  logic        tick;
  always_comb tick = acq_en && ((decim <= 16'd1) || (dec_cnt == 16'd0));

  always_ff @(posedge clk) begin
    if (!rst_n || !acq_en)                       dec_cnt <= '0;
    else if (decim <= 16'd1 || dec_cnt == decim - 1'b1) dec_cnt <= '0;
    else                                         dec_cnt <= dec_cnt + 1'b1;
  end

  function automatic logic [15:0] to_ob16(input logic [13:0] s, input logic en);
    return en ? {~s[13], s[12:0], 2'b00} : 16'h0000;
  endfunction

  logic            full_n_a, full_n_b, full_n_t;
  logic            empty_n_a, empty_n_b, empty_n_t;
  logic [15:0]     q_a, q_b;
  logic [TS_W-1:0] q_t;
  logic            pop;
  logic [CW-1:0]   cnt_a, cnt_b, cnt_t;
  wire             all_full_n  = full_n_a && full_n_b && full_n_t;
  wire             all_empty_n = empty_n_a && empty_n_b && empty_n_t;
  wire             push        = tick && all_full_n;

  sync_fifo #(.WIDTH(16),   .DEPTH(FIFO_DEPTH)) u_fifo_a (
    .clk, .rst_n, .wr_en(push), .wr_data(to_ob16(adc_a, ch_en[0])), .full_n(full_n_a),
    .rd_en(pop), .rd_data(q_a), .empty_n(empty_n_a), .count(cnt_a));
  sync_fifo #(.WIDTH(16),   .DEPTH(FIFO_DEPTH)) u_fifo_b (
    .clk, .rst_n, .wr_en(push), .wr_data(to_ob16(adc_b, ch_en[1])), .full_n(full_n_b),
    .rd_en(pop), .rd_data(q_b), .empty_n(empty_n_b), .count(cnt_b));
  sync_fifo #(.WIDTH(TS_W), .DEPTH(FIFO_DEPTH)) u_fifo_ts (
    .clk, .rst_n, .wr_en(push), .wr_data(timestamp), .full_n(full_n_t),
    .rd_en(pop), .rd_data(q_t), .empty_n(empty_n_t), .count(cnt_t));

  always_ff @(posedge clk) begin
    if (!rst_n)                    ovf_count <= '0;
    else if (tick && !all_full_n)  ovf_count <= ovf_count + 1'b1;
  end

  // ---------------- packet stage ----------------
  typedef enum logic [2:0] {S_IDLE, S_WAIT_FREE, S_SAMPLES, S_HDR, S_STATUS, S_GUARD} rd_state_e;
  rd_state_e       st;
  logic [31:0]     widx;
  logic [1:0]      hidx;
  logic [TS_W-1:0] ts_first;
  logic [63:0]     ts64;

  assign pop  = (st == S_SAMPLES) && all_empty_n;
  assign ts64 = 64'(ts_first);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      widx      <= '0;
      hidx      <= '0;
      ts_first  <= '0;
      pkt_count <= '0;
      web       <= '0;
      a         <= '0;
      d         <= '0;
    end else begin
      web <= '0;
      unique case (st)
        S_IDLE:      if (acq_en) st <= S_WAIT_FREE;
        S_WAIT_FREE: begin
          if (status == BRAM_FREE) begin
            st   <= S_SAMPLES;
            widx <= 32'(HDR_WORDS);
          end
        end
        S_SAMPLES: begin
          if (pop) begin
            web  <= 4'hF;
            a    <= widx;
            d    <= {q_b, q_a};
            if (widx == 32'(HDR_WORDS)) ts_first <= q_t;
            if (widx == 32'(BRAM_WORDS - 1)) begin
              st   <= S_HDR;
              hidx <= 2'(HDR_PKTNUM);
            end else begin
              widx <= widx + 1'b1;
            end
          end
        end
        S_HDR: begin
          web <= 4'hF;
          a   <= 32'(hidx);
          unique case (hidx)
            2'(HDR_PKTNUM): d <= pkt_count;
            2'(HDR_TS_LO):  d <= ts64[31:0];
            default:        d <= ts64[63:32];
          endcase
          if (hidx == 2'(HDR_TS_HI)) st <= S_STATUS;
          hidx <= hidx + 1'b1;
        end
        S_STATUS: begin
          web       <= 4'hF;
          a         <= 32'(HDR_STATUS);
          d         <= BRAM_FULL;
          pkt_count <= pkt_count + 1'b1;
          st        <= S_GUARD;
        end
        S_GUARD:     st <= S_WAIT_FREE;
        default:     st <= S_IDLE;
      endcase
    end
  end

  // The three FIFOs move together.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               cnt_a == cnt_b && cnt_a == cnt_t);
endmodule
