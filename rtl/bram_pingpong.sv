// bram_pingpong: ping-pong manager between the ADC readout and two BRAMs.
//
// The readout logic sees a single BRAM-like write bus (address ain, byte
// write enable web_in, data din) and a status word dout. The manager routes
// that bus to BRAM#0 or BRAM#1. When the readout writes the status word
// (address 0) of the current buffer, the packet is complete: dout turns
// BRAM_FULL, which holds the readout off, and the manager waits until the
// other buffer's status word reads BRAM_FREE (the processor writes it back
// after reading the packet). It then routes the bus to that buffer and
// returns dout to BRAM_FREE. So the processor always reads one buffer while
// the logic fills the other.
//
// States, per buffer x / other buffer y:
//   STATE_BRAM_x                  route the bus to x; a status write moves on
//   STATE_BRAM_READ_STATUS_PIPE_x one cycle for the status read of y to settle
//   STATE_BRAM_WAIT_FREE_y        poll y's status word until it is free
// The port that is not routed is held reading address 0, so its read data
// is always that buffer's status word.
//
// A status write whose data is not BRAM_FULL is a protocol error: it is
// latched in local_err (ERR_WR_BRAM_0_FULL / ERR_WR_BRAM_1_FULL) for the
// processor to read. Every routed write to a sample address (at or above
// the header) is also copied to samp_data/samp_we for the trigger path.
//
// Timing: one bus word accepted per cycle (initiation interval 1); all
// outputs are registered, so BRAM writes and dout changes appear one cycle
// after the input. The FSM runs only while run is high (the IP has been
// started); until then dout stays BRAM_FULL. The state names, the routing,
// the status-write test and the error register follow the described HLS
// function; the wait-for-free states, registered outputs, the sample tap and
// the encodings are this design's reading of the parts that are not spelled
// out.
module bram_pingpong
  import cali_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  // readout side
  input  logic [3:0]  web_in,
  input  logic [31:0] ain,
  input  logic [31:0] din,
  output logic [31:0] dout,
  // BRAM#0 port A
  output logic [31:0] aout_0,
  output logic [3:0]  web_out_0,
  output logic [31:0] dout_0,
  input  logic [31:0] din_0,
  // BRAM#1 port A
  output logic [31:0] aout_1,
  output logic [3:0]  web_out_1,
  output logic [31:0] dout_1,
  input  logic [31:0] din_1,
  // processor-visible error register
  output logic [31:0] local_err,
  // ADC samples towards the trigger
  output logic [31:0] samp_data,
  output logic        samp_we,
  output bram_state_e state
);
  wire wr_status = (ain == 32'(HDR_STATUS)) && (web_in != 4'h0);
  wire wr_sample = (ain >= 32'(HDR_WORDS))  && (web_in != 4'h0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= STATE_BRAM_0;
      dout      <= BRAM_FULL;
      aout_0    <= '0;  web_out_0 <= '0;  dout_0 <= '0;
      aout_1    <= '0;  web_out_1 <= '0;  dout_1 <= '0;
      local_err <= ERR_NONE;
      samp_data <= '0;
      samp_we   <= 1'b0;
    end else begin
      // Unrouted ports read their status word; no sample by default.
      aout_0 <= '0;  web_out_0 <= '0;  dout_0 <= '0;
      aout_1 <= '0;  web_out_1 <= '0;  dout_1 <= '0;
      samp_we <= 1'b0;
      if (run) begin
        unique case (state)
          STATE_BRAM_0: begin
            aout_0 <= ain;  web_out_0 <= web_in;  dout_0 <= din;
            samp_we   <= wr_sample;
            samp_data <= din;
            if (wr_status) begin
              if (din != BRAM_FULL) local_err <= ERR_WR_BRAM_0_FULL;
              dout  <= BRAM_FULL;             // hold the readout off
              state <= STATE_BRAM_READ_STATUS_PIPE_0;
            end else begin
              dout  <= BRAM_FREE;
            end
          end
          STATE_BRAM_READ_STATUS_PIPE_0: state <= STATE_BRAM_WAIT_FREE_1;
          STATE_BRAM_WAIT_FREE_1: begin
            if (din_1 == BRAM_FREE) begin
              dout  <= BRAM_FREE;
              state <= STATE_BRAM_1;
            end
          end
          STATE_BRAM_1: begin
            aout_1 <= ain;  web_out_1 <= web_in;  dout_1 <= din;
            samp_we   <= wr_sample;
            samp_data <= din;
            if (wr_status) begin
              if (din != BRAM_FULL) local_err <= ERR_WR_BRAM_1_FULL;
              dout  <= BRAM_FULL;
              state <= STATE_BRAM_READ_STATUS_PIPE_1;
            end else begin
              dout  <= BRAM_FREE;
            end
          end
          STATE_BRAM_READ_STATUS_PIPE_1: state <= STATE_BRAM_WAIT_FREE_0;
          STATE_BRAM_WAIT_FREE_0: begin
            if (din_0 == BRAM_FREE) begin
              dout  <= BRAM_FREE;
              state <= STATE_BRAM_0;
            end
          end
          default: state <= STATE_BRAM_0;
        endcase
      end
    end
  end

  // Never write both buffers in the same cycle.
  a_one_bram: assert property (@(posedge clk) disable iff (!rst_n)
                               !((web_out_0 != 4'h0) && (web_out_1 != 4'h0)));
endmodule
