// trig_step1: moving-average threshold trigger (second trigger step).
//
// Reads 32-bit words from a FIFO, each holding two 16-bit offset-binary
// samples. The low half is used unless it is zero (channel off), in which
// case the high half is used. The sample is turned into a signed value
// val = 0x8000 - half, so a negative-going detector pulse becomes positive.
// The last DIM_BUFFER values are kept in a circular buffer and their running
// sum is updated with each new value (add the new one, subtract the one it
// replaces; before the buffer has filled once only the add is done). The
// average sum/DIM_BUFFER is truncated to an unsigned integer (negative
// averages give 0) and published on `calculated`. trig_out is high while
// the average is above `threshold` and not equal to 0x8000.
//
// Timing: initiation interval 2. In the first cycle a word is popped
// (rd_en high while empty_n) and the replaced value is fetched; in the
// second the buffer, sum, average and trig_out are updated. So at most one
// word is consumed every two clocks and trig_out/calculated change two
// clocks after the pop. Nothing happens while run is low (IP not started).
// The sample extraction, the averaging window, the threshold test and the
// II of 2 follow the described HLS function; DIM_BUFFER = 16, the window
// update that subtracts the replaced value, and the negative-to-zero
// conversion are this design's choices.
module trig_step1 #(
  parameter int unsigned DIM_BUFFER = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  // ap_fifo input
  input  logic [31:0] fifo_data,
  input  logic        fifo_empty_n,
  output logic        fifo_rd,
  // AXI-Lite arguments
  input  logic [31:0] threshold,
  output logic [31:0] calculated,
  // one-wire trigger
  output logic        trig_out
);
  localparam int unsigned LW = (DIM_BUFFER > 1) ? $clog2(DIM_BUFFER) : 1;

  logic signed [15:0] sample_tab [DIM_BUFFER];
  logic [LW-1:0]      l;
  logic               plein;
  logic signed [31:0] somme;
  logic               phase;       // 0: pop, 1: update
  logic signed [15:0] val_r, old_r;

  // Sample extraction from the FIFO word.
  function automatic logic signed [15:0] extract(input logic [31:0] w);
    logic [15:0] half;
    half = (w[15:0] == 16'h0) ? w[31:16] : w[15:0];
    return 16'(17'h0_8000 - {1'b0, half});
  endfunction

  logic signed [31:0] somme_n;
  logic [31:0]        avg_n;
  always_comb begin
    somme_n = somme + 32'(val_r) - (plein ? 32'(old_r) : 32'sd0);
    avg_n   = (somme_n < 0) ? 32'd0 : 32'(somme_n / $signed(32'(DIM_BUFFER)));
  end

  assign fifo_rd = run && !phase && fifo_empty_n;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      l          <= '0;
      plein      <= 1'b0;
      somme      <= '0;
      phase      <= 1'b0;
      val_r      <= '0;
      old_r      <= '0;
      calculated <= '0;
      trig_out   <= 1'b0;
    end else if (!phase) begin
      if (fifo_rd) begin
        val_r <= extract(fifo_data);
        old_r <= sample_tab[l];
        phase <= 1'b1;
      end
    end else begin
      sample_tab[l] <= val_r;
      if (l == LW'(DIM_BUFFER - 1)) begin
        l     <= '0;
        plein <= 1'b1;
      end else begin
        l <= l + 1'b1;
      end
      somme      <= somme_n;
      calculated <= avg_n;
      trig_out   <= (avg_n > threshold) && (avg_n != 32'h0000_8000);
      phase      <= 1'b0;
    end
  end
endmodule
