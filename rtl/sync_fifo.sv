// sync_fifo: single-clock first-in first-out buffer.
//
// Used for the per-channel ADC FIFOs in front of the readout logic and for
// the FIFO that joins the two trigger steps. The handshake is the one an HLS
// "ap_fifo" port expects: the writer sees full_n and pulses wr_en, the
// reader sees empty_n (the "ef" flag, inverted) and pulses rd_en. A write
// while full and a read while empty are ignored.
//
// Storage is a circular array addressed by two pointers; a separate count
// gives full/empty. Read data is first-word-fall-through: rd_data shows the
// head entry while empty_n is high and advances one cycle after rd_en.
// Depth and width are this design's choices; the vendor FIFO it stands for
// is not specified further.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 512
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty_n,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;

  wire do_wr = wr_en && full_n;
  wire do_rd = rd_en && empty_n;

  assign full_n  = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign empty_n = (count != '0);
  assign rd_data = mem[rd_ptr];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= inc(wr_ptr);
      if (do_rd) rd_ptr <= inc(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // The occupancy never exceeds the depth.
  a_count_in_range: assert property (@(posedge clk) disable iff (!rst_n)
                                     32'(count) <= DEPTH);
endmodule
