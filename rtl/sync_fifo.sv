// Capture FIFO: DEPTH words of W bits, one clock.
//
// A plain circular buffer. 'wr' stores din unless the FIFO is full; 'rd'
// takes the oldest word unless it is empty, and that word appears on
// 'dout' the next cycle with 'valid' high for that cycle. 'count' is the
// number of stored words. The depth need not be a power of two; the
// pointers wrap at DEPTH.
module sync_fifo #(
  parameter int unsigned DEPTH = 32767,
  parameter int unsigned W     = 32
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       wr,
  input  logic [W-1:0]               din,
  input  logic                       rd,
  output logic [W-1:0]               dout,
  output logic                       valid,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       full,
  output logic                       empty
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign full  = (count == ($bits(count))'(DEPTH));
  assign empty = (count == '0);
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
      valid <= 1'b0;
      dout  <= '0;
    end else begin
      valid <= do_rd;
      if (do_rd) begin
        dout <= mem[rp];
        rp   <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      end
      if (do_wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      count <= count + ($bits(count))'(do_wr) - ($bits(count))'(do_rd);
    end
  end
endmodule
