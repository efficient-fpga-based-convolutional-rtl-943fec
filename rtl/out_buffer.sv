// out_buffer: output buffer between the point-wise MAC and the DMA.
//
// A synchronous FIFO of DEPTH words held in a memory array. The writer
// pushes with wr_en and must not push when full (the controller stalls the
// pipeline instead); a push into a full FIFO is dropped. The reader sees the
// oldest word on rd_data with rd_valid and takes it with rd_ready in the same
// cycle. count is the number of words held. Synchronous active-low reset
// empties it.
//
// The output buffer itself belongs to the reference system; its size and
// valid/ready read side are this design's own.
module out_buffer #(
  parameter int unsigned W     = 48,
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [W-1:0]  wr_data,
  input  logic          rd_ready,
  output logic          rd_valid,
  output logic [W-1:0]  rd_data,
  output logic [CW-1:0] count,
  output logic          full
);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic          do_wr, do_rd;

  always_comb begin
    full     = (count == CW'(DEPTH));
    rd_valid = (count != '0);
    rd_data  = mem[rd_ptr];
    do_wr    = wr_en && !full;
    do_rd    = rd_valid && rd_ready;
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

  // The controller never pushes into a full buffer.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
endmodule
