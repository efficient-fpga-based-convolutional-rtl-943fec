// row_buffer: row-oriented input buffer of the convolution core.
//
// KS FIFOs each hold one row of the input map, first element nearest the
// output end (position PAD), with PAD = (KS-1)/2 zeros on each side, so a FIFO
// of a width-F row spans F+KS-1 positions. Positions 0..KS-1 of every FIFO
// are the taps that feed the MAC columns. Commands, one per cycle, in this
// priority:
//   clear    - zero every FIFO (the rows above the map);
//   shift_up - the first row leaves, the others move up one FIFO, the last
//              FIFO is zeroed (it stays zero for the rows below the map);
//   load     - din enters the far end of the last FIFO's data region; after
//              F loads the new row sits in place;
//   rotate   - every FIFO shifts by one toward the taps, circularly over its
//              F+KS-1 positions, so after one row pass of F+KS-1 cycles each
//              row is back where it started and can move up.
// The row width is a run-time input up to MAX_F; it must stay constant while
// a map is processed. Positions beyond a row's padding are kept at zero.
//
// FIFOs per row, shifting right each cycle and shifting up between rows
// follow the reference architecture; the zero padding, circular shift and
// run-time width are this design's own.
module row_buffer #(
  parameter int unsigned KS    = 3,
  parameter int unsigned MAX_F = 128,
  parameter int unsigned F_W   = 16,
  localparam int unsigned PAD  = (KS - 1) / 2,
  localparam int unsigned LEN  = MAX_F + KS - 1,
  localparam int unsigned WW   = $clog2(MAX_F + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [WW-1:0]         width,
  input  logic                  clear,
  input  logic                  shift_up,
  input  logic                  load,
  input  logic signed [F_W-1:0] din,
  input  logic                  rotate,
  output logic signed [F_W-1:0] taps [KS][KS]
);
  // mem[r][p]: FIFO r, position p (position 0 is the tap end). Packed, so
  // that it is one wide register rather than a memory.
  logic [KS-1:0][LEN-1:0][F_W-1:0] mem;
  logic [WW:0] wrap_pos;  // last position of a padded row
  logic [WW:0] last_data; // last data position of a row

  always_comb begin
    wrap_pos  = (WW+1)'(width) + (WW+1)'(KS - 2);
    last_data = (WW+1)'(width) + (WW+1)'(PAD) - 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      mem <= '0;
    end else if (shift_up) begin
      for (int r = 0; r < int'(KS) - 1; r++) mem[r] <= mem[r+1];
      mem[KS-1] <= '0;
    end else if (load) begin
      for (int p = int'(PAD); p < int'(LEN); p++) begin
        if (p == int'(last_data))     mem[KS-1][p] <= din;
        else if (p < int'(last_data)) mem[KS-1][p] <= mem[KS-1][p+1];
      end
    end else if (rotate) begin
      for (int r = 0; r < int'(KS); r++)
        for (int p = 0; p < int'(LEN); p++) begin
          if (p == int'(wrap_pos))     mem[r][p] <= mem[r][0];
          else if (p < int'(wrap_pos)) mem[r][p] <= mem[r][p+1];
        end
    end
  end

  always_comb begin
    for (int r = 0; r < int'(KS); r++)
      for (int k = 0; k < int'(KS); k++) taps[r][k] = signed'(mem[r][k]);
  end
endmodule
