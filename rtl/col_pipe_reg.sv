// col_pipe_reg: pipeline register between two columns of MAC cells.
//
// It samples, for each kernel row, the partial sum of the column before and
// the input-map taps that later columns still need, together with a valid
// bit. Tap k of a buffer row crosses k of these registers, so it reaches
// MAC column k+1 k cycles after it left the buffer, in step with the partial
// sums. With en low the register holds (pipeline stall). Synchronous
// active-low reset clears the valid bit and the data.
//
// Its place between the columns and the taps it carries follow the reference
// architecture; the valid bit and the stall enable are this design's own.
module col_pipe_reg #(
  parameter int unsigned ROWS  = 3,
  parameter int unsigned NTAPS = 2,
  parameter int unsigned ACC_W = 32,
  parameter int unsigned F_W   = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    v_in,
  input  logic signed [ACC_W-1:0] psum_in [ROWS],
  input  logic signed [F_W-1:0]   tap_in  [ROWS][NTAPS],
  output logic                    v_out,
  output logic signed [ACC_W-1:0] psum_out [ROWS],
  output logic signed [F_W-1:0]   tap_out  [ROWS][NTAPS]
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_out <= 1'b0;
      for (int r = 0; r < int'(ROWS); r++) begin
        psum_out[r] <= '0;
        for (int k = 0; k < int'(NTAPS); k++) tap_out[r][k] <= '0;
      end
    end else if (en) begin
      v_out    <= v_in;
      psum_out <= psum_in;
      tap_out  <= tap_in;
    end
  end
endmodule
