// sum_unit: the summing block at the end of the MAC columns.
//
// It adds the partial sums of the last MAC column, one per kernel row, and
// the bias b, giving one output-map element F'[i,j]. The sum is registered:
// the element computed in a cycle is on y, with y_valid, the cycle after.
// en low holds the register (stall).
//
// The function is the reference architecture's; the registered output and
// the valid bit are this design's own.
module sum_unit #(
  parameter int unsigned ROWS  = 3,
  parameter int unsigned ACC_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    v_in,
  input  logic signed [ACC_W-1:0] psum_in [ROWS],
  input  logic signed [ACC_W-1:0] bias,
  output logic signed [ACC_W-1:0] y,
  output logic                    y_valid
);
  logic signed [ACC_W-1:0] total;

  always_comb begin
    total = bias;
    for (int r = 0; r < int'(ROWS); r++) total += psum_in[r];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y       <= '0;
      y_valid <= 1'b0;
    end else if (en) begin
      y       <= total;
      y_valid <= v_in;
    end
  end
endmodule
