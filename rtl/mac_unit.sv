// mac_unit: one multiply-accumulate cell of the convolution core.
//
// The cell keeps one kernel element K[i,j] in a register, loaded once per
// kernel through k_we/k_in, and forms mac_out = K[i,j] * f_in + acc_in, where
// acc_in is the result MAC[i,j-1] of the column before (0 for the first
// column). The multiply-add is combinational: the column pipeline register
// that follows in the core samples it. The same cell, with a bias on acc_in,
// serves as the point-wise MAC.
//
// Kernel storage inside the cell and the multiply-then-add structure follow
// the reference architecture; the signed integer widths are this design's.
module mac_unit #(
  parameter int unsigned F_W   = 16,
  parameter int unsigned K_W   = 16,
  parameter int unsigned ACC_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    k_we,
  input  logic signed [K_W-1:0]   k_in,
  input  logic signed [F_W-1:0]   f_in,
  input  logic signed [ACC_W-1:0] acc_in,
  output logic signed [ACC_W-1:0] mac_out
);
  logic signed [K_W-1:0]       k_q;
  logic signed [F_W+K_W-1:0]   prod;

  always_ff @(posedge clk) begin
    if (!rst_n)    k_q <= '0;
    else if (k_we) k_q <= k_in;
  end

  always_comb begin
    prod    = f_in * k_q;
    mac_out = ACC_W'(prod) + acc_in;
  end
endmodule
