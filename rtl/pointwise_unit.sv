// pointwise_unit: the point-wise (1x1) convolution MAC after the depth-wise
// core.
//
// Each depth-wise result x is multiplied by the 1x1 kernel weight held in a
// mac_unit and the point-wise bias is added: y = x * w + pw_bias. With pw_on
// low the stage passes x through unchanged (sign-extended), for layers that
// have no point-wise step, such as the first, standard convolution of
// MobileNet. The result is registered: y/y_valid follow x/x_valid one
// enabled cycle later. en low holds the register (stall).
//
// The single MAC with a bias follows the reference system; summing the
// point-wise products over input channels is left to the host, and the
// pass-through mode is this design's own.
module pointwise_unit #(
  parameter int unsigned IN_W  = 32,
  parameter int unsigned K_W   = 16,
  parameter int unsigned OUT_W = 48
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    pw_on,
  input  logic                    w_we,
  input  logic signed [K_W-1:0]   w_data,
  input  logic signed [OUT_W-1:0] pw_bias,
  input  logic signed [IN_W-1:0]  x,
  input  logic                    x_valid,
  output logic signed [OUT_W-1:0] y,
  output logic                    y_valid
);
  logic signed [OUT_W-1:0] mac_out;

  mac_unit #(.F_W(IN_W), .K_W(K_W), .ACC_W(OUT_W)) u_mac (
    .clk, .rst_n,
    .k_we(w_we), .k_in(w_data),
    .f_in(x), .acc_in(pw_bias),
    .mac_out
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y       <= '0;
      y_valid <= 1'b0;
    end else if (en) begin
      y       <= pw_on ? mac_out : OUT_W'(x);
      y_valid <= x_valid;
    end
  end
endmodule
