// tb_pointwise_unit: checks the point-wise MAC stage.
// Loads a random 1x1 weight, applies random depth-wise results in both
// modes and compares y, one enabled edge later, with x*w + bias (pw_on high)
// or x sign-extended (pw_on low); with en low the output must hold.
module tb_pointwise_unit;
  localparam int IN_W = 32, K_W = 16, OUT_W = 48;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, pw_on = 1'b1, w_we = 1'b0;
  logic signed [K_W-1:0]   w_data = '0;
  logic signed [OUT_W-1:0] pw_bias = '0, y;
  logic signed [IN_W-1:0]  x = '0;
  logic x_valid = 1'b0, y_valid;
  logic signed [OUT_W-1:0] e_y;
  logic e_v;
  int checks = 0, failures = 0;

  pointwise_unit #(.IN_W(IN_W), .K_W(K_W), .OUT_W(OUT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [K_W-1:0] w;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    e_y = '0; e_v = 1'b0;
    for (int blk = 0; blk < 40; blk++) begin
      @(negedge clk);
      w = K_W'($urandom); w_data = w; w_we = 1'b1; en = 1'b0;
      @(negedge clk);
      w_we = 1'b0; w_data = K_W'($urandom);
      pw_on = (blk % 4 != 3);
      pw_bias = {16'($urandom), 32'($urandom)};
      for (int i = 0; i < 20; i++) begin
        en = ($urandom_range(0, 4) != 0);
        x = IN_W'($urandom);
        x_valid = 1'($urandom);
        if (en) begin
          e_y = pw_on ? OUT_W'(longint'(x) * longint'(w) + longint'(pw_bias)) : OUT_W'(x);
          e_v = x_valid;
        end
        @(posedge clk);
        #1;
        checks++;
        if (y !== e_y || y_valid !== e_v) begin
          failures++;
          $display("pw_on=%0b x=%0d w=%0d: y=%0d expected %0d", pw_on, x, w, y, e_y);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
