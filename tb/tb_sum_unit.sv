// tb_sum_unit: checks the summing block.
// Random last-column partial sums and biases are applied; one enabled edge
// later y must equal their sum (modulo 2^32) and y_valid the input valid
// bit; with en low both must hold.
module tb_sum_unit;
  localparam int ROWS = 3, ACC_W = 32;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, v_in = 1'b0, y_valid;
  logic signed [ACC_W-1:0] psum_in [ROWS], bias, y;
  logic signed [ACC_W-1:0] e_y;
  logic e_v;
  int checks = 0, failures = 0;

  sum_unit #(.ROWS(ROWS), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint s;
    bias = '0;
    for (int r = 0; r < ROWS; r++) psum_in[r] = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (y !== '0 || y_valid !== 1'b0) begin failures++; $display("reset not applied"); end
    rst_n = 1'b1;
    e_y = '0; e_v = 1'b0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      en   = ($urandom_range(0, 4) != 0);
      v_in = 1'($urandom);
      bias = ACC_W'($urandom);
      s = longint'(bias);
      for (int r = 0; r < ROWS; r++) begin
        psum_in[r] = (i % 7 == 0) ? 32'sh7fffffff : ACC_W'($urandom);
        s += longint'(psum_in[r]);
      end
      if (en) begin e_y = ACC_W'(s); e_v = v_in; end
      @(posedge clk);
      #1;
      checks++;
      if (y !== e_y || y_valid !== e_v) begin
        failures++;
        $display("cycle %0d en=%0b: y=%0d/%0b expected %0d/%0b", i, en, y, y_valid, e_y, e_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
