// tb_mac_unit: checks the MAC cell against an integer model.
// Loads random kernel elements, applies random map elements and partial
// sums, and compares mac_out with k*f + acc computed here in 64-bit
// arithmetic and cut to the accumulator width. Also checks that the kernel
// register holds while k_we is low and is cleared by reset.
module tb_mac_unit;
  localparam int F_W = 16, K_W = 16, ACC_W = 32;
  logic clk = 1'b0, rst_n = 1'b0, k_we = 1'b0;
  logic signed [K_W-1:0]   k_in = '0;
  logic signed [F_W-1:0]   f_in = '0;
  logic signed [ACC_W-1:0] acc_in = '0, mac_out;
  int checks = 0, failures = 0;

  mac_unit #(.F_W(F_W), .K_W(K_W), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic signed [K_W-1:0] k, input string what);
    longint e;
    e = longint'(k) * longint'(f_in) + longint'(acc_in);
    checks++;
    if (mac_out !== ACC_W'(e)) begin
      failures++;
      $display("%s: k=%0d f=%0d acc=%0d got %0d expected %0d", what, k, f_in, acc_in,
               mac_out, ACC_W'(e));
    end
  endtask

  initial begin
    logic signed [K_W-1:0] k;
    repeat (2) @(posedge clk);
    #1;
    f_in = 16'sd100; acc_in = 32'sd7;
    #1 check('0, "after reset");
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      k = K_W'($urandom); k_in = k; k_we = 1'b1;
      @(negedge clk);
      k_we = 1'b0; k_in = K_W'($urandom);   // ignored while k_we is low
      for (int j = 0; j < 4; j++) begin
        f_in   = F_W'($urandom);
        acc_in = (j == 0) ? '0 : ACC_W'($urandom);
        if (i % 10 == 0) begin
          f_in = (j[0]) ? 16'sh7fff : -16'sh8000;
        end
        #1 check(k, "mac");
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
