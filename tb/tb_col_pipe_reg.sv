// tb_col_pipe_reg: checks the column pipeline register.
// Random partial sums, taps and valid bits are applied; after each clock
// edge with en high the outputs must equal the inputs before the edge, with
// en low they must keep their old values, and reset must clear them.
module tb_col_pipe_reg;
  localparam int ROWS = 3, NTAPS = 2, ACC_W = 32, F_W = 16;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, v_in = 1'b0, v_out;
  logic signed [ACC_W-1:0] psum_in [ROWS], psum_out [ROWS];
  logic signed [F_W-1:0]   tap_in [ROWS][NTAPS], tap_out [ROWS][NTAPS];
  logic signed [ACC_W-1:0] e_psum [ROWS];
  logic signed [F_W-1:0]   e_tap [ROWS][NTAPS];
  logic                    e_v;
  int checks = 0, failures = 0;

  col_pipe_reg #(.ROWS(ROWS), .NTAPS(NTAPS), .ACC_W(ACC_W), .F_W(F_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    checks++;
    if (v_out !== e_v) begin failures++; $display("%s: valid %0b expected %0b", what, v_out, e_v); end
    for (int r = 0; r < ROWS; r++) begin
      checks++;
      if (psum_out[r] !== e_psum[r]) begin
        failures++; $display("%s: psum[%0d]=%0d expected %0d", what, r, psum_out[r], e_psum[r]);
      end
      for (int k = 0; k < NTAPS; k++) begin
        checks++;
        if (tap_out[r][k] !== e_tap[r][k]) begin
          failures++; $display("%s: tap[%0d][%0d]=%0d expected %0d", what, r, k, tap_out[r][k], e_tap[r][k]);
        end
      end
    end
  endtask

  task automatic randomize_inputs();
    v_in = 1'($urandom);
    for (int r = 0; r < ROWS; r++) begin
      psum_in[r] = ACC_W'($urandom);
      for (int k = 0; k < NTAPS; k++) tap_in[r][k] = F_W'($urandom);
    end
  endtask

  initial begin
    randomize_inputs();
    en = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    e_v = 1'b0;
    for (int r = 0; r < ROWS; r++) begin
      e_psum[r] = '0;
      for (int k = 0; k < NTAPS; k++) e_tap[r][k] = '0;
    end
    compare("reset");
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      randomize_inputs();
      en = ($urandom_range(0, 3) != 0);
      if (en) begin
        e_v = v_in; e_psum = psum_in; e_tap = tap_in;
      end
      @(posedge clk);
      #1 compare(en ? "load" : "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
