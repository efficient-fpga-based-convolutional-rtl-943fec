// tb_conv_core: checks the pipeline convolution core on its own.
// The test plays the buffer: for a 3-row window of zero-padded random rows
// of width F it presents taps[r][k] = padded row r at position t+k in pass
// cycle t, with v_in high for the first F cycles. The F outputs must equal
// bias + sum over r,k of row[r][s+k]*K[r][k] (computed here), in order.
// Timing: without stalls, the first output must be on y at the edge that
// ends pass cycle 3 (counting from 1), and the last one F-1 cycles later,
// i.e. a row takes F+2 cycles. A second run drops en at random and expects
// the same values.
module tb_conv_core;
  localparam int KS = 3, F_W = 16, ACC_W = 32, F = 10;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, k_we = 1'b0, v_in = 1'b0;
  logic [1:0] k_row = '0, k_col = '0;
  logic signed [F_W-1:0] k_data = '0;
  logic signed [ACC_W-1:0] bias = '0, y;
  logic y_valid;
  logic signed [F_W-1:0] taps [KS][KS];
  logic signed [F_W-1:0] kern [KS][KS];
  logic signed [F_W-1:0] rows [KS][F+2];
  logic signed [ACC_W-1:0] expect_q [$];
  int checks = 0, failures = 0;
  int cycle = 0, first_out = -1, last_out = -1, outs = 0;

  conv_core #(.KS(KS), .F_W(F_W), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor: an element counts on an enabled edge, so a held
  // element is not counted twice.
  logic prev_en = 1'b0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    prev_en <= en;
    if (rst_n && y_valid && prev_en) begin
      checks++;
      if (expect_q.size() == 0) begin
        failures++; $display("unexpected output %0d", y);
      end else begin
        logic signed [ACC_W-1:0] e;
        e = expect_q.pop_front();
        if (y !== e) begin failures++; $display("output %0d: got %0d expected %0d", outs, y, e); end
      end
      if (first_out < 0) first_out = cycle;
      last_out = cycle;
      outs++;
    end
  end

  task automatic load_kernel();
    for (int r = 0; r < KS; r++)
      for (int c = 0; c < KS; c++) begin
        @(negedge clk);
        kern[r][c] = F_W'($urandom_range(0, 255)) - 16'sd128;
        k_row = 2'(r); k_col = 2'(c); k_data = kern[r][c]; k_we = 1'b1;
      end
    @(negedge clk);
    k_we = 1'b0;
    bias = ACC_W'($urandom_range(0, 2000)) - 1000;
  endtask

  task automatic make_rows();
    for (int r = 0; r < KS; r++) begin
      rows[r][0] = '0; rows[r][F+1] = '0;
      for (int p = 1; p <= F; p++) rows[r][p] = F_W'($urandom);
    end
    for (int s = 0; s < F; s++) begin
      longint acc = longint'(bias);
      for (int r = 0; r < KS; r++)
        for (int k = 0; k < KS; k++) acc += longint'(rows[r][s+k]) * longint'(kern[r][k]);
      expect_q.push_back(ACC_W'(acc));
    end
  endtask

  // One pass of F+2 enabled cycles; with stalls, en drops at random.
  task automatic run_pass(input bit stalls, output int start_cycle);
    int t = 0;
    start_cycle = -1;
    while (t < F + 2) begin
      @(negedge clk);
      en = stalls ? ($urandom_range(0, 2) != 0) : 1'b1;
      for (int r = 0; r < KS; r++)
        for (int k = 0; k < KS; k++) taps[r][k] = (t + k < F + 2) ? rows[r][t+k] : '0;
      v_in = (t < F);
      if (start_cycle < 0) start_cycle = cycle;
      if (en) t++;
    end
    // drain the summing register
    @(negedge clk);
    v_in = 1'b0; en = 1'b1;
    @(negedge clk);
    en = 1'b0;
  endtask

  initial begin
    int s0;
    for (int r = 0; r < KS; r++) for (int k = 0; k < KS; k++) taps[r][k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    load_kernel();
    make_rows();
    run_pass(1'b0, s0);
    repeat (3) @(posedge clk);
    // first output registered at the end of pass cycle 3: seen at edge s0+3
    checks++;
    if (first_out != s0 + 3) begin
      failures++; $display("first output at cycle %0d, expected %0d", first_out, s0 + 3);
    end
    checks++;
    if (last_out - s0 != F + 2) begin
      failures++; $display("row took %0d cycles, expected F+2 = %0d", last_out - s0, F + 2);
    end
    for (int n = 0; n < 4; n++) begin
      load_kernel();
      make_rows();
      run_pass(1'b1, s0);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (outs != 5 * F || expect_q.size() != 0) begin
      failures++; $display("%0d outputs, %0d still expected", outs, expect_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
