// tb_row_buffer: checks the row-oriented input buffer.
// For a few row widths it clears the buffer, shifts up and loads random
// rows (with gaps between loads), and then, over one full row pass of F+2
// rotations, compares every tap with the zero-padded rows of a model
// (tap k of FIFO r at pass cycle t = padded row r at position t+k, circular).
// After the pass it shifts up, checks the rows moved and that the last FIFO
// is zero, and runs a pass on that window too.
module tb_row_buffer;
  localparam int KS = 3, MAX_F = 12, F_W = 16, L = MAX_F + KS - 1;
  localparam int WW = $clog2(MAX_F + 1);
  logic clk = 1'b0, rst_n = 1'b0;
  logic [WW-1:0] width = '0;
  logic clear = 1'b0, shift_up = 1'b0, load = 1'b0, rotate = 1'b0;
  logic signed [F_W-1:0] din = '0;
  logic signed [F_W-1:0] taps [KS][KS];
  // model: padded rows, position 0 is the zero before the row
  logic signed [F_W-1:0] rows [KS][L];
  int checks = 0, failures = 0;

  row_buffer #(.KS(KS), .MAX_F(MAX_F), .F_W(F_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    @(posedge clk);
    #1;
    clear = 1'b0; shift_up = 1'b0; load = 1'b0; rotate = 1'b0;
  endtask

  task automatic model_shift_up();
    for (int r = 0; r < KS - 1; r++) rows[r] = rows[r+1];
    for (int p = 0; p < L; p++) rows[KS-1][p] = '0;
  endtask

  task automatic fetch_row(input int w);
    shift_up = 1'b1; step();
    model_shift_up();
    for (int j = 0; j < w; j++) begin
      if ($urandom_range(0, 3) == 0) step();   // no data this cycle
      din = F_W'($urandom);
      rows[KS-1][j+1] = din;
      load = 1'b1; step();
    end
  endtask

  task automatic check_pass(input int w, input string what);
    for (int t = 0; t < w + 2; t++) begin
      for (int r = 0; r < KS; r++)
        for (int k = 0; k < KS; k++) begin
          checks++;
          if (taps[r][k] !== rows[r][(t + k) % (w + 2)]) begin
            failures++;
            $display("%s w=%0d t=%0d tap[%0d][%0d]=%0d expected %0d", what, w, t, r, k,
                     taps[r][k], rows[r][(t + k) % (w + 2)]);
          end
        end
      rotate = 1'b1; step();
    end
  endtask

  initial begin
    int widths [4] = '{5, 12, 3, 8};
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    foreach (widths[i]) begin
      int w = widths[i];
      width = WW'(w);
      clear = 1'b1; step();
      for (int r = 0; r < KS; r++) for (int p = 0; p < L; p++) rows[r][p] = '0;
      for (int n = 0; n < KS; n++) fetch_row(w);
      check_pass(w, "full window");
      check_pass(w, "second pass");
      fetch_row(w);
      check_pass(w, "after fetch");
      shift_up = 1'b1; step();
      model_shift_up();
      check_pass(w, "zero bottom row");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
