// tb_accel_ctrl: checks the plane sequencer on its own.
// For several widths F it starts a plane with the input stream and the
// output room both available, then with random gaps in both, and counts the
// commands it issues: one clear, F+1 shift-ups, F*F loads (only while
// in_valid is high), F*(F+2) rotations, F*F column-0 valid cycles, and one
// done pulse. Without stalls the busy time must be exactly
// 1 + (F+1) + F*F + F*(F+2) + 2 cycles. Rotation and valid must never occur
// while room is low, and a load never while in_valid is low.
module tb_accel_ctrl;
  localparam int KS = 3, MAX_F = 16;
  localparam int WW = $clog2(MAX_F + 1);
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, in_valid = 1'b0, room = 1'b1;
  logic [WW-1:0] width = '0, cur_width;
  logic in_ready, buf_clear, buf_shift_up, buf_load, buf_rotate, en, v_out, busy, done;
  logic [31:0] pass_cycles;
  int checks = 0, failures = 0;
  int n_clear, n_shift, n_load, n_rot, n_v, n_done, n_busy;

  accel_ctrl #(.KS(KS), .MAX_F(MAX_F), .TAIL(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    n_clear += int'(buf_clear);
    n_shift += int'(buf_shift_up);
    n_load  += int'(buf_load);
    n_rot   += int'(buf_rotate);
    n_v     += int'(v_out && en);
    n_done  += int'(done);
    n_busy  += int'(busy);
    if ((buf_rotate || (v_out && en)) && !room) begin
      failures++; $display("advance without room");
    end
    if (buf_load && !in_valid) begin failures++; $display("load without data"); end
    if (en !== room) begin failures++; $display("en does not follow room"); end
  end

  task automatic expect_eq(input int got, input int want, input string what);
    checks++;
    if (got != want) begin failures++; $display("%s: %0d, expected %0d", what, got, want); end
  endtask

  task automatic run_plane(input int f, input bit stalls);
    n_clear = 0; n_shift = 0; n_load = 0; n_rot = 0; n_v = 0; n_done = 0; n_busy = 0;
    @(negedge clk);
    width = WW'(f); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (busy) begin
      in_valid = stalls ? ($urandom_range(0, 2) != 0) : 1'b1;
      room     = stalls ? ($urandom_range(0, 3) != 0) : 1'b1;
      @(negedge clk);
    end
    room = 1'b1; in_valid = 1'b0;
    repeat (2) @(negedge clk);
    expect_eq(n_clear, 1, "clears");
    expect_eq(n_shift, f + 1, "shift-ups");
    expect_eq(n_load, f * f, "loads");
    expect_eq(n_rot, f * (f + 2), "rotations");
    expect_eq(int'(pass_cycles), f * (f + 2), "pass cycles");
    expect_eq(n_v, f * f, "valid column-0 cycles");
    expect_eq(n_done, 1, "done pulses");
    if (!stalls) expect_eq(n_busy, 1 + (f + 1) + f * f + f * (f + 2) + 2, "busy cycles");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run_plane(4, 1'b0);
    run_plane(16, 1'b0);
    run_plane(1, 1'b0);
    run_plane(7, 1'b1);
    run_plane(16, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
