// tb_cnn_accel_top_k5: end-to-end test of the accelerator built for 5x5
// kernels (padding 2, row pass F+4 cycles), otherwise as tb_cnn_accel_top.
//
// tb_cnn_accel_top: end-to-end test of the accelerator.
// The test plays the host and the DMA. For each plane it loads a random
// 3x3 kernel, bias, 1x1 weight and point-wise bias, streams a random F x F
// plane in and collects the F x F outputs, comparing them in row-major order
// with a model computed here: zero-padded ('same') 3x3 convolution plus bias,
// then, if the point-wise step is on, times the weight plus the point-wise
// bias. Planes run with and without gaps in the input stream and with the
// DMA reading slowly enough to fill the small output buffer. It counts the
// mechanisms of the design and fails if one never happened: top zero rows
// (buffer clear), row fetch with shift-up, bottom zero rows, input stalls,
// output-buffer-full stalls, point-wise planes and pass-through planes.
// Per plane, the row-pass cycles must be F*(F+KS-1), and without stalls the
// busy time must be 1 + (F+KS-1-(KS-1)/2) + F*F + F*(F+KS-1) + 2 cycles
// (for KS = 3: 1 + (F+1) + F*F + F*(F+2) + 2).
module tb_cnn_accel_top_k5;
  import cnn_pkg::*;
  localparam int MAXF = 16, DEPTH = 4;
  localparam int WW = $clog2(MAXF + 1);
  localparam int KSZ = 5;
  localparam int WD_CYCLES = 50000;
  // Host and DMA models, reference model, mechanism counters and watchdog.
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, pw_on = 1'b0;
  logic [WW-1:0] width = '0;
  logic k_we = 1'b0, w_we = 1'b0;
  logic [$clog2(KSZ)-1:0] k_row = '0, k_col = '0;
  logic signed [DATA_W-1:0] k_data = '0, w_data = '0;
  logic signed [ACC_W-1:0]  bias = '0;
  logic signed [PW_W-1:0]   pw_bias = '0;
  logic busy, done;
  logic [31:0] pass_cycles;
  logic in_valid = 1'b0, in_ready;
  logic signed [DATA_W-1:0] in_data = '0;
  logic out_valid, out_ready = 1'b0;
  logic signed [PW_W-1:0] out_data;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_clear = 0, n_fetch = 0, n_zero_row = 0, n_in_stall = 0, n_out_stall = 0;
  int n_pw_planes = 0, n_bypass_planes = 0;

  logic signed [DATA_W-1:0] plane [MAXF][MAXF];
  logic signed [DATA_W-1:0] kern [KSZ][KSZ];
  logic signed [PW_W-1:0]   expect_q [$];
  bit stall_in = 1'b0, stall_out = 1'b0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (WD_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    n_clear    += int'(dut.buf_clear);
    n_fetch    += int'(dut.buf_shift_up && dut.u_ctrl.fetched < (WW+1)'(dut.cur_width));
    n_zero_row += int'(dut.buf_shift_up && dut.u_ctrl.fetched >= (WW+1)'(dut.cur_width));
    n_in_stall += int'(in_ready && !in_valid);
    n_out_stall += int'(busy && !dut.room);
  end

  // DMA read side: takes output elements, slowly when stall_out is set.
  always @(negedge clk) out_ready <= stall_out ? ($urandom_range(0, 4) == 0) : 1'b1;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (expect_q.size() == 0) begin
      failures++; $display("unexpected output %0d", out_data);
    end else begin
      logic signed [PW_W-1:0] e;
      e = expect_q.pop_front();
      if (out_data !== e) begin failures++; $display("output %0d, expected %0d", out_data, e); end
    end
  end

  task automatic host_load(input bit pw);
    for (int r = 0; r < KSZ; r++)
      for (int c = 0; c < KSZ; c++) begin
        @(negedge clk);
        kern[r][c] = DATA_W'($urandom_range(0, 511)) - 16'sd256;
        k_row = $clog2(KSZ)'(r); k_col = $clog2(KSZ)'(c); k_data = kern[r][c]; k_we = 1'b1;
      end
    @(negedge clk);
    k_we = 1'b0;
    w_data = DATA_W'($urandom_range(0, 255)) - 16'sd128; w_we = 1'b1;
    bias = ACC_W'($urandom_range(0, 4000)) - 2000;
    pw_bias = PW_W'($urandom_range(0, 4000)) - 2000;
    pw_on = pw;
    @(negedge clk);
    w_we = 1'b0;
  endtask

  function automatic logic signed [DATA_W-1:0] px(input int f, input int y, input int x);
    if (y < 0 || y >= f || x < 0 || x >= f) return '0;
    return plane[y][x];
  endfunction

  task automatic make_expected(input int f, input bit pw);
    for (int y = 0; y < f; y++)
      for (int x = 0; x < f; x++) begin
        longint acc = longint'(bias);
        logic signed [ACC_W-1:0] dwv;
        for (int r = 0; r < KSZ; r++)
          for (int c = 0; c < KSZ; c++)
            acc += longint'(px(f, y + r - KSZ / 2, x + c - KSZ / 2)) * longint'(kern[r][c]);
        dwv = ACC_W'(acc);
        if (pw) expect_q.push_back(PW_W'(longint'(dwv) * longint'(w_data) + longint'(pw_bias)));
        else    expect_q.push_back(PW_W'(dwv));
      end
  endtask

  task automatic run_plane(input int f, input bit pw, input bit s_in, input bit s_out);
    int busy_cycles = 0, n = 0;
    host_load(pw);
    for (int y = 0; y < f; y++)
      for (int x = 0; x < f; x++) plane[y][x] = DATA_W'($urandom);
    make_expected(f, pw);
    stall_in = s_in; stall_out = s_out;
    @(negedge clk);
    width = WW'(f); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    // DMA write side: row-major stream, with gaps when s_in is set.
    while (busy) begin
      in_valid = (n < f * f) && (!s_in || $urandom_range(0, 2) != 0);
      in_data  = (n < f * f) ? plane[n / f][n % f] : '0;
      busy_cycles++;
      @(posedge clk);
      if (in_valid && in_ready) n++;
      @(negedge clk);
    end
    in_valid = 1'b0;
    stall_out = 1'b0;
    while (expect_q.size() != 0 && out_valid) @(negedge clk);
    repeat (2) @(negedge clk);
    checks++;
    if (expect_q.size() != 0) begin
      failures++; $display("plane F=%0d: %0d outputs missing", f, expect_q.size());
      expect_q.delete();
    end
    checks++;
    if (int'(pass_cycles) != f * (f + KSZ - 1)) begin
      failures++; $display("plane F=%0d: %0d pass cycles, expected %0d", f, pass_cycles, f * (f + KSZ - 1));
    end
    if (!s_in && !s_out) begin
      checks++;
      if (busy_cycles != 1 + (f + KSZ - KSZ / 2 - 1) + f * f + f * (f + KSZ - 1) + 2) begin
        failures++; $display("plane F=%0d: busy %0d cycles, expected %0d", f, busy_cycles,
                             1 + (f + KSZ - KSZ / 2 - 1) + f * f + f * (f + KSZ - 1) + 2);
      end
    end
    if (pw) n_pw_planes++; else n_bypass_planes++;
    $display("plane F=%0d pw=%0b: busy %0d cycles, %0d pass cycles", f, pw, busy_cycles, pass_cycles);
  endtask

  task automatic mech(input int n, input string what, input bit required);
    $display("mechanism %-28s %0d", what, n);
    if (required) begin
      checks++;
      if (n == 0) begin failures++; $display("mechanism never happened: %s", what); end
    end
  endtask

  task automatic check_mechanisms(input bit stalls_required);
    mech(n_clear, "top zero rows (clear)", 1'b1);
    mech(n_fetch, "row fetch with shift-up", 1'b1);
    mech(n_zero_row, "bottom zero row", 1'b1);
    mech(n_in_stall, "input stream stall", stalls_required);
    mech(n_out_stall, "output buffer full stall", stalls_required);
    mech(n_pw_planes, "point-wise planes", 1'b1);
    mech(n_bypass_planes, "pass-through planes", stalls_required);
  endtask

  cnn_accel_top #(.KS_P(KSZ), .MAX_F_P(MAXF), .OUT_DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_plane(5, 1'b1, 1'b0, 1'b0);
    run_plane(8, 1'b0, 1'b0, 1'b0);
    run_plane(16, 1'b1, 1'b1, 1'b1);
    run_plane(1, 1'b1, 1'b1, 1'b0);
    run_plane(3, 1'b0, 1'b0, 1'b1);
    run_plane(11, 1'b1, 1'b1, 1'b1);
    check_mechanisms(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
