// conv_core: row-oriented pipeline convolution core for KS x KS kernels.
//
// KS x KS mac_unit cells are arranged in KS columns; cell [r][c] keeps kernel
// element K[r][c]. The row buffer presents, every cycle, the first KS
// elements of each of its KS FIFOs (taps[r][0..KS-1]). Column 0 takes tap 0
// directly; tap k reaches column k through k col_pipe_reg stages, together
// with the partial sum of the column before, so column c at cycle t adds
// F[r,t] * K[r][c] to column c-1's result of cycle t-1. After KS cycles of
// fill, the last column holds one complete window per row every cycle, and
// sum_unit adds the KS row sums and the bias into one output element.
//
// Timing: an element whose window starts at column 0 in cycle t (v_in high)
// is on y with y_valid after the clock edge that ends cycle t+KS-1, so with
// KS = 3 the first output F'[1,1] is computed in cycle 3 and registered at its
// end. One element per cycle follows. en low freezes every stage.
// Kernel load: k_we writes k_data into cell [k_row][k_col]; the kernel stays
// for the whole map.
//
// The column structure, the pipeline registers and the summing block follow
// the reference architecture; the valid bit and stall enable are this
// design's own.
module conv_core #(
  parameter int unsigned KS    = 3,
  parameter int unsigned F_W   = 16,
  parameter int unsigned ACC_W = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          en,
  input  logic                          k_we,
  input  logic [$clog2(KS)-1:0]         k_row,
  input  logic [$clog2(KS)-1:0]         k_col,
  input  logic signed [F_W-1:0]         k_data,
  input  logic signed [ACC_W-1:0]       bias,
  input  logic                          v_in,
  input  logic signed [F_W-1:0]         taps [KS][KS],
  output logic signed [ACC_W-1:0]       y,
  output logic                          y_valid
);
  // mac[c][r]: output of the cell in column c, kernel row r.
  logic signed [ACC_W-1:0] mac   [KS][KS];
  // f_col[c][r], acc_col[c][r]: what the cell in column c, row r receives.
  logic signed [F_W-1:0]   f_col   [KS][KS];
  logic signed [ACC_W-1:0] acc_col [KS][KS];
  logic                    v_last;

  // Pipeline registers between column g and column g+1; stage g forwards
  // the taps KS-1-g columns still need.
  for (genvar g = 0; g < int'(KS) - 1; g++) begin : preg
    localparam int unsigned NT = KS - 1 - g;
    logic                    vi, vo;
    logic signed [ACC_W-1:0] pi [KS];
    logic signed [ACC_W-1:0] po [KS];
    logic signed [F_W-1:0]   ti [KS][NT];
    logic signed [F_W-1:0]   to [KS][NT];

    if (g == 0) begin : first
      assign vi = v_in;
      for (genvar r = 0; r < int'(KS); r++) begin : row
        for (genvar k = 0; k < int'(NT); k++) begin : tap
          assign ti[r][k] = taps[r][k+1];
        end
      end
    end else begin : later
      assign vi = preg[g-1].vo;
      for (genvar r = 0; r < int'(KS); r++) begin : row
        for (genvar k = 0; k < int'(NT); k++) begin : tap
          assign ti[r][k] = preg[g-1].to[r][k+1];
        end
      end
    end
    for (genvar r = 0; r < int'(KS); r++) begin : ps
      assign pi[r] = mac[g][r];
    end

    col_pipe_reg #(.ROWS(KS), .NTAPS(NT), .ACC_W(ACC_W), .F_W(F_W)) u_reg (
      .clk, .rst_n, .en,
      .v_in(vi), .psum_in(pi), .tap_in(ti),
      .v_out(vo), .psum_out(po), .tap_out(to)
    );
  end

  // Inputs of each column: column 0 from the buffer with a zero partial sum,
  // later columns from the pipeline register before them.
  for (genvar c = 0; c < int'(KS); c++) begin : col
    for (genvar r = 0; r < int'(KS); r++) begin : row
      if (c == 0) begin : c0
        assign f_col[c][r]   = taps[r][0];
        assign acc_col[c][r] = '0;
      end else begin : cn
        assign f_col[c][r]   = preg[c-1].to[r][0];
        assign acc_col[c][r] = preg[c-1].po[r];
      end
      mac_unit #(.F_W(F_W), .K_W(F_W), .ACC_W(ACC_W)) u_mac (
        .clk, .rst_n,
        .k_we   (k_we && (k_row == ($clog2(KS))'(r)) && (k_col == ($clog2(KS))'(c))),
        .k_in   (k_data),
        .f_in   (f_col[c][r]),
        .acc_in (acc_col[c][r]),
        .mac_out(mac[c][r])
      );
    end
  end

  if (KS > 1) begin : vl
    assign v_last = preg[KS-2].vo;
  end else begin : vl1
    assign v_last = v_in;
  end

  sum_unit #(.ROWS(KS), .ACC_W(ACC_W)) u_sum (
    .clk, .rst_n, .en,
    .v_in(v_last), .psum_in(mac[KS-1]), .bias,
    .y, .y_valid
  );
endmodule
