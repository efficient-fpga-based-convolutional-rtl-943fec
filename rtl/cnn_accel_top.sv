// cnn_accel_top: the convolution accelerator in the programmable logic.
//
// One channel plane of F x F elements (F up to MAX_F, set per plane with
// `width`) streams in from the DMA through in_valid/in_ready/in_data, row by
// row, into the row_buffer. The conv_core slides the KS x KS kernel over the
// plane with zero padding of (KS-1)/2, so the output plane is F x F too, one
// output element per cycle during a row pass of F+KS-1 cycles. Each result
// goes through the pointwise_unit (times the 1x1 weight plus bias, or passed
// through when pw_on is low) into the out_buffer, which the DMA empties
// through out_valid/out_ready/out_data in row-major order.
//
// Host side: before start, load the KS x KS kernel (k_we, k_row, k_col,
// k_data), the bias, the 1x1 weight (w_we, w_data) and pw_bias; they stay for
// the whole plane. start (one cycle, while busy is low) begins a plane; done
// pulses once every output element is in the out_buffer. pass_cycles reports
// the row-pass cycles of the last plane, F x (F+2) for KS = 3 without stalls.
// The pipeline stalls while the out_buffer is full.
//
// The buffer, core, point-wise MAC and output buffer and their order follow
// the reference system; the DMA, AXI bus, host processor and external memory
// are outside this module. Widths, padding, the controller and the
// handshakes are this design's own.
module cnn_accel_top
  import cnn_pkg::*;
#(
  parameter int unsigned KS_P      = KS,
  parameter int unsigned MAX_F_P   = MAX_F,
  parameter int unsigned OUT_DEPTH = 128,
  localparam int unsigned WW       = $clog2(MAX_F_P + 1),
  localparam int unsigned KW       = $clog2(KS_P)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // host control
  input  logic                     start,
  input  logic [WW-1:0]            width,
  input  logic                     pw_on,
  input  logic                     k_we,
  input  logic [KW-1:0]            k_row,
  input  logic [KW-1:0]            k_col,
  input  logic signed [DATA_W-1:0] k_data,
  input  logic signed [ACC_W-1:0]  bias,
  input  logic                     w_we,
  input  logic signed [DATA_W-1:0] w_data,
  input  logic signed [PW_W-1:0]   pw_bias,
  output logic                     busy,
  output logic                     done,
  output logic [31:0]              pass_cycles,
  // input map stream (from the DMA)
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [DATA_W-1:0] in_data,
  // output map stream (to the DMA)
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic signed [PW_W-1:0]   out_data
);
  localparam int unsigned CW = $clog2(OUT_DEPTH + 1);

  logic                     buf_clear, buf_shift_up, buf_load, buf_rotate;
  logic                     en, v_col0, room, ob_full;
  logic [WW-1:0]            cur_width;
  logic signed [DATA_W-1:0] taps [KS_P][KS_P];
  logic signed [ACC_W-1:0]  dw_y;
  logic                     dw_valid;
  logic signed [PW_W-1:0]   pw_y;
  logic                     pw_valid;
  logic [CW-1:0]            ob_count;

  assign room = !ob_full;

  accel_ctrl #(.KS(KS_P), .MAX_F(MAX_F_P), .TAIL(2)) u_ctrl (
    .clk, .rst_n, .start, .width,
    .in_valid, .in_ready, .room,
    .buf_clear, .buf_shift_up, .buf_load, .buf_rotate,
    .en, .v_out(v_col0), .cur_width,
    .busy, .done, .pass_cycles
  );

  row_buffer #(.KS(KS_P), .MAX_F(MAX_F_P), .F_W(DATA_W)) u_buf (
    .clk, .rst_n, .width(cur_width),
    .clear(buf_clear), .shift_up(buf_shift_up),
    .load(buf_load), .din(in_data),
    .rotate(buf_rotate), .taps
  );

  conv_core #(.KS(KS_P), .F_W(DATA_W), .ACC_W(ACC_W)) u_core (
    .clk, .rst_n, .en,
    .k_we, .k_row, .k_col, .k_data, .bias,
    .v_in(v_col0), .taps,
    .y(dw_y), .y_valid(dw_valid)
  );

  pointwise_unit #(.IN_W(ACC_W), .K_W(DATA_W), .OUT_W(PW_W)) u_pw (
    .clk, .rst_n, .en, .pw_on,
    .w_we, .w_data, .pw_bias,
    .x(dw_y), .x_valid(dw_valid),
    .y(pw_y), .y_valid(pw_valid)
  );

  // A result leaves the point-wise register on an enabled cycle; en is only
  // high while the buffer has room.
  out_buffer #(.W(PW_W), .DEPTH(OUT_DEPTH)) u_obuf (
    .clk, .rst_n,
    .wr_en(pw_valid && en), .wr_data(pw_y),
    .rd_ready(out_ready), .rd_valid(out_valid), .rd_data(out_data),
    .count(ob_count), .full(ob_full)
  );

  // ob_count is brought out for debug probing only.
  logic [CW-1:0] unused_count;
  assign unused_count = ob_count;
endmodule
