// accel_ctrl: sequencer for one F x F channel plane.
//
// After start it clears the row buffer (rows above the map are zero), then
// repeats: shift the FIFOs up, fetch the next input row element by element
// from the input stream into the last FIFO (or leave it zero below the map),
// and, once KS rows are in place, run one row pass of F+KS-1 cycles. During a
// pass the buffer rotates every enabled cycle and v_out marks the first F
// cycles, whose windows start inside the row. Before the first pass it
// fetches KS-PAD rows (PAD = (KS-1)/2); after each pass one more. After the
// F-th pass it lets the last results leave the pipeline (TAIL enabled
// cycles) and pulses done.
//
// Stalls: in LOAD the fetch waits while in_valid is low; everywhere the
// pipeline and the pass advance only while room is high (output buffer not
// full), through en. pass_cycles counts the enabled pass cycles of the
// current plane: F x (F+KS-1) for a complete plane.
//
// Row-by-row fetching, F+2 cycles per output row for KS = 3 and no overlap of
// fetch and compute follow the reference timing; the state machine itself is
// this design's own.
module accel_ctrl #(
  parameter int unsigned KS    = 3,
  parameter int unsigned MAX_F = 128,
  parameter int unsigned TAIL  = 2,
  localparam int unsigned PAD  = (KS - 1) / 2,
  localparam int unsigned WW   = $clog2(MAX_F + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [WW-1:0] width,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic          room,
  output logic          buf_clear,
  output logic          buf_shift_up,
  output logic          buf_load,
  output logic          buf_rotate,
  output logic          en,
  output logic          v_out,
  output logic [WW-1:0] cur_width,
  output logic          busy,
  output logic          done,
  output logic [31:0]   pass_cycles
);
  import cnn_pkg::*;

  ctrl_state_t   state;
  logic [WW-1:0] w_q;        // map width (and height) of this plane
  logic [WW:0]   fetched;    // rows shifted in so far, zero rows included
  logic [WW:0]   passes;     // row passes finished
  logic [WW:0]   cnt;        // element or cycle counter within a state

  assign cur_width = w_q;
  assign busy      = (state != ST_IDLE);

  always_comb begin
    en           = room;
    buf_clear    = (state == ST_CLEAR);
    buf_shift_up = (state == ST_SHIFT);
    in_ready     = (state == ST_LOAD);
    buf_load     = (state == ST_LOAD) && in_valid;
    buf_rotate   = (state == ST_PASS) && room;
    v_out        = (state == ST_PASS) && (cnt < (WW+1)'(w_q));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= ST_IDLE;
      w_q         <= '0;
      fetched     <= '0;
      passes      <= '0;
      cnt         <= '0;
      done        <= 1'b0;
      pass_cycles <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        ST_IDLE: if (start) begin
          w_q         <= width;
          fetched     <= '0;
          passes      <= '0;
          pass_cycles <= '0;
          state       <= ST_CLEAR;
        end
        ST_CLEAR: state <= ST_SHIFT;
        ST_SHIFT: begin
          // Shift number n brings map row n into the last FIFO, or a zero
          // row once n reaches F.
          fetched <= fetched + 1'b1;
          cnt     <= '0;
          if (fetched < (WW+1)'(w_q))                   state <= ST_LOAD;
          else if (fetched + 1'b1 < (WW+1)'(KS - PAD)) state <= ST_SHIFT;
          else                                          state <= ST_PASS;
        end
        ST_LOAD: if (in_valid) begin
          if (cnt == (WW+1)'(w_q) - 1'b1) begin
            cnt   <= '0;
            state <= (fetched < (WW+1)'(KS - PAD)) ? ST_SHIFT : ST_PASS;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        ST_PASS: if (room) begin
          pass_cycles <= pass_cycles + 1'b1;
          if (cnt == (WW+1)'(w_q) + (WW+1)'(KS - 2)) begin
            cnt    <= '0;
            passes <= passes + 1'b1;
            state  <= (passes + 1'b1 == (WW+1)'(w_q)) ? ST_DRAIN : ST_SHIFT;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        ST_DRAIN: if (room) begin
          if (cnt == (WW+1)'(TAIL - 1)) begin
            cnt   <= '0;
            done  <= 1'b1;
            state <= ST_IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end
endmodule
