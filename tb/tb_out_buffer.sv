// tb_out_buffer: checks the output FIFO against a queue model.
// Random pushes (only when not full, as the controller does) and pops; the
// head word, rd_valid, count and full are compared with the model every
// cycle, and the buffer is filled to full at least once.
module tb_out_buffer;
  localparam int W = 48, DEPTH = 8;
  logic clk = 1'b0, rst_n = 1'b0, wr_en = 1'b0, rd_ready = 1'b0, rd_valid, full;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [W-1:0] model [$];
  int checks = 0, failures = 0, full_seen = 0;

  out_buffer #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // Phases that favour filling, then emptying.
      wr_en    = !full && ($urandom_range(0, 9) < ((i / 200) % 2 ? 3 : 8));
      wr_data  = {16'($urandom), 32'($urandom)};
      rd_ready = ($urandom_range(0, 9) < ((i / 200) % 2 ? 8 : 3));
      #1;
      checks++;
      if (count != model.size() || rd_valid != (model.size() != 0) ||
          full != (model.size() == DEPTH)) begin
        failures++;
        $display("cycle %0d: count=%0d valid=%0b full=%0b, model holds %0d", i, count,
                 rd_valid, full, model.size());
      end
      if (model.size() != 0) begin
        checks++;
        if (rd_data !== model[0]) begin
          failures++; $display("cycle %0d: head %h expected %h", i, rd_data, model[0]);
        end
      end
      if (full) full_seen++;
      @(posedge clk);
      if (rd_ready && model.size() != 0) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("buffer never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
