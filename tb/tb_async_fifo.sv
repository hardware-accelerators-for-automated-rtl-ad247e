// tb_async_fifo: self-checking testbench of the dual-clock FIFO.
//
// The write clock (period 10) is faster than the read clock (period 15), as
// between the 100 MHz segmentation domain and the 67 MHz processing domain.
// A counting sequence is written with random gaps and read with random
// back-pressure; every word read must be the next number of the sequence, the
// FIFO must fill up (w_ready low) at some point, and all words must arrive.
module tb_async_fifo;
  localparam int WIDTH = 8;
  localparam int DEPTH = 8;
  localparam int WORDS = 3000;

  logic wclk = 1'b0, rclk = 1'b0;
  logic wrst_n = 1'b0, rrst_n = 1'b0;
  always #5 wclk = ~wclk;
  always #7.5 rclk = ~rclk;

  logic             w_valid, w_ready, r_valid, r_ready;
  logic [WIDTH-1:0] w_data, r_data;

  async_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  int sent = 0, received = 0, full_seen = 0;

  initial begin : watchdog
    repeat (200000) @(posedge wclk);
    failures++;
    $display("watchdog expired: sent %0d received %0d", sent, received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Writer.
  initial begin
    w_valid = 0; w_data = 0;
    repeat (3) @(posedge wclk);
    wrst_n = 1;
    while (sent < WORDS) begin
      @(negedge wclk);
      w_valid = ($urandom_range(99) < 80);
      w_data  = WIDTH'(sent);
      @(posedge wclk);
      if (!w_ready) full_seen++;
      if (w_valid && w_ready) sent++;
    end
    @(negedge wclk) w_valid = 0;
  end

  // Reader.
  initial begin
    r_ready = 0;
    repeat (3) @(posedge rclk);
    rrst_n = 1;
    while (received < WORDS) begin
      @(negedge rclk);
      r_ready = ($urandom_range(99) < (received < WORDS / 2 ? 50 : 95));
      @(posedge rclk);
      if (r_valid && r_ready) begin
        checks++;
        if (r_data !== WIDTH'(received)) begin
          failures++;
          if (failures < 10) $display("word %0d read as %0d", received, r_data);
        end
        received++;
      end
    end
    repeat (10) @(posedge rclk);
    checks++;
    if (r_valid) begin failures++; $display("extra word in FIFO"); end
    checks++;
    if (full_seen == 0) begin failures++; $display("FIFO never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
