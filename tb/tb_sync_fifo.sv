// tb_sync_fifo: self-checking testbench of the single-clock FIFO.
//
// Uses a non-power-of-two depth (13) so that pointer wrap-around is tested.
// Random pushes and pops are compared with a queue model: data order,
// out_valid/in_ready against the model's fill level, the count output, and
// the sticky overflow flag after a push into a full FIFO.
module tb_sync_fifo;
  localparam int WIDTH = 8;
  localparam int DEPTH = 13;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             in_valid, in_ready, out_valid, out_ready, overflow;
  logic [WIDTH-1:0] in_data, out_data;
  logic [$clog2(DEPTH+1)-1:0] count;

  sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model[$];

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_data = 0; out_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      // Bias toward filling in the first half, toward draining in the second.
      in_valid  = ($urandom_range(99) < ((i % 2000) < 1000 ? 70 : 30));
      in_data   = WIDTH'($urandom);
      out_ready = ($urandom_range(99) < ((i % 2000) < 1000 ? 30 : 70));
      checks++;
      if (in_ready !== (model.size() < DEPTH) || out_valid !== (model.size() > 0) ||
          count !== ($clog2(DEPTH+1))'(model.size())) begin
        failures++;
        if (failures < 10) $display("flags wrong at %0d: size %0d", i, model.size());
      end
      if (out_valid && model.size() > 0) begin
        checks++;
        if (out_data !== model[0]) begin
          failures++;
          if (failures < 10) $display("data wrong at %0d", i);
        end
      end
      @(posedge clk);
      if (out_valid && out_ready && model.size() > 0) void'(model.pop_front());
      if (in_valid && model.size() < DEPTH + (out_valid && out_ready ? 1 : 0) && in_ready) model.push_back(in_data);
    end
    checks++;
    if (!overflow) begin
      // The random pattern fills the FIFO; force one push while full.
      failures++;
      $display("overflow flag never set");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
