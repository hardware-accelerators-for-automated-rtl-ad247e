// pingpong_ram: a pair of identical memories used as a double buffer.
//
// The producer (port A) works on bank `sel` while the consumer (port B) reads
// the other bank; toggling `sel` hands a finished bank to the consumer and
// gives the producer the old one. This is how the labeling unit lets the
// processor read the last labeled frame and its cluster features for a whole
// frame time while the next frame is being labeled.
//
// Port A: combinational read of a_addr, write of a_wdata at the clock edge
// when a_we is high (a read and a write of the same address in one cycle
// returns the old contents). Port B: read only, b_rdata registered one cycle
// after b_addr. Port C: a second read-only port on the same bank as port B,
// registered like it (the labeling unit streams the finished label image to
// the display through it while the processor reads at random through port B).
// In a two-port block RAM per bank this maps onto the bank's second port,
// which the producer does not use while the bank is finished.
module pingpong_ram #(
  parameter int unsigned WIDTH = 6,
  parameter int unsigned DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     sel,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  logic                     a_we,
  input  logic [WIDTH-1:0]         a_wdata,
  output logic [WIDTH-1:0]         a_rdata,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  output logic [WIDTH-1:0]         b_rdata,
  input  logic [$clog2(DEPTH)-1:0] c_addr,
  output logic [WIDTH-1:0]         c_rdata
);
  logic [WIDTH-1:0] bank0 [DEPTH];
  logic [WIDTH-1:0] bank1 [DEPTH];

  assign a_rdata = sel ? bank1[a_addr] : bank0[a_addr];

  always_ff @(posedge clk) begin
    if (a_we && !sel) bank0[a_addr] <= a_wdata;
    if (a_we &&  sel) bank1[a_addr] <= a_wdata;
    b_rdata <= sel ? bank0[b_addr] : bank1[b_addr];
    c_rdata <= sel ? bank0[c_addr] : bank1[c_addr];
  end

endmodule
