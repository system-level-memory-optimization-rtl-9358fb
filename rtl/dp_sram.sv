// dp_sram -- one physical memory bank: a true dual-port synchronous RAM.
//
// Models the memory IP the controller is built on: an SRAM (ASIC) or BRAM
// (FPGA) with two independent read/write ports, each serving one read or one
// write per clock, with synchronous write and synchronous read. Each port has
// chip enable CE, write enable WE, address A, input data D and output data Q.
//
// Timing: a write (CE=1, WE=1) updates the word at the rising edge. A read
// (CE=1, WE=0) presents the word on Q after the next rising edge (latency 1)
// and Q holds its value until the next read on that port. A read and a write
// of the same word in the same cycle on different ports return the old word.
// Contents are not reset. The latency of 1 and the read-during-write
// behaviour are this design's choices; the two-port, synchronous organisation
// follows the memories the controller targets.
module dp_sram #(
  parameter int unsigned DEPTH = 1280,
  parameter int unsigned DW    = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  // port 0
  input  logic          ce0,
  input  logic          we0,
  input  logic [AW-1:0] a0,
  input  logic [DW-1:0] d0,
  output logic [DW-1:0] q0,
  // port 1
  input  logic          ce1,
  input  logic          we1,
  input  logic [AW-1:0] a1,
  input  logic [DW-1:0] d1,
  output logic [DW-1:0] q1
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ce0) begin
      if (we0) mem[a0] <= d0;
      else     q0      <= mem[a0];
    end
    if (ce1) begin
      if (we1) mem[a1] <= d1;
      else     q1      <= mem[a1];
    end
  end

  // Two writes to one word in the same cycle leave it undefined in a real RAM.
  a_no_double_write: assert property (@(posedge clk)
      !(ce0 && we0 && ce1 && we1 && a0 == a1))
    else $error("dp_sram: both ports write address %0d", a0);

endmodule
