// mem_subsystem -- one memory controller together with its physical banks.
//
// This is the unit generated for one group of data structures that share
// storage: a memctrl instance and NBANK dp_sram banks of DEPTH x DW words,
// all of the same size (the homogeneous organisation the controller relies
// on). Port 0 of each bank is the write port and port 1 the read port; the
// unused data input of port 1 is tied to zero, its write enable low, and the
// output of port 0 is left open.
//
// The process-side ports and the parameters are those of memctrl (see there
// for the layout of each interface). Timing: a write is performed at the clock
// edge of the request; read data appears on rd_q with rd_valid RD_LAT = 1
// cycle after the request, the latency of the synchronous banks.
// Defaults: the four-bank example with one writer and four readers on
// 4 x 1280 x 32-bit banks.
module mem_subsystem
  import memctrl_pkg::*;
#(
  parameter int unsigned NBANK  = 4,
  parameter int unsigned DEPTH  = 1280,
  parameter int unsigned DW     = 32,
  parameter int unsigned NWR    = 1,
  parameter int unsigned NRD    = 4,
  parameter int unsigned LAW    = 13,
  parameter layout_t [NWR-1:0] WR_LAY = '{default: mk_layout(4, 1, 1, 1280, 0, 1)},
  parameter layout_t [NRD-1:0] RD_LAY = '{default: mk_layout(4, 1, 1, 1280, 0, 1)},
  localparam int unsigned PAW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [NWR-1:0]              wr_ce,
  input  logic [NWR-1:0]              wr_we,
  input  logic [NWR-1:0][LAW-1:0]     wr_a,
  input  logic [NWR-1:0][DW-1:0]      wr_d,
  input  logic [NRD-1:0]              rd_ce,
  input  logic [NRD-1:0][LAW-1:0]     rd_a,
  output logic [NRD-1:0][DW-1:0]      rd_q,
  output logic [NRD-1:0]              rd_valid,
  output logic                        wr_conflict,
  output logic                        rd_conflict
);

  logic [NBANK-1:0]          b_wce, b_wwe, b_rce;
  logic [NBANK-1:0][PAW-1:0] b_wa, b_ra;
  logic [NBANK-1:0][DW-1:0]  b_wd, b_rq;

  memctrl #(
    .NBANK(NBANK), .DEPTH(DEPTH), .DW(DW), .RD_LAT(1), .NWR(NWR), .NRD(NRD),
    .LAW(LAW), .WR_LAY(WR_LAY), .RD_LAY(RD_LAY)
  ) u_ctrl (
    .clk, .rst_n,
    .wr_ce, .wr_we, .wr_a, .wr_d,
    .rd_ce, .rd_a, .rd_q, .rd_valid,
    .b_wce, .b_wwe, .b_wa, .b_wd,
    .b_rce, .b_ra, .b_rq,
    .wr_conflict, .rd_conflict
  );

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    dp_sram #(.DEPTH(DEPTH), .DW(DW)) u_bank (
      .clk,
      .ce0(b_wce[b]), .we0(b_wwe[b]), .a0(b_wa[b]), .d0(b_wd[b]), .q0(),
      .ce1(b_rce[b]), .we1(1'b0),     .a1(b_ra[b]), .d1('0),      .q1(b_rq[b])
    );
  end

endmodule
