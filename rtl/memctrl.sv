// memctrl -- flexible multi-bank memory controller.
//
// Sits between the memory interfaces of HLS-generated processes and a set of
// NBANK equally sized physical banks, each a two-port synchronous RAM. The
// processes issue logical addresses into their data structures as if each
// structure were one memory with as many ports as they need; the controller
// maps every access onto the bank and word where the element actually lives,
// so the same process RTL can be reused with differently organised memories.
//
// Organisation (per bank): port 0 of every bank is reserved for writes and
// port 1 for reads, so each bank serves one write and one read per cycle. One
// ATU per bank port selects the write (resp. read) interface that addresses
// the bank and forms its physical address; a multiplexer per bank steers the
// selected interface's write data onto port 0; a rd_return unit per read
// interface remembers which bank serves it and returns that bank's port-1
// data RD_LAT cycles later, sliced for merged layouts.
//
// Each interface has its own layout (memctrl_pkg::layout_t), so one set of
// banks can hold several data structures that are never live together, each
// arranged as m parallel x n serial banks (cyclic + block partitioning),
// merged (d elements per word) or duplicated (dup copies, written together,
// each read interface reading its own copy via 'base').
//
// Interfaces: write interface i has wr_ce (request), wr_we (write), wr_a
// (logical address), wr_d (data, a full bank word; a merged writer first goes
// through wr_merge). Read interface j has rd_ce, rd_a, and returns rd_q with
// rd_valid RD_LAT cycles later. The b_* ports connect the banks.
// Timing: requests pass to the bank pins combinationally; read data returns
// after the bank latency with no extra register in the path.
// The controller does not serialise colliding requests: as in the document,
// the data layout must keep distinct interfaces off one bank port in one cycle.
// wr_conflict/rd_conflict flag a violation (lowest interface wins) and the
// ATUs assert on it; the flags themselves are this design's addition.
// Defaults: the four-bank example, 1 writer and 4 readers on 4 x 1280 x 32.
module memctrl
  import memctrl_pkg::*;
#(
  parameter int unsigned NBANK  = 4,
  parameter int unsigned DEPTH  = 1280,
  parameter int unsigned DW     = 32,
  parameter int unsigned RD_LAT = 1,
  parameter int unsigned NWR    = 1,
  parameter int unsigned NRD    = 4,
  parameter int unsigned LAW    = 13,
  parameter layout_t [NWR-1:0] WR_LAY = '{default: mk_layout(4, 1, 1, 1280, 0, 1)},
  parameter layout_t [NRD-1:0] RD_LAY = '{default: mk_layout(4, 1, 1, 1280, 0, 1)},
  localparam int unsigned PAW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // process write interfaces
  input  logic [NWR-1:0]              wr_ce,
  input  logic [NWR-1:0]              wr_we,
  input  logic [NWR-1:0][LAW-1:0]     wr_a,
  input  logic [NWR-1:0][DW-1:0]      wr_d,
  // process read interfaces
  input  logic [NRD-1:0]              rd_ce,
  input  logic [NRD-1:0][LAW-1:0]     rd_a,
  output logic [NRD-1:0][DW-1:0]      rd_q,
  output logic [NRD-1:0]              rd_valid,
  // bank port 0 (writes)
  output logic [NBANK-1:0]            b_wce,
  output logic [NBANK-1:0]            b_wwe,
  output logic [NBANK-1:0][PAW-1:0]   b_wa,
  output logic [NBANK-1:0][DW-1:0]    b_wd,
  // bank port 1 (reads)
  output logic [NBANK-1:0]            b_rce,
  output logic [NBANK-1:0][PAW-1:0]   b_ra,
  input  logic [NBANK-1:0][DW-1:0]    b_rq,
  // protocol violations
  output logic                        wr_conflict,
  output logic                        rd_conflict
);

  localparam int unsigned WSW = (NWR > 1) ? $clog2(NWR) : 1;

  logic [NBANK-1:0] wconf, rconf;

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    logic [WSW-1:0] wsel;

    atu #(
      .NIF(NWR), .LAW(LAW), .PAW(PAW), .BANK(b), .WRITE_PORT(1'b1), .LAY(WR_LAY)
    ) u_atu_w (
      .clk, .if_ce(wr_ce), .if_we(wr_we), .if_a(wr_a),
      .bank_ce(b_wce[b]), .bank_we(b_wwe[b]), .bank_a(b_wa[b]),
      .sel(wsel), .conflict(wconf[b])
    );

    // write-data multiplexer of this bank
    assign b_wd[b] = wr_d[wsel];

    atu #(
      .NIF(NRD), .LAW(LAW), .PAW(PAW), .BANK(b), .WRITE_PORT(1'b0), .LAY(RD_LAY)
    ) u_atu_r (
      .clk, .if_ce(rd_ce), .if_we('0), .if_a(rd_a),
      .bank_ce(b_rce[b]), .bank_we(), .bank_a(b_ra[b]),
      .sel(), .conflict(rconf[b])
    );
  end

  for (genvar j = 0; j < NRD; j++) begin : g_rd
    rd_return #(
      .NBANK(NBANK), .DW(DW), .LAW(LAW), .RD_LAT(RD_LAT), .LAY(RD_LAY[j])
    ) u_ret (
      .clk, .rst_n, .rd_ce(rd_ce[j]), .rd_a(rd_a[j]), .bank_q(b_rq),
      .rd_q(rd_q[j]), .rd_valid(rd_valid[j])
    );
  end

  assign wr_conflict = |wconf;
  assign rd_conflict = |rconf;

endmodule
