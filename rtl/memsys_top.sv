// memsys_top -- memory subsystems of the two example accelerators.
//
// Two independent designs stand side by side; the processes that use them are
// not part of this RTL, so their memory interfaces are the ports.
//
// 1. Producer/consumer buffer (pc_*): a producer P writes one element per
//    cycle into a 5120-element ping-pong buffer that a consumer C reads four
//    elements per cycle. The buffer lives in four 1280 x 32 banks, cyclically
//    partitioned (4 parallel, 1 serial): element A is in bank A mod 4, word
//    A/4. The same four banks also hold a second 5120-element structure of two
//    other processes that never run at the same time as P and C; it needs
//    only two parallel accesses and therefore sees the banks as 2 parallel x
//    2 serial (element A: parallel bank A mod 2, serial bank by (A/2) >= 1280).
//    Write interfaces: pc_wr[0] = P, pc_wr[1] = writer of the second
//    structure. Read interfaces: pc_rd[0..3] = the four reads of C,
//    pc_rd[4..5] = the two reads of the second structure.
//
// 2. Debayer accelerator (db_*):
//    array a (12288 x 16 bit): process D1 writes two elements at consecutive
//    addresses per cycle; they are merged into one 32-bit word of an
//    8192 x 32 bank. Process D2 reads A_RD_PORTS elements per cycle; for more
//    than one read the bank is duplicated (A_RD_PORTS copies, all written,
//    read interface j reading copy j).
//    array b (3 x 12264 x 16 bit): process D2 writes one element of each of
//    the three rows per cycle, process D3 reads two consecutive elements per
//    cycle. The rows are distributed over six 8192 x 16 banks: row k occupies
//    banks 2k and 2k+1, cyclically (2 parallel) -- in layout terms 2 parallel
//    x 3 serial with 6132 words per serial block. Logical address of b[k][j]
//    is k*12264 + j.
//
// Timing: writes take effect at the clock edge of the request; read data is
// valid (rd_valid) one cycle after the request. The *_conflict outputs flag
// two interfaces meeting on one bank port, which a correct layout excludes.
// Bank sizes, bank counts and access counts follow the document's examples;
// the numbering of the interfaces, the address of b[k][j] and the choice of
// one read port for array a as default are this design's.
module memsys_top
  import memctrl_pkg::*;
#(
  parameter int unsigned PC_DEPTH   = 1280,   // words per bank, P/C buffer
  parameter int unsigned PC_DW      = 32,
  parameter int unsigned DB_DEPTH   = 8192,   // words per bank, Debayer
  parameter int unsigned A_RD_PORTS = 1,      // parallel reads of array a
  parameter int unsigned B_ROW      = 12264,  // elements per row of array b
  localparam int unsigned PC_LAW    = $clog2(4 * PC_DEPTH),
  localparam int unsigned A_LAW     = 14,     // 12288 elements
  localparam int unsigned B_LAW     = $clog2(3 * B_ROW)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // ---- producer/consumer buffer
  input  logic [1:0]                    pc_wr_ce,
  input  logic [1:0]                    pc_wr_we,
  input  logic [1:0][PC_LAW-1:0]        pc_wr_a,
  input  logic [1:0][PC_DW-1:0]         pc_wr_d,
  input  logic [5:0]                    pc_rd_ce,
  input  logic [5:0][PC_LAW-1:0]        pc_rd_a,
  output logic [5:0][PC_DW-1:0]         pc_rd_q,
  output logic [5:0]                    pc_rd_valid,
  output logic                          pc_wr_conflict,
  output logic                          pc_rd_conflict,
  // ---- Debayer array a: D1 writes two lanes, D2 reads A_RD_PORTS
  input  logic [1:0]                    a_wr_ce,
  input  logic [1:0]                    a_wr_we,
  input  logic [1:0][A_LAW-1:0]         a_wr_a,
  input  logic [1:0][15:0]              a_wr_d,
  output logic                          a_wr_malformed,
  input  logic [A_RD_PORTS-1:0]         a_rd_ce,
  input  logic [A_RD_PORTS-1:0][A_LAW-1:0] a_rd_a,
  output logic [A_RD_PORTS-1:0][15:0]   a_rd_q,
  output logic [A_RD_PORTS-1:0]         a_rd_valid,
  output logic                          a_conflict,
  // ---- Debayer array b: D2 writes three, D3 reads two
  input  logic [2:0]                    b_wr_ce,
  input  logic [2:0]                    b_wr_we,
  input  logic [2:0][B_LAW-1:0]         b_wr_a,
  input  logic [2:0][15:0]              b_wr_d,
  input  logic [1:0]                    b_rd_ce,
  input  logic [1:0][B_LAW-1:0]         b_rd_a,
  output logic [1:0][15:0]              b_rd_q,
  output logic [1:0]                    b_rd_valid,
  output logic                          b_conflict
);

  // ------------------------------------------------------------------
  // producer/consumer buffer: 4 banks, two layouts on the same banks
  localparam layout_t PC_CYC = mk_layout(4, 1, 1, PC_DEPTH, 0, 1);
  localparam layout_t PC_BLK = mk_layout(2, 2, 1, PC_DEPTH, 0, 1);

  mem_subsystem #(
    .NBANK(4), .DEPTH(PC_DEPTH), .DW(PC_DW), .NWR(2), .NRD(6), .LAW(PC_LAW),
    .WR_LAY({PC_BLK, PC_CYC}),
    .RD_LAY({PC_BLK, PC_BLK, PC_CYC, PC_CYC, PC_CYC, PC_CYC})
  ) u_pc (
    .clk, .rst_n,
    .wr_ce(pc_wr_ce), .wr_we(pc_wr_we), .wr_a(pc_wr_a), .wr_d(pc_wr_d),
    .rd_ce(pc_rd_ce), .rd_a(pc_rd_a), .rd_q(pc_rd_q), .rd_valid(pc_rd_valid),
    .wr_conflict(pc_wr_conflict), .rd_conflict(pc_rd_conflict)
  );

  // ------------------------------------------------------------------
  // Debayer array a: merge 2 x 16 bit into 32-bit words, duplicate per read
  localparam layout_t A_WR = mk_layout(1, 1, 2, DB_DEPTH, 0, A_RD_PORTS);

  function automatic layout_t [A_RD_PORTS-1:0] a_rd_layouts();
    layout_t [A_RD_PORTS-1:0] l;
    for (int j = 0; j < int'(A_RD_PORTS); j++)
      l[j] = mk_layout(1, 1, 2, DB_DEPTH, j, 1);
    return l;
  endfunction

  logic              am_ce, am_we;
  logic [A_LAW-1:0]  am_a;
  logic [31:0]       am_d;
  logic [A_RD_PORTS-1:0][31:0] a_rd_word;
  logic              a_wconf, a_rconf;

  wr_merge #(.D(2), .W(16), .LAW(A_LAW)) u_a_merge (
    .clk, .in_ce(a_wr_ce), .in_we(a_wr_we), .in_a(a_wr_a), .in_d(a_wr_d),
    .out_ce(am_ce), .out_we(am_we), .out_a(am_a), .out_d(am_d),
    .malformed(a_wr_malformed)
  );

  mem_subsystem #(
    .NBANK(A_RD_PORTS), .DEPTH(DB_DEPTH), .DW(32), .NWR(1), .NRD(A_RD_PORTS),
    .LAW(A_LAW), .WR_LAY(A_WR), .RD_LAY(a_rd_layouts())
  ) u_a (
    .clk, .rst_n,
    .wr_ce(am_ce), .wr_we(am_we), .wr_a(am_a), .wr_d(am_d),
    .rd_ce(a_rd_ce), .rd_a(a_rd_a), .rd_q(a_rd_word), .rd_valid(a_rd_valid),
    .wr_conflict(a_wconf), .rd_conflict(a_rconf)
  );

  for (genvar j = 0; j < A_RD_PORTS; j++) begin : g_a_q
    assign a_rd_q[j] = a_rd_word[j][15:0];
  end
  assign a_conflict = a_wconf | a_rconf;

  // ------------------------------------------------------------------
  // Debayer array b: six 16-bit banks, 2 parallel x 3 serial
  localparam layout_t B_LAY = mk_layout(2, 3, 1, B_ROW / 2, 0, 1);
  logic b_wconf, b_rconf;

  mem_subsystem #(
    .NBANK(6), .DEPTH(DB_DEPTH), .DW(16), .NWR(3), .NRD(2), .LAW(B_LAW),
    .WR_LAY({3{B_LAY}}), .RD_LAY({2{B_LAY}})
  ) u_b (
    .clk, .rst_n,
    .wr_ce(b_wr_ce), .wr_we(b_wr_we), .wr_a(b_wr_a), .wr_d(b_wr_d),
    .rd_ce(b_rd_ce), .rd_a(b_rd_a), .rd_q(b_rd_q), .rd_valid(b_rd_valid),
    .wr_conflict(b_wconf), .rd_conflict(b_rconf)
  );
  assign b_conflict = b_wconf | b_rconf;

endmodule
