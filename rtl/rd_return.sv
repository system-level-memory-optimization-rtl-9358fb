// rd_return -- read-data return path of one read interface.
//
// A bank answers a read RD_LAT cycles after the request, by which time the
// interface may already be addressing another bank. This unit therefore
// decodes the interface's logical address at request time, keeps the number of
// the serving bank (its tag) and the element slice in a small shift register
// RD_LAT deep, and at the far end selects that bank's output and, for merged
// layouts (d > 1), the d-th part of the word. It is the demultiplexer of the
// controller seen from the interface side: one multiplexer per interface
// picking among all banks.
//
// Interface: rd_ce/rd_a are the interface request (CE and logical address),
// bank_q the read-port outputs of all banks, rd_q the data for the interface,
// valid RD_LAT cycles after the request, with 'rd_valid' marking that cycle.
// Elements narrower than a bank word are right-aligned and zero-extended.
// Outside the rd_valid cycle rd_q follows the bank of the last read and is
// not meaningful. Buffering the tag follows the document; the valid flag is
// this design's addition.
module rd_return
  import memctrl_pkg::*;
#(
  parameter int unsigned NBANK  = 4,
  parameter int unsigned DW     = 32,
  parameter int unsigned LAW    = 13,
  parameter int unsigned RD_LAT = 1,
  parameter layout_t     LAY    = mk_layout(4, 1, 1, 1280, 0, 1),
  localparam int unsigned BW    = (NBANK > 1) ? $clog2(NBANK) : 1,
  localparam int unsigned EW    = DW / LAY.d,
  localparam int unsigned SLW   = (LAY.d > 1) ? $clog2(LAY.d) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       rd_ce,
  input  logic [LAW-1:0]             rd_a,
  input  logic [NBANK-1:0][DW-1:0]   bank_q,
  output logic [DW-1:0]              rd_q,
  output logic                       rd_valid
);

  typedef struct packed {
    logic           v;
    logic [BW-1:0]  bank;
    logic [SLW-1:0] slice;
  } tagbuf_t;

  tagbuf_t req_tag;
  tagbuf_t pipe [RD_LAT];

  always_comb begin
    decode_t dec;
    dec           = decode(LAY, 32'(rd_a));
    req_tag.v     = rd_ce;
    req_tag.bank  = BW'(LAY.base + dec.tag);
    req_tag.slice = SLW'(dec.slice);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(RD_LAT); s++) pipe[s] <= '0;
    end else begin
      pipe[0].v <= req_tag.v;
      if (req_tag.v) begin
        pipe[0].bank  <= req_tag.bank;
        pipe[0].slice <= req_tag.slice;
      end
      for (int s = 1; s < int'(RD_LAT); s++) pipe[s] <= pipe[s-1];
    end
  end

  // The bank number and slice only advance on a real request, so the last one
  // is still selected while no read is in flight.
  tagbuf_t cur;
  logic [DW-1:0] word;
  always_comb begin
    cur      = pipe[RD_LAT-1];
    word     = bank_q[cur.bank];
    rd_q     = DW'(word[cur.slice * EW +: EW]);
    rd_valid = pipe[RD_LAT-1].v;
  end

endmodule
