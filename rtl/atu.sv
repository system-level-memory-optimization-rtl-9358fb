// atu -- Address Translation Unit of one port of one physical bank.
//
// One ATU sits in front of each bank port. It watches the requests of all the
// process interfaces that may reach this port, each of which issues logical
// addresses under its own data layout (memctrl_pkg::layout_t). For every
// interface it decodes the logical address into a bank tag and a physical
// word address; the interface whose chip enable is active and whose tag is the
// one this bank carries in that layout is granted the port. The ATU then
// drives the bank's CE, WE and physical address and reports which interface
// it selected, so that the controller can steer write data (write port) or
// record the tag for the returning read data (read port).
//
// Interfaces whose layout never touches this bank are pruned at elaboration.
// The document requires that the accesses of distinct interfaces never meet
// on one bank port in one cycle (cyclic partitioning guarantees it); the ATU
// does not serialise them. If it happens anyway the lowest-numbered interface
// wins, 'conflict' is raised for that cycle and an assertion reports it.
//
// Timing: purely combinational, request to bank pins in the same cycle.
// Parameters: NIF interfaces with LAW-bit logical addresses, BANK = index of
// this bank, PAW = bank address width, LAY = layout of each interface,
// WRITE_PORT = 1 for the write port (WE taken from the interface), 0 for the
// read port (WE tied low).
module atu
  import memctrl_pkg::*;
#(
  parameter int unsigned NIF        = 1,
  parameter int unsigned LAW        = 13,
  parameter int unsigned PAW        = 11,
  parameter int unsigned BANK       = 0,
  parameter bit          WRITE_PORT = 1'b1,
  parameter layout_t [NIF-1:0] LAY  = '{default: mk_layout(4, 1, 1, 1280, 0, 1)},
  localparam int unsigned SW        = (NIF > 1) ? $clog2(NIF) : 1
) (
  input  logic                     clk,
  input  logic [NIF-1:0]           if_ce,
  input  logic [NIF-1:0]           if_we,
  input  logic [NIF-1:0][LAW-1:0]  if_a,
  output logic                     bank_ce,
  output logic                     bank_we,
  output logic [PAW-1:0]           bank_a,
  output logic [SW-1:0]            sel,
  output logic                     conflict
);

  logic [NIF-1:0]          hit;
  logic [NIF-1:0][PAW-1:0] phys;

  for (genvar i = 0; i < NIF; i++) begin : g_if
    localparam int MYTAG = bank_tag(LAY[i], BANK);
    if (MYTAG >= 0) begin : g_used
      decode_t dec;
      always_comb begin
        dec     = decode(LAY[i], 32'(if_a[i]));
        hit[i]  = if_ce[i] && (dec.tag == MYTAG);
        phys[i] = PAW'(dec.phys);
      end
    end else begin : g_unused
      assign hit[i]  = 1'b0;
      assign phys[i] = '0;
    end
  end

  always_comb begin
    bank_ce  = 1'b0;
    bank_we  = 1'b0;
    bank_a   = '0;
    sel      = '0;
    conflict = 1'b0;
    for (int i = NIF - 1; i >= 0; i--) begin
      if (hit[i]) begin
        if (bank_ce) conflict = 1'b1;
        bank_ce = 1'b1;
        bank_we = WRITE_PORT ? if_we[i] : 1'b0;
        bank_a  = phys[i];
        sel     = SW'(i);
      end
    end
  end

  a_no_conflict: assert property (@(posedge clk) !conflict)
    else $error("atu: bank %0d, several interfaces on one port in one cycle", BANK);

endmodule
