// wr_merge -- data merging of D narrow write interfaces into one wide write.
//
// A process that always writes D elements of W bits at D consecutive logical
// addresses in the same cycle can be served by one physical port of a bank
// word D*W bits wide. This unit takes the D narrow process write interfaces
// (CE, WE, A, D each) and produces a single wide write request for the memory
// controller: the address is that of the element with the lowest address
// (lane 0 of the word) and each element is placed in the word at the slice
// given by the log2(D) low bits of its own address, so element k of a word
// occupies bits [k*W +: W]. The controller then drops those low bits when it
// forms the bank address (layout field d = D).
//
// The merge itself follows the document; placing the elements by their own
// address bits, taking the address of lane 0 and the checks below are this
// design's choices. The document only considers the case in which all D
// elements are written together; an assertion flags a cycle in which the
// lanes disagree on CE/WE or do not cover one aligned group of D addresses.
// Timing: combinational.
module wr_merge #(
  parameter int unsigned D   = 2,
  parameter int unsigned W   = 16,
  parameter int unsigned LAW = 14
) (
  input  logic                   clk,
  input  logic [D-1:0]           in_ce,
  input  logic [D-1:0]           in_we,
  input  logic [D-1:0][LAW-1:0]  in_a,
  input  logic [D-1:0][W-1:0]    in_d,
  output logic                   out_ce,
  output logic                   out_we,
  output logic [LAW-1:0]         out_a,
  output logic [D*W-1:0]         out_d,
  output logic                   malformed
);

  logic [D-1:0] covered;

  always_comb begin
    int unsigned slot;
    out_ce  = |in_ce;
    out_we  = |(in_ce & in_we);
    out_a   = in_a[0] & ~LAW'(D - 1);
    out_d   = '0;
    covered = '0;
    for (int k = 0; k < int'(D); k++) begin
      slot                = 32'(in_a[k]) & (D - 1);
      out_d[slot * W +: W] = in_d[k];
      covered[slot]        = 1'b1;
    end
    malformed = 1'b0;
    if (out_ce) begin
      if (in_ce != '1 || (in_we != '0 && in_we != '1) || covered != '1)
        malformed = 1'b1;
      for (int k = 1; k < int'(D); k++)
        if ((in_a[k] & ~LAW'(D - 1)) != out_a) malformed = 1'b1;
    end
  end

  a_well_formed: assert property (@(posedge clk) !malformed)
    else $error("wr_merge: lanes do not form one aligned group of %0d writes", D);

endmodule
