// tb_atu -- self-checking test of the address translation unit.
//
// Builds the four bank ports of a 4 x 1280 bank set (one atu per bank) shared
// by three interfaces with different layouts:
//   if 0: 4 parallel x 1 serial (cyclic)         bank = A%4, word = A/4
//   if 1: 2 parallel x 2 serial, 1280-word blocks bank = 2*(A/2>=1280) + A%2
//   if 2: 2 elements merged per word, 2 parallel   bank = (A/2)%2, word = A/4
// Expected banks and words are computed here with plain arithmetic, and the
// two worked examples (A=5 -> third bank of four, word 1; A=2563 in the 2x2
// layout -> fourth bank, word 1) are checked explicitly. The conflict flag is
// checked between clock edges only, so the bank assertion is never violated.
module tb_atu;
  import memctrl_pkg::*;

  localparam int NIF = 3;
  localparam layout_t [NIF-1:0] LAY = {mk_layout(2, 1, 2, 1280, 0, 1),
                                       mk_layout(2, 2, 1, 1280, 0, 1),
                                       mk_layout(4, 1, 1, 1280, 0, 1)};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [NIF-1:0]          if_ce, if_we;
  logic [NIF-1:0][12:0]    if_a;
  logic [3:0]              bce, bwe, conf;
  logic [3:0][10:0]        ba;
  logic [3:0][1:0]         sel;

  for (genvar b = 0; b < 4; b++) begin : g_b
    atu #(.NIF(NIF), .LAW(13), .PAW(11), .BANK(b), .WRITE_PORT(1'b1), .LAY(LAY))
      dut (.clk, .if_ce, .if_we, .if_a, .bank_ce(bce[b]), .bank_we(bwe[b]),
           .bank_a(ba[b]), .sel(sel[b]), .conflict(conf[b]));
  end

  int checks = 0, failures = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic void expect_map(int i, int a, output int bank, output int word);
    case (i)
      0: begin bank = a % 4; word = a / 4; end
      1: begin
           bank = ((a / 2) >= 1280 ? 2 : 0) + a % 2;
           word = (a / 2) >= 1280 ? a / 2 - 1280 : a / 2;
         end
      default: begin bank = (a / 2) % 2; word = a / 4; end
    endcase
  endfunction

  // Drive one interface between clock edges and compare all four bank ports.
  task automatic probe(int i, int a, bit we);
    int eb, ew;
    @(negedge clk);
    if_ce = '0; if_we = '0; if_a = '0;
    if_ce[i] = 1'b1; if_we[i] = we; if_a[i] = 13'(a);
    #1;
    expect_map(i, a, eb, ew);
    for (int b = 0; b < 4; b++) begin
      check(bce[b] == (b == eb), $sformatf("if%0d A=%0d bank%0d ce=%0b", i, a, b, bce[b]));
      if (b == eb) begin
        check(ba[b] == 11'(ew), $sformatf("if%0d A=%0d word %0d exp %0d", i, a, ba[b], ew));
        check(sel[b] == 2'(i) && bwe[b] == we, $sformatf("if%0d A=%0d sel/we", i, a));
      end
    end
    check(conf == '0, "no conflict expected");
  endtask

  initial begin
    if_ce = '0; if_we = '0; if_a = '0;
    // worked examples
    probe(0, 5, 1'b0);
    check(bce == 4'b0010 && ba[1] == 11'd1, "A=5 cyclic -> bank index 1, word 1");
    probe(1, 2563, 1'b1);
    check(bce == 4'b1000 && ba[3] == 11'd1, "A=2563 in 2x2 -> bank index 3, word 1");
    probe(2, 5, 1'b0);
    check(bce == 4'b0001 && ba[0] == 11'd1, "merged A=5 -> bank index 0, word 1");
    // logical addresses 0..3 of the cyclic layout go to four different banks
    for (int a = 0; a < 4; a++) probe(0, a, 1'b1);
    // block boundary of the 2x2 layout
    probe(1, 2559, 1'b0);
    probe(1, 2560, 1'b0);
    // random sweep
    for (int n = 0; n < 300; n++) begin
      int i;
      i = n % 3;
      probe(i, (i == 0 || i == 1) ? int'($urandom_range(0, 5119)) : int'($urandom_range(0, 5119)),
            1'($urandom));
    end
    // two interfaces on one bank: conflict seen, lowest interface granted;
    // removed again before the next clock edge
    @(negedge clk);
    if_ce = 3'b011; if_a[0] = 13'd4; if_a[1] = 13'd2; if_we = '0;  // both bank 0
    #1;
    check(conf[0] == 1'b1 && sel[0] == 2'd0 && ba[0] == 11'd1, "conflict flagged, if0 wins");
    if_ce = '0;
    #1;
    check(conf == '0, "conflict clears");
    // no request, no enable
    check(bce == '0, "idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
