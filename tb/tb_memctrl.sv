// tb_memctrl -- self-checking test of the flexible memory controller.
//
// Configuration of the four-bank example: banks of 1280 x 32, write
// interface 0 and read interfaces 0..3 use the cyclic 4 x 1 layout, write
// interface 1 and read interfaces 4..5 use the 2 x 2 layout of a second data
// structure on the same banks. The banks are modelled here as plain arrays
// with a one-cycle synchronous read, independent of the RTL bank.
//
// Phase 1 (cyclic): write 5120 elements, one per cycle, and check on the bank
//   pins that element A goes to bank A%4, word A/4, with its data; then read
//   four consecutive elements per cycle and compare with the written values,
//   one cycle after the request.
// Phase 2 (reorganised): the second structure overwrites the banks with
//   5120 other elements; expected bank 2*((A/2)>=1280) + A%2, word
//   (A/2) mod 1280; then it reads them back two per cycle.
// Phase 3: one write and four reads in the same cycle (pipelined producer and
//   consumer on different halves of the buffer).
module tb_memctrl;
  import memctrl_pkg::*;
  localparam layout_t CYC = mk_layout(4, 1, 1, 1280, 0, 1);
  localparam layout_t BLK = mk_layout(2, 2, 1, 1280, 0, 1);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n;
  logic [1:0] wr_ce, wr_we;
  logic [1:0][12:0] wr_a;
  logic [1:0][31:0] wr_d;
  logic [5:0] rd_ce, rd_valid;
  logic [5:0][12:0] rd_a;
  logic [5:0][31:0] rd_q;
  logic [3:0] b_wce, b_wwe, b_rce;
  logic [3:0][10:0] b_wa, b_ra;
  logic [3:0][31:0] b_wd, b_rq;
  logic wr_conflict, rd_conflict;

  memctrl #(.NBANK(4), .DEPTH(1280), .DW(32), .RD_LAT(1), .NWR(2), .NRD(6), .LAW(13),
            .WR_LAY({BLK, CYC}), .RD_LAY({BLK, BLK, CYC, CYC, CYC, CYC})) dut (.*);

  // bank model
  logic [31:0] bank [4][1280];
  always_ff @(posedge clk) begin
    for (int b = 0; b < 4; b++) begin
      if (b_wce[b] && b_wwe[b]) bank[b][b_wa[b]] <= b_wd[b];
      if (b_rce[b]) b_rq[b] <= bank[b][b_ra[b]];
    end
  end

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [31:0] ref1 [5120];
  logic [31:0] ref2 [5120];

  task automatic idle();
    wr_ce = '0; wr_we = '0; rd_ce = '0;
  endtask

  initial begin
    rst_n = 0; idle(); wr_a = '0; wr_d = '0; rd_a = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // ---- phase 1: cyclic writes, checked on the bank pins
    for (int a = 0; a < 5120; a++) begin
      @(negedge clk);
      idle();
      ref1[a] = $urandom;
      wr_ce[0] = 1; wr_we[0] = 1; wr_a[0] = 13'(a); wr_d[0] = ref1[a];
      #1;
      check(b_wce == 4'(1 << (a % 4)) && b_wwe[a % 4], $sformatf("P A=%0d bank enables %b", a, b_wce));
      check(b_wa[a % 4] == 11'(a / 4) && b_wd[a % 4] == ref1[a], $sformatf("P A=%0d word/data", a));
      check(b_rce == '0 && !wr_conflict, "no read, no conflict");
    end
    // ---- four parallel reads per cycle, data one cycle later
    for (int a = 0; a <= 5120; a += 4) begin
      @(negedge clk);
      if (a > 0)
        for (int j = 0; j < 4; j++)
          check(rd_valid[j] && rd_q[j] == ref1[a - 4 + j], $sformatf("C read A=%0d", a - 4 + j));
      idle();
      if (a < 5120) begin
        for (int j = 0; j < 4; j++) begin rd_ce[j] = 1; rd_a[j] = 13'(a + j); end
        #1 check(b_rce == 4'hf && !rd_conflict, "all four banks read in parallel");
      end
    end
    @(negedge clk) idle();
    // ---- phase 2: second structure, 2 parallel x 2 serial
    for (int a = 0; a < 5120; a++) begin
      int eb, ew;
      @(negedge clk);
      idle();
      ref2[a] = $urandom;
      wr_ce[1] = 1; wr_we[1] = 1; wr_a[1] = 13'(a); wr_d[1] = ref2[a];
      eb = ((a / 2) >= 1280 ? 2 : 0) + a % 2;
      ew = (a / 2) % 1280;
      #1;
      check(b_wce == 4'(1 << eb) && b_wa[eb] == 11'(ew) && b_wd[eb] == ref2[a],
            $sformatf("2x2 A=%0d exp bank %0d word %0d", a, eb, ew));
    end
    for (int a = 0; a <= 5120; a += 2) begin
      @(negedge clk);
      if (a > 0)
        for (int j = 0; j < 2; j++)
          check(rd_valid[4 + j] && rd_q[4 + j] == ref2[a - 2 + j], $sformatf("2x2 read A=%0d", a - 2 + j));
      idle();
      if (a < 5120)
        for (int j = 0; j < 2; j++) begin rd_ce[4 + j] = 1; rd_a[4 + j] = 13'(a + j); end
    end
    // ---- worked example: A=2563 lives in bank index 3, word 1
    @(negedge clk); idle(); rd_ce[4] = 1; rd_a[4] = 13'd2563;
    #1 check(b_rce == 4'b1000 && b_ra[3] == 11'd1, "A=2563 -> bank index 3 word 1");
    @(negedge clk); idle();
    check(rd_q[4] == ref2[2563], "A=2563 data");
    // ---- phase 3: simultaneous write (first half) and 4 reads (second half)
    for (int a = 0; a < 2560; a += 4) begin
      for (int k = 0; k < 4; k++) begin
        @(negedge clk);
        // the reads see the banks as left by the 2x2 structure: cyclic element
        // X is bank X%4, word X/4, which holds 2x2 element
        // 2*((bank/2)*1280 + word) + bank%2
        if (k == 1)
          for (int j = 0; j < 4; j++) begin
            int x, b, w;
            x = 2560 + a + j; b = x % 4; w = x / 4;
            check(rd_valid[j] && rd_q[j] == ref2[2 * ((b / 2) * 1280 + w) + b % 2],
                  $sformatf("overlapped read X=%0d", x));
          end
        idle();
        ref1[a + k] = $urandom;
        wr_ce[0] = 1; wr_we[0] = 1; wr_a[0] = 13'(a + k); wr_d[0] = ref1[a + k];
        if (k == 0)
          for (int j = 0; j < 4; j++) begin rd_ce[j] = 1; rd_a[j] = 13'(2560 + a + j); end
        #1 check(!wr_conflict && !rd_conflict, "overlap without conflict");
      end
    end
    @(negedge clk); idle();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
