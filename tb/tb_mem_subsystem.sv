// tb_mem_subsystem -- self-checking test of a controller with its banks.
//
// Configuration of array b of the Debayer accelerator: three rows of 12264
// 16-bit elements in six 8192 x 16 banks, row k cyclically over banks 2k and
// 2k+1 (layout 2 parallel x 3 serial, 6132 words per serial block). Three
// write interfaces each write one row per cycle; two read interfaces read two
// consecutive elements per cycle. The logical address of b[k][j] is
// k*12264 + j.
//
// Phase 1: the three rows are written in parallel, 12264 cycles.
// Phase 2: the whole array is read back two elements per cycle; data must
//          arrive one cycle after the request.
// Phase 3: writes of all three rows and reads of pairs run in the same cycles
//          in random order; the expected value of each read is taken from a
//          reference array before that cycle's writes are applied (a read and
//          a write of one word in the same cycle return the old word).
// No conflict may be flagged in any phase. A scaled row length can be chosen
// with B_ROW (it must be even).
module tb_mem_subsystem;
  import memctrl_pkg::*;
  localparam int B_ROW = 12264;
  localparam int TOTAL = 3 * B_ROW;
  localparam int LAW = $clog2(TOTAL);
  localparam layout_t LAY = mk_layout(2, 3, 1, B_ROW / 2, 0, 1);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n;
  logic [2:0] wr_ce, wr_we;
  logic [2:0][LAW-1:0] wr_a;
  logic [2:0][15:0] wr_d;
  logic [1:0] rd_ce, rd_valid;
  logic [1:0][LAW-1:0] rd_a;
  logic [1:0][15:0] rd_q;
  logic wr_conflict, rd_conflict;

  mem_subsystem #(.NBANK(6), .DEPTH(8192), .DW(16), .NWR(3), .NRD(2), .LAW(LAW),
                  .WR_LAY({3{LAY}}), .RD_LAY({2{LAY}})) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [15:0] ref_b [TOTAL];
  int conflicts = 0;
  always @(posedge clk) if (rst_n && (wr_conflict || rd_conflict)) conflicts++;

  initial begin
    logic [15:0] exp0, exp1;
    bit pend;
    rst_n = 0; wr_ce = '0; wr_we = '0; wr_a = '0; wr_d = '0; rd_ce = '0; rd_a = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // phase 1
    for (int j = 0; j < B_ROW; j++) begin
      @(negedge clk);
      for (int k = 0; k < 3; k++) begin
        ref_b[k * B_ROW + j] = 16'($urandom);
        wr_ce[k] = 1; wr_we[k] = 1; wr_a[k] = LAW'(k * B_ROW + j); wr_d[k] = ref_b[k * B_ROW + j];
      end
    end
    @(negedge clk) wr_ce = '0; wr_we = '0;
    // phase 2
    for (int a = 0; a <= TOTAL; a += 2) begin
      @(negedge clk);
      if (a > 0) begin
        check(rd_valid == 2'b11, "valid one cycle after request");
        check(rd_q[0] == ref_b[a - 2] && rd_q[1] == ref_b[a - 1], $sformatf("read pair at %0d", a - 2));
      end
      rd_ce = (a < TOTAL) ? 2'b11 : 2'b00;
      rd_a[0] = LAW'(a); rd_a[1] = LAW'(a + 1);
    end
    // phase 3
    pend = 0;
    for (int t = 0; t < 20000; t++) begin
      int p, j;
      @(negedge clk);
      if (pend) check(rd_q[0] == exp0 && rd_q[1] == exp1, $sformatf("mixed read t=%0d", t));
      p = 2 * $urandom_range(0, TOTAL / 2 - 1);
      rd_ce = 2'b11; rd_a[0] = LAW'(p); rd_a[1] = LAW'(p + 1);
      exp0 = ref_b[p]; exp1 = ref_b[p + 1]; pend = 1;
      j = $urandom_range(0, B_ROW - 1);
      wr_ce = 3'($urandom); wr_we = wr_ce;
      for (int k = 0; k < 3; k++) begin
        wr_a[k] = LAW'(k * B_ROW + j); wr_d[k] = 16'($urandom);
        if (wr_ce[k]) ref_b[k * B_ROW + j] = wr_d[k];
      end
    end
    @(negedge clk);
    check(rd_q[0] == exp0 && rd_q[1] == exp1, "last mixed read");
    rd_ce = '0; wr_ce = '0; wr_we = '0;
    check(conflicts == 0, "no bank conflict in any phase");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
