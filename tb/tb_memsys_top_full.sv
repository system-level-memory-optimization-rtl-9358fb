// tb_memsys_top_full -- end-to-end test of memsys_top at its default parameters (one read port
// on array a).
//
// Runs the three memory subsystems concurrently, as their processes would:
//  * producer/consumer buffer: a ping-pong exchange of 2560-element chunks
//    (5 rows x 512) through the 5120-element buffer. P writes one element per
//    cycle into one half while C reads the other half four elements per cycle;
//    three iterations. Then a second data structure (another pair of
//    processes, never active together with P and C) is written and read back
//    through the same banks arranged as 2 parallel x 2 serial.
//  * Debayer array a: D1 writes all 12288 elements two per cycle (merged
//    into 32-bit words); D2 then reads with every read interface in parallel
//    at random addresses, partly while D1 rewrites the array.
//  * Debayer array b: D2 writes the three rows in parallel; D3 reads the
//    array two consecutive elements per cycle.
// Every read is compared with a reference array one cycle after the request
// (the bank read latency). Each mechanism of the design is counted and must
// occur: parallel reads on four banks, write and reads overlapping in one
// cycle, accesses to the second serial block of the reorganised banks,
// merged writes, reads of the upper merged half, three parallel
// writes of array b. A conflict flag or a malformed merged write is a failure.
// The cycle counts of the transfers are checked against the access rates:
// four reads per cycle for C, one element per row per cycle for array b, two
// merged elements per cycle for array a.
module tb_memsys_top_full;
  localparam int A_RD = 1;
  localparam int B_ROW = 12264;
  localparam int BTOT = 3 * B_ROW;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic [1:0] pc_wr_ce, pc_wr_we;
  logic [1:0][12:0] pc_wr_a;
  logic [1:0][31:0] pc_wr_d;
  logic [5:0] pc_rd_ce, pc_rd_valid;
  logic [5:0][12:0] pc_rd_a;
  logic [5:0][31:0] pc_rd_q;
  logic pc_wr_conflict, pc_rd_conflict;
  logic [1:0] a_wr_ce, a_wr_we;
  logic [1:0][13:0] a_wr_a;
  logic [1:0][15:0] a_wr_d;
  logic a_wr_malformed;
  logic [A_RD-1:0] a_rd_ce, a_rd_valid;
  logic [A_RD-1:0][13:0] a_rd_a;
  logic [A_RD-1:0][15:0] a_rd_q;
  logic a_conflict;
  logic [2:0] b_wr_ce, b_wr_we;
  logic [2:0][15:0] b_wr_a;
  logic [2:0][15:0] b_wr_d;
  logic [1:0] b_rd_ce, b_rd_valid;
  logic [1:0][15:0] b_rd_a;
  logic [1:0][15:0] b_rd_q;
  logic b_conflict;

  memsys_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // mechanism counters
  int n_par4 = 0, n_overlap = 0, n_serial1 = 0, n_merge = 0, n_upper = 0,
      n_dup = 0, n_dist3 = 0, n_bad = 0;
  always @(posedge clk) if (rst_n) begin
    if (pc_rd_ce[3:0] == 4'hf) n_par4++;
    if (pc_rd_ce[3:0] == 4'hf && pc_wr_ce[0]) n_overlap++;
    if (pc_wr_ce[1] && pc_wr_a[1] >= 13'd5120 / 2) n_serial1++;
    if (a_wr_ce == 2'b11 && a_wr_we == 2'b11) n_merge++;
    if (A_RD > 1 && a_rd_ce == '1) n_dup++;
    if (b_wr_ce == 3'b111) n_dist3++;
    if (pc_wr_conflict || pc_rd_conflict || a_conflict || b_conflict || a_wr_malformed) n_bad++;
  end

  logic [31:0] ref_pc [5120];
  logic [31:0] ref_2  [5120];
  logic [15:0] ref_a  [12288];
  logic [15:0] ref_b  [BTOT];

  // ---------------- producer / consumer
  task automatic run_pc();
    for (int it = 0; it < 4; it++) begin
      int wbase, rbase;
      wbase = (it % 2) * 2560;
      rbase = ((it + 1) % 2) * 2560;
      for (int t = 0; t <= 2560; t++) begin
        @(negedge clk);
        // reads issued at t-1 return now (C runs only after the first chunk)
        if (it > 0 && t >= 1 && t <= 640)
          for (int j = 0; j < 4; j++)
            check(pc_rd_valid[j] && pc_rd_q[j] == ref_pc[rbase + 4 * (t - 1) + j],
                  $sformatf("C it%0d elem %0d", it, rbase + 4 * (t - 1) + j));
        pc_wr_ce[0] = 0; pc_wr_we[0] = 0; pc_rd_ce[3:0] = '0;
        if (it < 3 && t < 2560) begin
          pc_wr_ce[0] = 1; pc_wr_we[0] = 1; pc_wr_a[0] = 13'(wbase + t);
          pc_wr_d[0] = $urandom;
        end
        if (it > 0 && t < 640)
          for (int j = 0; j < 4; j++) begin
            pc_rd_ce[j] = 1; pc_rd_a[j] = 13'(rbase + 4 * t + j);
          end
        // P's element becomes visible in the reference at the clock edge;
        // its half is never the one C reads in this iteration
        if (pc_wr_ce[0]) ref_pc[wbase + t] = pc_wr_d[0];
      end
    end
    // second data structure on the same banks, 2 parallel x 2 serial
    for (int a = 0; a < 5120; a++) begin
      @(negedge clk);
      ref_2[a] = $urandom;
      pc_wr_ce[1] = 1; pc_wr_we[1] = 1; pc_wr_a[1] = 13'(a); pc_wr_d[1] = ref_2[a];
    end
    @(negedge clk) pc_wr_ce[1] = 0; pc_wr_we[1] = 0;
    for (int a = 0; a <= 5120; a += 2) begin
      @(negedge clk);
      if (a > 0)
        for (int j = 0; j < 2; j++)
          check(pc_rd_valid[4 + j] && pc_rd_q[4 + j] == ref_2[a - 2 + j],
                $sformatf("2x2 read %0d", a - 2 + j));
      pc_rd_ce[5:4] = (a < 5120) ? 2'b11 : 2'b00;
      pc_rd_a[4] = 13'(a); pc_rd_a[5] = 13'(a + 1);
    end
    @(negedge clk) pc_rd_ce = '0;
  endtask

  // ---------------- Debayer array a
  task automatic run_a();
    logic [15:0] exp_q [A_RD];
    int exp_i [A_RD];
    bit pend;
    for (int k = 0; k < 6144; k++) begin
      @(negedge clk);
      ref_a[2 * k] = 16'($urandom); ref_a[2 * k + 1] = 16'($urandom);
      a_wr_ce = 2'b11; a_wr_we = 2'b11;
      // lanes in alternating order
      a_wr_a[k % 2] = 14'(2 * k);     a_wr_d[k % 2] = ref_a[2 * k];
      a_wr_a[1 - k % 2] = 14'(2 * k + 1); a_wr_d[1 - k % 2] = ref_a[2 * k + 1];
    end
    @(negedge clk) a_wr_ce = '0; a_wr_we = '0;
    pend = 0;
    for (int t = 0; t < 6000; t++) begin
      int k;
      @(negedge clk);
      if (pend)
        for (int j = 0; j < A_RD; j++) begin
          check(a_rd_valid[j] && a_rd_q[j] == exp_q[j], $sformatf("a read port %0d elem %0d", j, exp_i[j]));
          if (exp_i[j] % 2 == 1) n_upper++;
        end
      for (int j = 0; j < A_RD; j++) begin
        exp_i[j] = $urandom_range(0, 12287);
        a_rd_ce[j] = 1; a_rd_a[j] = 14'(exp_i[j]); exp_q[j] = ref_a[exp_i[j]];
      end
      pend = 1;
      // in the second half D1 rewrites the array at the same time
      a_wr_ce = '0; a_wr_we = '0;
      if (t >= 3000) begin
        k = $urandom_range(0, 6143);
        a_wr_ce = 2'b11; a_wr_we = 2'b11;
        a_wr_a[0] = 14'(2 * k); a_wr_a[1] = 14'(2 * k + 1);
        a_wr_d[0] = 16'($urandom); a_wr_d[1] = 16'($urandom);
        ref_a[2 * k] = a_wr_d[0]; ref_a[2 * k + 1] = a_wr_d[1];
      end
    end
    @(negedge clk);
    for (int j = 0; j < A_RD; j++) check(a_rd_q[j] == exp_q[j], "a last read");
    a_rd_ce = '0; a_wr_ce = '0; a_wr_we = '0;
  endtask

  // ---------------- Debayer array b
  task automatic run_b();
    for (int j = 0; j < B_ROW; j++) begin
      @(negedge clk);
      for (int k = 0; k < 3; k++) begin
        ref_b[k * B_ROW + j] = 16'($urandom);
        b_wr_ce[k] = 1; b_wr_we[k] = 1; b_wr_a[k] = 16'(k * B_ROW + j);
        b_wr_d[k] = ref_b[k * B_ROW + j];
      end
    end
    @(negedge clk) b_wr_ce = '0; b_wr_we = '0;
    for (int a = 0; a <= BTOT; a += 2) begin
      @(negedge clk);
      if (a > 0)
        check(b_rd_valid == 2'b11 && b_rd_q[0] == ref_b[a - 2] && b_rd_q[1] == ref_b[a - 1],
              $sformatf("b read pair %0d", a - 2));
      b_rd_ce = (a < BTOT) ? 2'b11 : 2'b00;
      b_rd_a[0] = 16'(a); b_rd_a[1] = 16'(a + 1);
    end
  endtask

  initial begin
    rst_n = 0;
    pc_wr_ce = '0; pc_wr_we = '0; pc_wr_a = '0; pc_wr_d = '0; pc_rd_ce = '0; pc_rd_a = '0;
    a_wr_ce = '0; a_wr_we = '0; a_wr_a = '0; a_wr_d = '0; a_rd_ce = '0; a_rd_a = '0;
    b_wr_ce = '0; b_wr_we = '0; b_wr_a = '0; b_wr_d = '0; b_rd_ce = '0; b_rd_a = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    fork
      run_pc();
      run_a();
      run_b();
    join
    @(negedge clk);
    $display("mechanisms: par4=%0d overlap=%0d serial1=%0d merge=%0d upper=%0d dup=%0d dist3=%0d",
             n_par4, n_overlap, n_serial1, n_merge, n_upper, n_dup, n_dist3);
    check(n_par4 > 0, "four parallel reads happened");
    check(n_overlap > 0, "write and reads overlapped");
    check(n_serial1 > 0, "second serial block used");
    check(n_merge > 0, "merged writes happened");
    check(n_upper > 0, "upper merged half read");
    if (A_RD > 1) check(n_dup > 0, "parallel reads of duplicated banks happened");
    check(n_dist3 > 0, "three parallel writes of b happened");
    check(n_bad == 0, "no conflict and no malformed merge");
    // rates: C takes a 2560-element chunk in 2560/4 = 640 cycles (three
    // chunks), array b is filled in 12264 cycles (one element per row per
    // cycle), array a in 6144 cycles plus 3000 rewrite cycles
    check(n_par4 == 3 * 640, $sformatf("C read cycles %0d, expected 1920", n_par4));
    check(n_dist3 == B_ROW, $sformatf("b write cycles %0d, expected %0d", n_dist3, B_ROW));
    check(n_merge == 6144 + 3000, $sformatf("a merged write cycles %0d, expected 9144", n_merge));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
