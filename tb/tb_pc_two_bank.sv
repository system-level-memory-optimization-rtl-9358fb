// tb_pc_two_bank -- the producer/consumer buffer with two banks.
//
// Alternative organisation of the 5120-element ping-pong buffer for a
// consumer that reads two elements per cycle: two 2560 x 32 banks with cyclic
// partitioning (2 parallel x 1 serial). Checks on the bank pins that the
// producer's logical addresses 0, 1, 2, 3 become (bank 0, word 0),
// (bank 1, word 0), (bank 0, word 1), (bank 1, word 1), then runs a ping-pong
// exchange: the producer writes one half while the consumer reads the other
// half two elements per cycle, the data being compared one cycle after each
// request.
module tb_pc_two_bank;
  import memctrl_pkg::*;
  localparam layout_t L = mk_layout(2, 1, 1, 2560, 0, 1);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n;
  logic [0:0] wr_ce, wr_we;
  logic [0:0][12:0] wr_a;
  logic [0:0][31:0] wr_d;
  logic [1:0] rd_ce, rd_valid;
  logic [1:0][12:0] rd_a;
  logic [1:0][31:0] rd_q;
  logic wr_conflict, rd_conflict;

  mem_subsystem #(.NBANK(2), .DEPTH(2560), .DW(32), .NWR(1), .NRD(2), .LAW(13),
                  .WR_LAY(L), .RD_LAY({L, L})) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [31:0] ref_m [5120];

  initial begin
    rst_n = 0; wr_ce = '0; wr_we = '0; wr_a = '0; wr_d = '0; rd_ce = '0; rd_a = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int it = 0; it < 4; it++) begin
      int wb, rb;
      wb = (it % 2) * 2560; rb = ((it + 1) % 2) * 2560;
      for (int t = 0; t <= 2560; t++) begin
        @(negedge clk);
        if (it > 0 && t >= 1 && t <= 1280)
          for (int j = 0; j < 2; j++)
            check(rd_valid[j] && rd_q[j] == ref_m[rb + 2 * (t - 1) + j],
                  $sformatf("it%0d read %0d", it, rb + 2 * (t - 1) + j));
        wr_ce = '0; wr_we = '0; rd_ce = '0;
        if (it < 3 && t < 2560) begin
          wr_ce = 1'b1; wr_we = 1'b1; wr_a[0] = 13'(wb + t); wr_d[0] = $urandom;
          ref_m[wb + t] = wr_d[0];
          #1;
          check(dut.b_wce == 2'(1 << ((wb + t) % 2)) && dut.b_wa[(wb + t) % 2] == 12'((wb + t) / 2),
                $sformatf("write %0d -> bank %0d word %0d", wb + t, (wb + t) % 2, (wb + t) / 2));
        end
        if (it > 0 && t < 1280) begin
          rd_ce = 2'b11; rd_a[0] = 13'(rb + 2 * t); rd_a[1] = 13'(rb + 2 * t + 1);
        end
      end
    end
    check(!wr_conflict && !rd_conflict, "no conflict");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
