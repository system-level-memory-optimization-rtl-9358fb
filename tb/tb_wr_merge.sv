// tb_wr_merge -- self-checking test of the write-merging unit.
//
// Two 16-bit lanes write consecutive addresses 2k and 2k+1 in the same cycle,
// in either lane order. The merged request must carry address 2k, put the
// element of address 2k in bits 15:0 and that of 2k+1 in bits 31:16, and
// pass CE/WE. Malformed groups (one lane only, unaligned pair) are presented
// between clock edges to check the 'malformed' flag without tripping the
// assertion.
module tb_wr_merge;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [1:0]        in_ce, in_we;
  logic [1:0][13:0]  in_a;
  logic [1:0][15:0]  in_d;
  logic              out_ce, out_we, malformed;
  logic [13:0]       out_a;
  logic [31:0]       out_d;

  wr_merge #(.D(2), .W(16), .LAW(14)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    in_ce = '0; in_we = '0; in_a = '0; in_d = '0;
    for (int n = 0; n < 500; n++) begin
      int k; bit swap, we; logic [15:0] lo, hi;
      k = $urandom_range(0, 6143); swap = 1'($urandom); we = 1'($urandom);
      lo = 16'($urandom); hi = 16'($urandom);
      @(negedge clk);
      in_ce = 2'b11; in_we = {we, we};
      if (!swap) begin in_a[0] = 14'(2*k); in_a[1] = 14'(2*k+1); in_d[0] = lo; in_d[1] = hi; end
      else       begin in_a[1] = 14'(2*k); in_a[0] = 14'(2*k+1); in_d[1] = lo; in_d[0] = hi; end
      #1;
      check(out_ce && out_we == we, "ce/we");
      check(out_a == 14'(2*k), $sformatf("address %0d exp %0d", out_a, 2*k));
      check(out_d == {hi, lo}, $sformatf("data %h exp %h", out_d, {hi, lo}));
      check(!malformed, "well formed");
    end
    // malformed cases, removed before the clock edge
    @(negedge clk);
    in_ce = 2'b01; in_we = 2'b01; in_a[0] = 14'd10; in_a[1] = 14'd11;
    #1 check(malformed, "single lane flagged");
    in_ce = 2'b11; in_we = 2'b11; in_a[0] = 14'd11; in_a[1] = 14'd12;
    #1 check(malformed, "unaligned pair flagged");
    in_ce = 2'b00;
    #1 check(!malformed && !out_ce, "idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
