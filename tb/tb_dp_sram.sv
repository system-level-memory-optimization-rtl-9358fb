// tb_dp_sram -- self-checking test of the two-port synchronous bank.
//
// Random reads and writes on both ports against a reference array kept in the
// testbench. Checks: read latency of one cycle, Q holding its value while the
// port is idle or writing, old data returned when one port reads a word the
// other port writes in the same cycle, and both ports working independently.
module tb_dp_sram;
  localparam int DEPTH = 1280, DW = 32, AW = 11;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          ce0, we0, ce1, we1;
  logic [AW-1:0] a0, a1;
  logic [DW-1:0] d0, d1, q0, q1;

  dp_sram #(.DEPTH(DEPTH), .DW(DW)) dut (.*);

  logic [DW-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    logic [DW-1:0] exp0, exp1, hold0, hold1;
    bit rd0, rd1;
    ce0 = 0; we0 = 0; ce1 = 0; we1 = 0; a0 = 0; a1 = 0; d0 = 0; d1 = 0;
    // fill through alternating ports
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      ref_mem[i] = $urandom;
      if (i % 2 == 0) begin ce0 = 1; we0 = 1; a0 = AW'(i); d0 = ref_mem[i]; ce1 = 0; end
      else            begin ce1 = 1; we1 = 1; a1 = AW'(i); d1 = ref_mem[i]; ce0 = 0; end
    end
    @(negedge clk); ce0 = 0; ce1 = 0; we0 = 0; we1 = 0;
    // latency: issue a read, Q must show the word after exactly one edge
    @(negedge clk); ce1 = 1; a1 = 11'd77;
    @(negedge clk); ce1 = 0;
    check(q1 == ref_mem[77], "port 1 read latency 1");
    hold1 = q1;
    @(negedge clk); @(negedge clk);
    check(q1 == hold1, "port 1 Q holds while idle");
    // random traffic on both ports
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      ce0 = 1'($urandom); we0 = 1'($urandom); a0 = AW'($urandom_range(0, DEPTH - 1)); d0 = $urandom;
      ce1 = 1'($urandom); we1 = 1'($urandom); a1 = AW'($urandom_range(0, DEPTH - 1)); d1 = $urandom;
      if (ce0 && we0 && ce1 && we1 && a0 == a1) we1 = 0;  // avoid double write
      rd0 = ce0 && !we0; rd1 = ce1 && !we1;
      exp0 = ref_mem[a0]; exp1 = ref_mem[a1];   // old data on collision
      hold0 = q0; hold1 = q1;
      @(posedge clk);
      if (ce0 && we0) ref_mem[a0] = d0;
      if (ce1 && we1) ref_mem[a1] = d1;
      #1;
      check(q0 == (rd0 ? exp0 : hold0), $sformatf("port 0 n=%0d", n));
      check(q1 == (rd1 ? exp1 : hold1), $sformatf("port 1 n=%0d", n));
    end
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
