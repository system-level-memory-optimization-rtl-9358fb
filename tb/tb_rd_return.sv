// tb_rd_return -- self-checking test of the read-data return path.
//
// The bank outputs are random values that change every cycle. Read requests
// (random addresses, random idle cycles) go through a merged layout: two
// 16-bit elements per 32-bit word, two parallel banks starting at bank 2 of
// four. For each request the testbench computes the serving bank
// (2 + (A/2) mod 2) and half-word (A mod 2) itself and, RD_LAT cycles later,
// expects rd_valid and exactly that half of that bank's output. RD_LAT is set
// to 2 to show that the tag buffer tracks a longer bank latency.
module tb_rd_return;
  import memctrl_pkg::*;
  localparam int RD_LAT = 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, rd_ce, rd_valid;
  logic [12:0] rd_a;
  logic [3:0][31:0] bank_q;
  logic [31:0] rd_q;

  rd_return #(.NBANK(4), .DW(32), .LAW(13), .RD_LAT(RD_LAT),
              .LAY(mk_layout(2, 1, 2, 1280, 2, 1))) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // expected (valid, bank, half) per cycle, RD_LAT deep
  bit exp_v [RD_LAT]; int exp_b [RD_LAT]; int exp_h [RD_LAT];

  initial begin
    int reads = 0;
    rst_n = 0; rd_ce = 0; rd_a = '0; bank_q = '0;
    for (int s = 0; s < RD_LAT; s++) exp_v[s] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int a;
      @(negedge clk);
      // outputs of this cycle belong to the request RD_LAT cycles back
      bank_q = {$urandom, $urandom, $urandom, $urandom};
      #1;
      check(rd_valid == exp_v[RD_LAT-1], $sformatf("valid n=%0d", n));
      if (exp_v[RD_LAT-1]) begin
        logic [31:0] w;
        w = bank_q[exp_b[RD_LAT-1]];
        check(rd_q == 32'(exp_h[RD_LAT-1] ? w[31:16] : w[15:0]),
              $sformatf("data n=%0d bank %0d half %0d", n, exp_b[RD_LAT-1], exp_h[RD_LAT-1]));
        reads++;
      end
      // new request
      a = $urandom_range(0, 5119);
      rd_ce = 1'($urandom_range(0, 3) != 0);
      rd_a = 13'(a);
      @(posedge clk);
      for (int s = RD_LAT - 1; s > 0; s--) begin
        exp_v[s] = exp_v[s-1]; exp_b[s] = exp_b[s-1]; exp_h[s] = exp_h[s-1];
      end
      exp_v[0] = rd_ce; exp_b[0] = 2 + (a / 2) % 2; exp_h[0] = a % 2;
    end
    check(reads > 1000, "enough reads returned");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
