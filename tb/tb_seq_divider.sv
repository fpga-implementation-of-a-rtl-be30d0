// Testbench of seq_divider: random and corner-case fractions num/den with
// num <= den; the quotient must equal floor(num * 2^FB / den) and arrive
// FB+2 cycles after start.
module tb_seq_divider;
  localparam int NW = 25, FB = 12;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [NW-1:0] num, den;
  logic [FB:0] q;
  int checks = 0, failures = 0;

  seq_divider #(.NW(NW), .FB(FB)) dut (.*);
  always #5 clk = ~clk;

  task automatic one(longint n, longint d);
    longint e;
    int lat;
    e = (n << FB) / d;
    num <= NW'(n); den <= NW'(d); start <= 1;
    @(posedge clk);
    start <= 0;
    lat = 0;
    do begin @(posedge clk); lat++; end while (!done && lat < 100);
    checks++;
    if (longint'(q) != e || lat != FB + 2) begin
      failures++;
      $display("FAIL %0d/%0d: q %0d exp %0d latency %0d", n, d, q, e, lat);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    one(0, 1); one(1, 1); one(5, 7); one((1 << 24) - 1, (1 << 24) - 1); one(1, (1 << 24) - 1);
    one(12345, 12346);
    for (int k = 0; k < 300; k++) begin
      longint d, n;
      d = longint'($urandom_range(1 << 24, 1));
      n = longint'($urandom_range(32'(d), 0));
      one(n, d);
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
