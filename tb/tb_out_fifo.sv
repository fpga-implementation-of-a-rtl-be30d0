// Testbench of out_fifo: random pushes and pops against a queue model,
// including runs into the full state (dropped writes are counted) and reads
// of the empty FIFO.  Data, empty/full flags, level and drop count are checked
// every cycle.
module tb_out_fifo;
  localparam int W = 20, DEPTH = 8;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0, empty, full;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [$clog2(DEPTH):0] level;
  logic [15:0] drops;
  int checks = 0, failures = 0, ndrop = 0, nfull = 0;
  logic [W-1:0] q [$];

  out_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 3000; c++) begin
      // bias: fill phases and drain phases
      bit w, r;
      w = ((c / 200) % 2 == 0) ? ($urandom_range(9) < 7) : ($urandom_range(9) < 3);
      r = ((c / 200) % 2 == 0) ? ($urandom_range(9) < 3) : ($urandom_range(9) < 7);
      wr_en <= w; rd_en <= r; wr_data <= W'($urandom);
      @(posedge clk);
      #1;
    end
    checks++;
    if (nfull == 0 || ndrop == 0) begin
      failures++;
      $display("FAIL: full state never reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model, updated at each clock edge from the values the DUT sampled
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (empty != (q.size() == 0) || full != (q.size() == DEPTH) || int'(level) != q.size() ||
        (q.size() > 0 && rd_data != q[0]) || int'(drops) != ndrop) begin
      failures++;
      if (failures < 10) $display("FAIL cycle: size %0d empty %0d full %0d level %0d drops %0d/%0d",
                                  q.size(), empty, full, level, drops, ndrop);
    end
    if (full) nfull++;
    begin
      bit was_full;
      was_full = (q.size() == DEPTH);      // a write into a full FIFO is dropped
      if (rd_en && q.size() > 0) void'(q.pop_front());
      if (wr_en) begin
        if (!was_full) q.push_back(wr_data);
        else ndrop++;
      end
    end
  end


  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
