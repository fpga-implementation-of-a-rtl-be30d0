// Testbench of scr_code_gen: the generator is stepped through more than a
// radio frame (wrapping at chip 38399) and restarted in between; every chip is
// compared with the Gold code built from its definition, including the
// imaginary part taken 131072 chips further along the sequence.
module tb_scr_code_gen;
  import umts_pkg::*;
  import tb_model_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, step = 0, wrap = 0;
  chip_t chip;
  int checks = 0, failures = 0;

  scr_code_gen dut (.clk, .rst_n, .load, .step, .wrap, .x_init(18'h1), .chip);
  always #5 clk = ~clk;

  task automatic expect_chip(int t);
    checks++;
    if (chip.i != sc_i[t] || chip.q != sc_q[t]) begin
      failures++;
      if (failures < 10) $display("FAIL chip %0d: %b%b exp %b%b", t, chip.q, chip.i, sc_q[t], sc_i[t]);
    end
  endtask

  initial begin
    build_code();
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;
    // run 5000 chips, restart with load, then a full frame with its wrap
    for (int t = 0; t < 5000; t++) begin
      expect_chip(t);
      step <= 1;
      @(posedge clk); #1;
    end
    load <= 1; step <= 1;
    #0;
    #1;
    expect_chip(0);
    @(posedge clk); #1;
    load <= 0;
    #1;
    for (int t = 1; t < FRAME_CHIPS + 300; t++) begin
      int tf;
      tf = t % FRAME_CHIPS;
      expect_chip(tf);
      step <= (tf != FRAME_CHIPS - 1);
      wrap <= (tf == FRAME_CHIPS - 1);
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
