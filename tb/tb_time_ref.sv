// Testbench of time_ref: a sample stream with random gaps and a frame start
// after some free-running samples.  Sample phase, chip index, pilot chip,
// chip and pilot-symbol start flags and the scrambling chip are compared with
// counters kept here, across a radio-frame boundary and a second frame start
// placed in the middle of a frame.
module tb_time_ref;
  import umts_pkg::*;
  import tb_model_pkg::*;
  logic clk = 0, rst_n = 0;
  stream_t in;
  logic [1:0] phase;
  logic [15:0] chip_idx;
  logic [7:0] pchip;
  chip_t code;
  logic chip_start, sym_start;
  int checks = 0, failures = 0;

  time_ref dut (.clk, .rst_n, .in, .x_init(18'h1), .phase, .chip_idx, .pchip, .code,
                .chip_start, .sym_start);
  always #5 clk = ~clk;

  initial begin
    int n;
    in = '0;
    build_code();
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // free running, then sof at a random point
    for (int k = 0; k < 37; k++) begin in.valid <= 1; @(posedge clk); end
    n = 0;
    while (n < (FRAME_CHIPS + 500) * OS) begin
      bit v;
      int sn;
      v = ($urandom_range(9) != 0);
      // second frame start in the middle of the second frame
      sn = (n >= (FRAME_CHIPS + 200) * OS) ? n - (FRAME_CHIPS + 200) * OS : n;
      in.valid <= v;
      in.sof   <= v && (n == 0 || n == (FRAME_CHIPS + 200) * OS);
      in.d     <= cplx_t'($urandom);
      #1;
      if (v) begin
        int t;
        t = (sn / OS) % FRAME_CHIPS;
        checks++;
        if (phase != 2'(sn % OS) || chip_idx != 16'(t) || pchip != 8'(t % 256) ||
            chip_start != (sn % OS == 0) || sym_start != (sn % (OS * 256) == 0) ||
            code.i != sc_i[t] || code.q != sc_q[t]) begin
          failures++;
          if (failures < 10) $display("FAIL sample %0d: ph %0d chip %0d", sn, phase, chip_idx);
        end
        n++;
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
