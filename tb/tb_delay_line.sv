// Testbench of delay_line: random complex samples with random valid gaps and
// sof flags are written, and every cycle two taps are set to random delays.
// The combinational tap outputs and the fixed `last` output (data and sof) are
// compared with a history of the written samples kept here.  Inputs change on
// the falling edge and are checked just before the rising edge, so the
// testbench never races the write.
module tb_delay_line;
  import umts_pkg::*;
  localparam int DEPTH = 16, NT = 2;
  logic clk = 0, rst_n = 0;
  stream_t in, last;
  logic [$clog2(DEPTH):0] tap [NT];
  cplx_t tap_d [NT];
  cplx_t hist [$];
  bit hsof [$];
  int checks = 0, failures = 0;

  delay_line #(.DEPTH(DEPTH), .NT(NT)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    in = '0;
    tap[0] = 1; tap[1] = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      in.valid = ($urandom_range(3) != 0);
      in.sof   = ($urandom_range(7) == 0);
      in.d.re  = SW'($urandom);
      in.d.im  = SW'($urandom);
      for (int t = 0; t < NT; t++) tap[t] = ($clog2(DEPTH)+1)'($urandom_range(DEPTH, 1));
      #3;
      for (int t = 0; t < NT; t++)
        if (hist.size() >= int'(tap[t])) begin
          int k;
          cplx_t e;
          k = hist.size() - int'(tap[t]);
          e = hist[k];
          checks++;
          if (tap_d[t] != e) begin
            failures++;
            if (failures < 10) $display("FAIL tap %0d delay %0d at %0d", t, tap[t], n);
          end
        end
      if (hist.size() >= DEPTH) begin
        int k;
        cplx_t e;
        bit es;
        k = hist.size() - DEPTH;
        e = hist[k];
        es = hsof[k];
        checks++;
        if (last.valid != in.valid || (in.valid && (last.d != e || last.sof != es))) begin
          failures++;
          if (failures < 10) $display("FAIL last at %0d", n);
        end
      end
      @(posedge clk);
      if (in.valid) begin hist.push_back(in.d); hsof.push_back(in.sof); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
