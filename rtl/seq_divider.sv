// Sequential restoring divider for fractions: q = floor(num/den * 2^FB) for
// 0 <= num <= den, den > 0, so 0 <= q <= 2^FB.
//
// One subtractor and one comparator work for FB+1 cycles: each cycle the
// partial remainder is compared with the divisor, the divisor subtracted when
// it fits, the quotient bit shifted in and the remainder doubled.  `start`
// loads the operands (ignored while busy); `done` pulses with the result in
// `q`, FB+2 cycles after the start cycle.
// The document asks for a sequential division built from an adder and a
// comparator; the restoring scheme and widths are this design's choice.
module seq_divider #(
  parameter int NW = 25,
  parameter int FB = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] num,
  input  logic [NW-1:0] den,
  output logic          busy,
  output logic          done,
  output logic [FB:0]   q
);
  logic [NW:0]           r;
  logic [NW-1:0]         d;
  logic [$clog2(FB+2)-1:0] cnt;
  logic                  ge;

  assign ge = (r >= {1'b0, d});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0; d <= '0; cnt <= '0; busy <= 1'b0; done <= 1'b0; q <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          r <= {1'b0, num};
          d <= den;
          q <= '0;
          cnt <= '0;
          busy <= 1'b1;
        end
      end else begin
        q   <= {q[FB-1:0], ge};
        r   <= (ge ? (r - {1'b0, d}) : r) << 1;
        cnt <= cnt + 1'b1;
        if (cnt == ($clog2(FB+2))'(FB)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  a_operands: assert property (@(posedge clk) disable iff (!rst_n)
                               (start && !busy) |-> (num <= den && den != '0));
endmodule
