// Sequential unsigned divider: quot = num / den, one quotient bit per cycle.
//
// A start pulse loads the operands; NW cycles later done pulses for one cycle
// with the quotient, which then holds. A zero divisor gives all ones. Used by
// the centre-of-mass blocks, where a few dozen cycles at the end of a frame
// cost nothing.
module seq_divider #(
  parameter int NW = 32,
  parameter int DW = 20
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic [NW-1:0] quot,
  output logic          done
);
  logic [NW-1:0]         n;
  logic [DW-1:0]         d, rem;
  logic [$clog2(NW+1)-1:0] cnt;
  logic                  busy;
  logic [DW:0]           r;

  always_comb r = {rem, n[NW-1]};

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; done <= 1'b0; cnt <= '0; n <= '0; d <= '0; rem <= '0; quot <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        n <= num; d <= den; rem <= '0; quot <= '0;
        cnt <= ($clog2(NW+1))'(NW);
        busy <= 1'b1;
      end else if (busy) begin
        n <= n << 1;
        if (r >= {1'b0, d}) begin
          rem  <= DW'(r - {1'b0, d});
          quot <= {quot[NW-2:0], 1'b1};
        end else begin
          rem  <= DW'(r);
          quot <= {quot[NW-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
