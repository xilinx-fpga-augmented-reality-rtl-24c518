// Pipelined unsigned divider: quot = num / den, truncated.
//
// A restoring divider split into STAGES register stages; each stage retires
// ceil(NW/STAGES) quotient bits, so a new division can start on every enabled
// cycle and each result appears STAGES enabled cycles after its operands.
// en freezes every stage at once, which lets the surrounding pipeline stall.
// A zero divisor gives an all-ones quotient. Used by the projection stage,
// whose six-cycle, fully pipelined division follows the source design.
module pipe_div #(
  parameter int NW     = 14,
  parameter int DW     = 9,
  parameter int STAGES = 6
) (
  input  logic          clk,
  input  logic          en,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic [NW-1:0] quot
);
  localparam int BPS = (NW + STAGES - 1) / STAGES;   // quotient bits per stage
  localparam int TW  = BPS * STAGES;

  logic [TW-1:0] n_q [STAGES];
  logic [TW-1:0] q_q [STAGES];
  logic [DW-1:0] r_q [STAGES];
  logic [DW-1:0] d_q [STAGES];

  logic [TW-1:0] n_d [STAGES];
  logic [TW-1:0] q_d [STAGES];
  logic [DW-1:0] r_d [STAGES];
  logic [DW-1:0] d_d [STAGES];

  always_comb begin
    for (int s = 0; s < STAGES; s++) begin
      logic [TW-1:0] n, q;
      logic [DW:0]   r;
      logic [DW-1:0] d;
      n = (s == 0) ? TW'(num) : n_q[(s == 0) ? 0 : s - 1];
      q = (s == 0) ? '0       : q_q[(s == 0) ? 0 : s - 1];
      r = (s == 0) ? '0       : {1'b0, r_q[(s == 0) ? 0 : s - 1]};
      d = (s == 0) ? den      : d_q[(s == 0) ? 0 : s - 1];
      for (int b = 0; b < BPS; b++) begin
        r = {r[DW-1:0], n[TW-1]};
        n = n << 1;
        if (r >= {1'b0, d}) begin
          r = r - {1'b0, d};
          q = {q[TW-2:0], 1'b1};
        end else begin
          q = {q[TW-2:0], 1'b0};
        end
      end
      n_d[s] = n;
      q_d[s] = q;
      r_d[s] = r[DW-1:0];
      d_d[s] = d;
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      n_q <= n_d;
      q_q <= q_d;
      r_q <= r_d;
      d_q <= d_d;
    end
  end

  assign quot = NW'(q_q[STAGES-1]);
endmodule
