// Sine table: sine of a whole-degree angle from a quarter-wave table.
//
// The memory holds ENTRIES = 90 signed Q2.14 words, sin(0..89 degrees), from
// rtl/sine_q14.hex (word d = round(16384 * sin(d degrees))). Logic in front of
// it folds any angle 0..511 (taken modulo 360) into the first quadrant and
// remembers the sign; 90 and 270 degrees, which a 90-word table cannot hold,
// are supplied as +1.0 and -1.0 directly. Cosine is obtained by asking for
// theta + 90. A 90-word table of 16-bit values, the address folding and the
// two-cycle, fully pipelined latency follow the source design; Q2.14 is this
// design's choice.
// Timing: sin_out holds the sine of the theta_in presented two cycles earlier;
// a new angle may be presented every cycle.
module sine_table #(
  parameter int ENTRIES = 90,
  parameter int WIDTH   = 16
) (
  input  logic                    clk,
  input  logic [8:0]              theta_in,
  output logic signed [WIDTH-1:0] sin_out
);
  localparam logic signed [WIDTH-1:0] ONE = WIDTH'(1 << (WIDTH - 2));

  logic [WIDTH-1:0] rom [ENTRIES];
  initial $readmemh("rtl/sine_q14.hex", rom);

  logic [8:0] t;
  logic [6:0] idx;
  logic       neg, one;
  logic [WIDTH-1:0] rd_q;
  logic       neg_q, one_q;

  always_comb begin
    t   = (theta_in >= 9'd360) ? theta_in - 9'd360 : theta_in;
    idx = '0; neg = 1'b0; one = 1'b0;
    if (t < 9'd90)        begin idx = 7'(t); end
    else if (t == 9'd90)  begin one = 1'b1; end
    else if (t < 9'd180)  begin idx = 7'(9'd180 - t); end
    else if (t < 9'd270)  begin idx = 7'(t - 9'd180); neg = 1'b1; end
    else if (t == 9'd270) begin one = 1'b1; neg = 1'b1; end
    else                  begin idx = 7'(9'd360 - t); neg = 1'b1; end
  end

  always_ff @(posedge clk) begin
    rd_q  <= rom[idx];
    neg_q <= neg;
    one_q <= one;
    if (one_q) sin_out <= neg_q ? -ONE : ONE;
    else       sin_out <= neg_q ? -$signed(rd_q) : $signed(rd_q);
  end
endmodule
