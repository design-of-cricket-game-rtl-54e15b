// ripple_adder: WIDTH-bit binary adder built as a chain of full adders.
//
// Bit i adds a[i], b[i] and the carry out of bit i-1; cin feeds bit 0 and the
// carry out of the top bit is cout. The game and the score board use an 8-bit
// instance for the score and narrower ones for the other totals, as the
// document describes; the ripple-carry structure is this design's choice (the
// document names only "adders").
//
// Interface: a, b, cin in; sum = (a + b + cin) mod 2^WIDTH, cout out.
// Timing: purely combinational.
module ripple_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    assign sum[i] = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end

  assign cout = c[WIDTH];

endmodule
