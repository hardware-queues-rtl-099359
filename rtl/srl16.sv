// srl16: one 16-deep, 1-bit shift register with a dynamically addressed
// read port -- the cell a 4-input LUT turns into in its shift-register mode.
//
// On a rising clock edge with ce high, d enters position 0 and every bit
// moves one position up; the bit at position 15 leaves through the cascade
// output.  q is a combinational read of position a; q15 is position 15, for
// chaining cells into deeper shift registers.  Like the hardware cell it
// has no reset.
module srl16 (
  input  logic       clk,
  input  logic       ce,
  input  logic       d,
  input  logic [3:0] a,
  output logic       q,
  output logic       q15
);

  logic [15:0] sr;

  always_ff @(posedge clk) begin
    if (ce) sr <= {sr[14:0], d};
  end

  assign q   = sr[a];
  assign q15 = sr[15];

endmodule
