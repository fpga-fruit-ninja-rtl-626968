// random_bits_generator: CRC-16 shift register used as a pseudo-random source.
//
// Each enabled clock shifts one external data bit into a CRC-16 computation
// with generator polynomial x^16 + x^15 + x^2 + 1, MSB first: the feedback bit
// is r[15] xor data; it enters r[0] and is also xored into the inputs of r[2]
// and r[15].  The 16-bit register is the "random number"; the game indexes
// different bit fields of it for each object.  The register starts at 16'hFFFF.
// One update per cycle with `en` high (the game pulses `en` once per frame).
module random_bits_generator (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic        data,
  output logic [15:0] random_number
);
  logic fb;
  assign fb = random_number[15] ^ data;

  always_ff @(posedge clk) begin
    if (rst)
      random_number <= 16'hFFFF;
    else if (en)
      random_number <= {random_number[14] ^ fb, random_number[13:2],
                        random_number[1] ^ fb, random_number[0], fb};
  end
endmodule
