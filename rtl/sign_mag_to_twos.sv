// sign_mag_to_twos -- turns a host "wire" value into a signed number.
//
// The host link can only carry unsigned whole numbers, so a signed weight or
// bias travels as an unsigned magnitude plus a separate sign-flag wire. This
// block forms the two's-complement value: the magnitude as is when the flag
// is 0, its negation when the flag is 1. That conversion is what the design
// description specifies. Saturating a magnitude that does not fit in
// OUT_W-1 bits (to +/-(2**(OUT_W-1)-1)) is this implementation's own choice;
// `sat` reports that it happened.
//
// Purely combinational: out and sat follow mag/neg in the same cycle.
module sign_mag_to_twos #(
  parameter int unsigned MAG_W = 16,  // width of the magnitude wire
  parameter int unsigned OUT_W = 16   // width of the signed result
) (
  input  logic [MAG_W-1:0]        mag,  // unsigned magnitude from the host
  input  logic                    neg,  // sign flag: 1 = negative
  output logic signed [OUT_W-1:0] out,  // two's-complement value
  output logic                    sat   // magnitude was clipped
);

  localparam logic [MAG_W-1:0] MAX_MAG = MAG_W'((64'd1 << (OUT_W - 1)) - 64'd1);

  logic [MAG_W-1:0] clipped;

  always_comb begin
    sat     = (mag > MAX_MAG);
    clipped = sat ? MAX_MAG : mag;
    out     = neg ? -OUT_W'(clipped) : OUT_W'(clipped);
  end

endmodule
