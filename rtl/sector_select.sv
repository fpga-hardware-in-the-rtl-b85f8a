// sector_select: number (1..6) of the 60-degree sector of the alpha-beta
// plane that holds the stator flux vector.
//
// A comparator tests the flux angle (radians, in (-pi, pi]) against zero; a
// multiplexer adds 6.28125 (2*pi as the design's constant prints it) to
// negative angles so that the angle lies in [0, 2*pi); a constant gain of
// 0.9549 (= 6 / (2*pi)) converts it to sixths of a turn and an adder adds 1.
// The integer part of the result is the sector. Sector 1 therefore spans
// [0, 60) degrees, sector 2 [60, 120) degrees, and so on.
//
// The comparator, multiplexer, gain and constants follow the design's
// diagram. Taking the integer part by truncation and clamping the result
// to 1..6 are this design's choices. Interface: angle in the dtc_pkg
// datapath format, sector as a 3-bit unsigned number. Timing: combinational.
module sector_select
  import dtc_pkg::*;
(
  input  fix_t       angle,   // flux angle, rad
  output logic [2:0] sector   // 1..6
);

  localparam fix_t  TWO_PI = to_fix(TWO_PI_R);
  localparam gain_t SEC_K  = to_gain(SEC_K_R);
  localparam fix_t  ONE    = to_fix(1.0);

  fix_t wrapped, scaled, whole;

  always_comb begin
    wrapped = (angle >= 0) ? angle : angle + TWO_PI;
    scaled  = kmul(wrapped, SEC_K) + ONE;
    whole   = scaled >>> DF;
    if (whole < 1)      sector = 3'd1;
    else if (whole > 6) sector = 3'd6;
    else                sector = 3'(whole);
  end

endmodule
