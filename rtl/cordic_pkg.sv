// cordic_pkg: shared constants of the two CORDIC units.
//
// Angles inside the CORDICs are kept with 16 bits per full turn (4 more
// bits than the 12-bit external phase). ATAN[i] = round(atan(2**-i) *
// 65536 / (2*pi)). The CORDIC gain after NIT iterations is about 1.6468;
// it is not compensated, so magnitudes grow by that factor.
package cordic_pkg;
  localparam int unsigned NIT = 12;
  localparam int unsigned ZW  = 16;
  localparam logic [ZW-1:0] ATAN [NIT] = '{
    16'd8192, 16'd4836, 16'd2555, 16'd1297, 16'd651, 16'd326,
    16'd163,  16'd81,   16'd41,   16'd20,   16'd10,  16'd5
  };
endpackage
