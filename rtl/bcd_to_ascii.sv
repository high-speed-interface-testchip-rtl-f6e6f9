// bcd_to_ascii: converts one BCD digit to its ASCII code ('0'..'9');
// codes 10..15 are not digits and give '?'. Combinational.
module bcd_to_ascii (
  input  logic [3:0] bcd,
  output logic [7:0] ascii
);
  assign ascii = (bcd <= 4'd9) ? 8'h30 + 8'(bcd) : 8'h3F;
endmodule
