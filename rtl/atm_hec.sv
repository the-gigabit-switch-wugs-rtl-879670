// atm_hec: combinational ATM header error control generator.
//
// Computes the HEC byte of a cell header: the CRC-8 remainder of the 32
// header bits (generator x^8 + x^2 + x + 1, HEADER 1 bit 7 first), XORed with
// 55h. The OPP transmit engine uses it to insert a fresh HEC into every cell
// and the IPP receive engine to check the received one.
//
// Interface: hdr[31:24] = HEADER 1 ... hdr[7:0] = HEADER 4; hec is valid in
// the same cycle (pure logic, no clock).
//
// The specification requires a newly computed HEC, gives 55h as the HEC of
// the all-zero header, and states that changing VPI[7] flips HEC bits 7, 5
// and 4; the polynomial itself is the standard ATM one, not spelled out in
// the specification.
module atm_hec
  import link_pkg::*;
(
  input  logic [31:0] hdr,
  output logic [7:0]  hec
);

  always_comb hec = hec_of(hdr);

endmodule
