// link_pkg: types and constants shared by the WUGS-20 link interface.
//
// The link interface moves 53-byte ATM cells between the switch port chips
// (OPP transmit, IPP receive) and an adapter card, 16 or 32 bits at a time.
// This package holds the cell cycle lengths (27 words in 16-bit mode, 14 in
// 32-bit mode), the cell as the port chips see it, the TYPE_LINK adapter codes,
// the layout of the LINKINFO byte and the HEC function.
//
// From the specification: the cycle lengths, the TYPE_LINK code table, the
// LINKINFO bit layout (bits 7:5 zero, LINK_INFO in 4:1, CS in 0), and the
// fact that an all-zero header has HEC 55h. The HEC polynomial
// (x^8 + x^2 + x + 1, result XORed with 55h) is the standard ATM one, which
// the specification takes for granted; it reproduces both facts the
// specification states about the HEC.
package link_pkg;

  // Cell cycle lengths in link clock periods.
  localparam int unsigned CYC16 = 27;
  localparam int unsigned CYC32 = 14;

  localparam int unsigned PAYLOAD_BYTES = 48;

  // A cell as handed to the OPP transmit engine or delivered by the IPP
  // receive engine. hdr[31:24] is HEADER 1, payload[383:376] is PAYLOAD 1.
  typedef struct packed {
    logic [31:0]                  hdr;
    logic [7:0]                   linkinfo;
    logic [PAYLOAD_BYTES*8-1:0]   payload;
  } cell_t;

  // LINKINFO byte when PAD_ZERO is low.
  typedef struct packed {
    logic [2:0] zero;      // bits 7:5, always zero
    logic       eadr16;    // bit 4, EADR[16] from the connection's VXT entry
    logic       eadr0;     // bit 3, EADR[0]
    logic       aal5;      // bit 2, 1 for AAL5
    logic       vpt;       // bit 1, 1 for virtual circuit, 0 for virtual path
    logic       cs;        // bit 0
  } linkinfo_t;

  // TYPE_LINK[3:0] adapter codes.
  typedef enum logic [3:0] {
    LT_RESERVED0    = 4'h0,
    LT_SONET_155    = 4'h1,
    LT_SONET_622    = 4'h2,
    LT_SONET_2488   = 4'h3,
    LT_GLINK_625    = 4'h4,
    LT_GLINK_1250   = 4'h5,
    LT_GLINK_DOUBLE = 4'h6,
    LT_DUAL_SONET   = 4'h9,
    LT_NO_LINK      = 4'hF
  } link_type_e;

  // HEC coset added to the CRC remainder.
  localparam logic [7:0] HEC_COSET = 8'h55;

  // HEC over the four header bytes, HEADER 1 first, most significant bit first.
  function automatic logic [7:0] hec_of(input logic [31:0] hdr);
    logic [7:0] c;
    logic       fb;
    c = 8'h00;
    for (int i = 31; i >= 0; i--) begin
      fb = hdr[i] ^ c[7];
      c  = {c[6:0], 1'b0} ^ (fb ? 8'h07 : 8'h00);
    end
    return c ^ HEC_COSET;
  endfunction

endpackage
