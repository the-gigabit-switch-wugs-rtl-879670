// opp_reset_sync: generates RESET_OPP, the active-low reset the OPP drives to
// the adapter card.
//
// The switch reset (already synchronous to the fabric clock CLK) is first
// retimed by one CLK flip-flop. That signal asynchronously clears the output
// flip-flop through an AND with the end of a four-stage shift register
// clocked by CLK_LINK, and is also its D input. So RESET_OPP falls as soon as
// the reset arrives, independent of CLK_LINK, and rises on the CLK_LINK edge
// after the reset has been high for four CLK_LINK periods.
// A reset pulse shorter than four CLK_LINK periods can make RESET_OPP fall
// twice: once at the pulse, once when the pulse's low value leaves the shift
// register.
//
// Interface: rst_fab_n (active low, synchronous to clk), clk (fabric clock),
// clk_link (CLK_LINK), reset_opp_n (RESET_OPP).
//
// The structure is the one printed for this circuit in the specification
// (one CLK stage, four CLK_LINK stages, AND gate into the clear input). The
// buffers and clock drive tree are left out.
module opp_reset_sync (
  input  logic clk,
  input  logic rst_fab_n,
  input  logic clk_link,
  output logic reset_opp_n
);

  logic       rst_q;      // RESET retimed to CLK
  logic [3:0] chain;      // four CLK_LINK stages
  logic       clr_n;

  always_ff @(posedge clk) rst_q <= rst_fab_n;

  // Shift register: no reset of its own. While the reset is low the output is
  // held cleared through rst_q, whatever the chain holds, and the chain fills
  // with zeros.
  always_ff @(posedge clk_link) chain <= {chain[2:0], rst_q};

  assign clr_n = rst_q & chain[3];

  always_ff @(posedge clk_link or negedge clr_n) begin
    if (!clr_n) reset_opp_n <= 1'b0;
    else        reset_opp_n <= rst_q;
  end

endmodule
