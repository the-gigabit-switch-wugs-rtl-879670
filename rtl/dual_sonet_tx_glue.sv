// dual_sonet_tx_glue: transmit-side glue of the dual 155 Mb/s SONET adapter.
//
// One OPP port feeds a PM5348 dual SONET framer that drives two fibers. The
// switch control software picks the fiber per cell with VPI[7], the most
// significant VPI bit of the UNI header, which is bit 11 of the first 16-bit
// word (HEADER 1 = GFC[3:0] VPI[7:4] in bits 15:8).
//
//  * In the first word of a cell (SOC_L_OPP high) bit 11 selects the fiber;
//    the choice is held in a register for the rest of the cell.
//  * The OPP's active-low write enable DAV_L_OPP is steered to TWRENB1 (fiber
//    0) or TWRENB2 (fiber 1); the other enable stays high.
//  * Bit 11 of the first word is forced to 0 on its way to the framer, so
//    both fibers carry VPIs 0..127. The framer recomputes the HEC.
//  * The framer reports room for a cell per fiber (TCA1, TCA2). The OPP has a
//    single TCA_FF_LINK input, which is driven high only when both are high.
//
// Interface: all signals are in the CLK_LINK (= framer TFCLK, 25 MHz) domain.
// Data, SOC and enables pass through combinationally so they keep the OPP's
// word timing; the only state is the fiber register. The framer's TSOC1 is
// driven from SOC_L_OPP unchanged and TSOC2 is grounded, as printed for this
// adapter; they are not ports of this block.
//
// From the specification: the selection rule, the VPI[7] clearing and the
// TCA AND. This design's own choice: a reset value of fiber 0.
module dual_sonet_tx_glue (
  input  logic        clk,            // CLK_LINK / TFCLK
  input  logic        rst_n,          // RESET_OPP
  // from the OPP
  input  logic [15:0] d_l_opp,
  input  logic        soc_l_opp,
  input  logic        dav_l_opp_n,
  // to the OPP
  output logic        tca_ff_link,
  // to / from the PM5348
  output logic [15:0] tdat,
  output logic        twrenb1_n,
  output logic        twrenb2_n,
  input  logic        tca1,
  input  logic        tca2
);

  localparam int unsigned VPI7_BIT = 11;

  logic fiber_q;   // fiber of the cell in progress
  logic fiber;     // fiber of the current word

  assign fiber = soc_l_opp ? d_l_opp[VPI7_BIT] : fiber_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          fiber_q <= 1'b0;
    else if (soc_l_opp)  fiber_q <= d_l_opp[VPI7_BIT];
  end

  always_comb begin
    tdat = d_l_opp;
    if (soc_l_opp) tdat[VPI7_BIT] = 1'b0;
  end

  assign twrenb1_n   = dav_l_opp_n |  fiber;
  assign twrenb2_n   = dav_l_opp_n | ~fiber;
  assign tca_ff_link = tca1 & tca2;

  a_one_enable: assert property (@(posedge clk) disable iff (!rst_n)
    !(twrenb1_n == 1'b0 && twrenb2_n == 1'b0));

endmodule
