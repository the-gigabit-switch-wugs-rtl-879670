// opp_link_tx: the link-side transmit engine of the Output Port Processor.
//
// The OPP hands ATM cells to the adapter card over a UTOPIA-style transmit
// interface with cell-level flow control. It "fly-wheels": time is cut into
// cell cycles of 27 CLK_LINK periods (16-bit mode, WIDTH_LINK = 0) or 14
// periods (32-bit mode, WIDTH_LINK = 1), and a cell either starts in period 1
// of a cycle and fills the whole cycle, or no cell is sent in that cycle.
//
// Flow control. TCA_FF_LINK is latched at the end of period 26 (16-bit) or 13
// (32-bit). TCA_LINK, used only in 16-bit mode, is not latched: its level at
// the end of period 27 is used directly. The link is ready if either says so.
// At the end of the last period the engine then sends the waiting cell if
// there is one, else an unassigned cell if UNASSIGN_EN is high, else nothing.
// "Nothing" keeps SOC low and DAV high for the whole cycle.
//
// Cell format. Words go out most significant byte first: in 16-bit mode
// H1 H2 | H3 H4 | HEC LINKINFO | P1 P2 | ... | P47 P48 (27 words); in 32-bit
// mode H1..H4 | HEC 0 0 LINKINFO | P1..P4 | ... | P45..P48 (14 words). The
// HEC is recomputed here. With PAD_ZERO high the LINKINFO byte is sent as
// zero; with PAD_ZERO low it carries the byte that came with the cell.
// Unassigned cells are all zero with HEC 55h, whatever PAD_ZERO says.
//
// Interface. Switch side (CLK_LINK domain): cell_valid/cell present a cell;
// cell_take pulses in the last period of a cycle when the cell is accepted,
// and the source must then drop or replace it at that clock edge. Link side:
// d_l/d_h data, dav_*_n (active-low write enables), soc_* (start of cell).
// All link outputs are registered on CLK_LINK. In 32-bit mode the _h copies
// of DAV and SOC equal the _l ones; in 16-bit mode d_h is zero, dav_h_n high
// and soc_h low (the specification leaves them undefined). rst_n is RESET_OPP:
// while it is low SOC stays low.
//
// From the specification: cycle lengths, latch points, the ready rule, the
// UNASSIGN_EN table, word layout, PAD_ZERO and unassigned-cell contents. This
// design's own choices: the switch-side valid/take handshake (the OPP's
// internal cell buffer is not part of the link interface), that the first
// cycle after reset starts at period 1 with TCA_FF_LINK taken as not ready,
// and the bytes of 32-bit word 1 whose labels are not legible (taken as
// HEC, 0, 0, LINKINFO, following the text's "HEC byte and three zero bytes").
module opp_link_tx
  import link_pkg::*;
(
  input  logic        clk_link,
  input  logic        rst_n,          // RESET_OPP, active low
  // straps
  input  logic        width_link,     // 1: 32-bit mode
  input  logic        unassign_en,
  input  logic        pad_zero,
  // flow control from the adapter
  input  logic        tca_ff_link,
  input  logic        tca_link,
  // cells from the switch
  input  logic        cell_valid,
  input  cell_t       cell_in,
  output logic        cell_take,
  // link outputs
  output logic [15:0] d_l_opp,
  output logic [15:0] d_h_opp,
  output logic        dav_l_opp_n,
  output logic        dav_h_opp_n,
  output logic        soc_l_opp,
  output logic        soc_h_opp
);

  localparam int unsigned IMG_BITS = 56 * 8;   // longest cell image (32-bit mode)

  logic [4:0]          per;        // period in the cell cycle, 1..27 or 1..14
  logic [4:0]          last_per;
  logic                tca_ff_q;
  logic                ready;
  logic                send_cell, send_unas;
  logic                busy;       // a cell occupies the current cycle
  logic [IMG_BITS-1:0] img;        // remaining words of the cell in flight
  logic [IMG_BITS-1:0] image;      // wire image of the cell to start
  logic [31:0]         d_q;
  logic                dav_n_q, soc_q;
  logic [7:0]          hec;
  logic [7:0]          li;

  assign last_per = width_link ? 5'(CYC32) : 5'(CYC16);

  atm_hec u_hec (.hdr(cell_in.hdr), .hec(hec));

  // Ready rule, evaluated in the last period of the cycle.
  assign ready     = tca_ff_q | (!width_link & tca_link);
  assign send_cell = (per == last_per) && ready && cell_valid;
  assign send_unas = (per == last_per) && ready && !cell_valid && unassign_en;
  assign cell_take = send_cell;

  assign li = pad_zero ? 8'h00 : cell_in.linkinfo;

  always_comb begin
    image = '0;
    if (send_cell) begin
      if (width_link) image = {cell_in.hdr, hec, 8'h00, 8'h00, li, cell_in.payload};
      else            image = {cell_in.hdr, hec, li, cell_in.payload, 16'h0000};
    end else begin
      // unassigned cell: zero header and payload, HEC of the zero header
      image = {32'h0, HEC_COSET, 8'h00, 8'h00, 8'h00, 384'h0};
      if (!width_link) image = {32'h0, HEC_COSET, 8'h00, 384'h0, 16'h0000};
    end
  end

  always_ff @(posedge clk_link or negedge rst_n) begin
    if (!rst_n) begin
      per      <= 5'd1;
      tca_ff_q <= 1'b0;
      busy     <= 1'b0;
      img      <= '0;
      d_q      <= '0;
      dav_n_q  <= 1'b1;
      soc_q    <= 1'b0;
    end else begin
      if (per == last_per - 5'd1) tca_ff_q <= tca_ff_link;

      if (per == last_per) begin
        per   <= 5'd1;
        soc_q <= send_cell | send_unas;
        busy  <= send_cell | send_unas;
        if (send_cell | send_unas) begin
          dav_n_q <= 1'b0;
          if (width_link) begin
            d_q <= image[IMG_BITS-1 -: 32];
            img <= image << 32;
          end else begin
            d_q <= {16'h0000, image[IMG_BITS-1 -: 16]};
            img <= image << 16;
          end
        end else begin
          dav_n_q <= 1'b1;
          d_q     <= '0;
        end
      end else begin
        per   <= per + 5'd1;
        soc_q <= 1'b0;
        if (busy) begin
          if (width_link) begin
            d_q <= img[IMG_BITS-1 -: 32];
            img <= img << 32;
          end else begin
            d_q <= {16'h0000, img[IMG_BITS-1 -: 16]};
            img <= img << 16;
          end
        end
      end
    end
  end

  assign d_l_opp     = d_q[15:0];
  assign d_h_opp     = width_link ? d_q[31:16] : 16'h0000;
  assign dav_l_opp_n = dav_n_q;
  assign dav_h_opp_n = width_link ? dav_n_q : 1'b1;
  assign soc_l_opp   = soc_q;
  assign soc_h_opp   = width_link ? soc_q : 1'b0;

  // A cell starts only in period 1 of a cycle.
  a_soc_period1: assert property (@(posedge clk_link) disable iff (!rst_n)
    soc_q |-> per == 5'd1);
  // Write enable is asserted together with start of cell.
  a_soc_dav: assert property (@(posedge clk_link) disable iff (!rst_n)
    soc_q |-> !dav_n_q);

endmodule
