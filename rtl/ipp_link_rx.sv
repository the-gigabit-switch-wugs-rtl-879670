// ipp_link_rx: the link-side receive engine of the Input Port Processor.
//
// The adapter card pushes cells into the IPP without any flow control: every
// rising edge of the free-running strobe STRB_L_LINK (and STRB_H_LINK for the
// upper half in 32-bit mode) delivers a word, and SOC marks the first word of
// a cell. The IPP therefore has to capture at the strobe, move the words into
// its own (faster) fabric clock domain, find cells, and check their HEC.
//
// Capture. Each half is registered on its own strobe.
//  * 16-bit mode: only the low half is used; 27 words per cell.
//  * 32-bit mode, D_SKEW_LINK low: one word per STRB_L_LINK edge. The high
//    half, captured on STRB_H_LINK, is re-registered on the next STRB_L_LINK
//    edge and the low half is delayed by one stage to match; SOC_L_LINK marks
//    cells. This assumes the two strobes come from one clock and STRB_H_LINK
//    does not lag by more than a period minus set-up.
//  * 32-bit mode, D_SKEW_LINK high (de-skew): the two 16-bit channels run on
//    independent strobes, each with its own SOC. Each half goes through its
//    own dual-clock FIFO; in the fabric domain the heads are paired, and a
//    head that shows SOC is held until the other half's head shows SOC too,
//    which re-aligns the halves at every cell. This needs the sender to
//    fly-wheel (a cell in every 14-word cycle or none), as the specification
//    requires for this mode.
//
// Cell assembly (fabric clock). A word with SOC starts a cell; a SOC inside a
// cell restarts it. After 27 (16-bit) or 14 (32-bit) words the cell is
// complete: the HEC in word 2 (16-bit, bits 15:8) or word 1 (32-bit, bits
// 31:24) is compared with the HEC computed over the header. The other bytes
// of that word are ignored. A good cell is delivered with a one-cycle pulse
// on cell_valid; a bad one is dropped and counted.
//
// Acceptance. Cells are accepted only when the link is up (UP_L_LINK low, and
// in de-skew mode UP_H_LINK low too; both are synchronised here) and after
// the start-up period of 2^IGNORE_LOG2 fabric clocks after reset, during which
// the adapter may send garbage. Cells outside acceptance are not counted.
// TYPE_LINK is synchronised and reported as link_type.
//
// From the specification: the capture rules per mode, SOC semantics, word
// positions of the HEC, the UP rules, the 2^24-cycle ignore period, and that
// bad-HEC cells are discarded and counted. This design's own choices: the
// FIFOs and pairing rule used for de-skew, the restart on an early SOC, the
// counter widths and the fabric-side valid pulse.
module ipp_link_rx
  import link_pkg::*;
#(
  parameter int unsigned IGNORE_LOG2 = 24,   // start-up ignore period, log2 of fabric clocks
  parameter int unsigned FIFO_DEPTH  = 8
) (
  input  logic        clk,            // switch fabric clock
  input  logic        rst_n,          // switch reset, active low
  // straps
  input  logic        width_link,
  input  logic        d_skew_link,
  input  logic [3:0]  type_link,
  // low channel
  input  logic        strb_l_link,
  input  logic [15:0] d_l_link,
  input  logic        soc_l_link,
  input  logic        up_l_link_n,
  // high channel
  input  logic        strb_h_link,
  input  logic [15:0] d_h_link,
  input  logic        soc_h_link,
  input  logic        up_h_link_n,
  // to the switch (fabric clock)
  output logic        cell_valid,
  output cell_t       cell_out,
  output logic        hec_err,
  output logic [15:0] hec_err_count,
  output logic [15:0] cell_count,
  output logic [15:0] overflow_count,
  output logic        link_up,
  output logic        ignoring,
  output link_type_e  link_type
);

  // ---------------------------------------------------------------- resets
  logic [1:0] rl_sync, rh_sync;
  logic       rst_l_n, rst_h_n;

  always_ff @(posedge strb_l_link or negedge rst_n)
    if (!rst_n) rl_sync <= '0; else rl_sync <= {rl_sync[0], 1'b1};
  always_ff @(posedge strb_h_link or negedge rst_n)
    if (!rst_n) rh_sync <= '0; else rh_sync <= {rh_sync[0], 1'b1};
  assign rst_l_n = rl_sync[1];
  assign rst_h_n = rh_sync[1];

  // ---------------------------------------------------------------- capture
  logic [15:0] l_d_q, l_d_q2, h_d_q, h_d_x;
  logic        l_soc_q, l_soc_q2, h_soc_q;

  always_ff @(posedge strb_l_link or negedge rst_l_n) begin
    if (!rst_l_n) begin
      l_d_q <= '0; l_soc_q <= 1'b0;
      l_d_q2 <= '0; l_soc_q2 <= 1'b0;
      h_d_x <= '0;
    end else begin
      l_d_q    <= d_l_link;
      l_soc_q  <= soc_l_link;
      l_d_q2   <= l_d_q;
      l_soc_q2 <= l_soc_q;
      h_d_x    <= h_d_q;       // high half re-timed to STRB_L_LINK
    end
  end

  always_ff @(posedge strb_h_link or negedge rst_h_n) begin
    if (!rst_h_n) begin
      h_d_q <= '0; h_soc_q <= 1'b0;
    end else begin
      h_d_q   <= d_h_link;
      h_soc_q <= soc_h_link;
    end
  end

  // ---------------------------------------------------------------- FIFOs
  // Low FIFO entry: {soc, high half (non-de-skew 32-bit), low half}.
  logic [32:0] lf_wdata, lf_rdata;
  logic [16:0] hf_wdata, hf_rdata;
  logic        lf_full, lf_empty, lf_rd, hf_full, hf_empty, hf_rd;
  logic        wide, deskew;

  assign wide   = width_link;
  assign deskew = width_link & d_skew_link;

  // 16-bit mode uses the unretimed low stage so it does not wait for a high
  // half; 32-bit mode uses the aligned pair.
  assign lf_wdata = wide ? {l_soc_q2, h_d_x, l_d_q2} : {l_soc_q, 16'h0000, l_d_q};
  assign hf_wdata = {h_soc_q, h_d_q};

  async_fifo #(.WIDTH(33), .DEPTH(FIFO_DEPTH)) u_lfifo (
    .wclk(strb_l_link), .wrst_n(rst_l_n), .wr_en(1'b1), .wr_data(lf_wdata), .full(lf_full),
    .rclk(clk), .rrst_n(rst_n), .rd_en(lf_rd), .rd_data(lf_rdata), .empty(lf_empty));

  async_fifo #(.WIDTH(17), .DEPTH(FIFO_DEPTH)) u_hfifo (
    .wclk(strb_h_link), .wrst_n(rst_h_n), .wr_en(deskew), .wr_data(hf_wdata), .full(hf_full),
    .rclk(clk), .rrst_n(rst_n), .rd_en(hf_rd), .rd_data(hf_rdata), .empty(hf_empty));

  // Overflow flags, brought to the fabric domain as toggles.
  logic ovf_l_tgl, ovf_h_tgl;
  always_ff @(posedge strb_l_link or negedge rst_l_n)
    if (!rst_l_n) ovf_l_tgl <= 1'b0; else if (lf_full) ovf_l_tgl <= ~ovf_l_tgl;
  always_ff @(posedge strb_h_link or negedge rst_h_n)
    if (!rst_h_n) ovf_h_tgl <= 1'b0; else if (hf_full && deskew) ovf_h_tgl <= ~ovf_h_tgl;

  // ---------------------------------------------------------------- pairing
  logic        w_vld, w_soc;
  logic [31:0] w_data;

  always_comb begin
    lf_rd  = 1'b0;
    hf_rd  = 1'b0;
    w_vld  = 1'b0;
    w_soc  = lf_rdata[32];
    w_data = lf_rdata[31:0];
    if (!deskew) begin
      lf_rd = !lf_empty;
      w_vld = !lf_empty;
    end else if (!lf_empty && !hf_empty) begin
      if (lf_rdata[32] == hf_rdata[16]) begin
        lf_rd  = 1'b1;
        hf_rd  = 1'b1;
        w_vld  = 1'b1;
        w_data = {hf_rdata[15:0], lf_rdata[15:0]};
      end else if (lf_rdata[32]) begin
        hf_rd = 1'b1;          // high half behind: drop its pre-cell word
      end else begin
        lf_rd = 1'b1;          // low half behind
      end
    end
  end

  // ---------------------------------------------------------------- status
  logic [1:0] up_l_s, up_h_s;
  logic [3:0] type_s1, type_s2;
  logic [IGNORE_LOG2:0] ign_cnt;
  logic [2:0] ovf_l_s, ovf_h_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up_l_s  <= 2'b11;
      up_h_s  <= 2'b11;
      type_s1 <= 4'hF;
      type_s2 <= 4'hF;
      ign_cnt <= '0;
      ovf_l_s <= '0;
      ovf_h_s <= '0;
    end else begin
      up_l_s  <= {up_l_s[0], up_l_link_n};
      up_h_s  <= {up_h_s[0], up_h_link_n};
      type_s1 <= type_link;
      type_s2 <= type_s1;
      if (!ign_cnt[IGNORE_LOG2]) ign_cnt <= ign_cnt + 1'b1;
      ovf_l_s <= {ovf_l_s[1:0], ovf_l_tgl};
      ovf_h_s <= {ovf_h_s[1:0], ovf_h_tgl};
    end
  end

  assign ignoring  = !ign_cnt[IGNORE_LOG2];
  assign link_up   = !up_l_s[1] && (!deskew || !up_h_s[1]);
  assign link_type = link_type_e'(type_s2);

  // ---------------------------------------------------------------- assembly
  logic [447:0] sh;
  logic [4:0]   idx;          // words collected so far in the current cell
  logic         in_cell;
  logic         done;
  logic [4:0]   nwords;
  logic [31:0]  r_hdr;
  logic [7:0]   r_hec;
  logic         accept;

  assign nwords = wide ? 5'(CYC32) : 5'(CYC16);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh      <= '0;
      idx     <= '0;
      in_cell <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (w_vld) begin
        if (w_soc) begin
          sh      <= wide ? {416'h0, w_data} : {432'h0, w_data[15:0]};
          idx     <= 5'd1;
          in_cell <= 1'b1;
          if (nwords == 5'd1) begin done <= 1'b1; in_cell <= 1'b0; end
        end else if (in_cell) begin
          sh  <= wide ? {sh[415:0], w_data} : {sh[431:0], w_data[15:0]};
          idx <= idx + 5'd1;
          if (idx + 5'd1 == nwords) begin
            done    <= 1'b1;
            in_cell <= 1'b0;
          end
        end
      end
    end
  end

  assign r_hdr  = wide ? sh[447:416] : sh[431:400];
  assign r_hec  = wide ? sh[415:408] : sh[399:392];
  assign accept = done && link_up && !ignoring;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cell_valid     <= 1'b0;
      hec_err        <= 1'b0;
      cell_out       <= '0;
      hec_err_count  <= '0;
      cell_count     <= '0;
      overflow_count <= '0;
    end else begin
      cell_valid <= 1'b0;
      hec_err    <= 1'b0;
      if (accept) begin
        if (hec_of(r_hdr) == r_hec) begin
          cell_valid    <= 1'b1;
          cell_out.hdr <= r_hdr;
          cell_out.linkinfo <= 8'h00;
          cell_out.payload <= sh[383:0];
          cell_count    <= cell_count + 1'b1;
        end else begin
          hec_err       <= 1'b1;
          hec_err_count <= hec_err_count + 1'b1;
        end
      end
      if ((ovf_l_s[2] ^ ovf_l_s[1]) || (ovf_h_s[2] ^ ovf_h_s[1]))
        overflow_count <= overflow_count + 1'b1;
    end
  end

endmodule
