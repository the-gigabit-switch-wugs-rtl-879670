// dual_sonet_rx_glue: receive-side glue of the dual 155 Mb/s SONET adapter.
//
// The PM5348 framer holds received cells for two fibers. This block reads
// them out, one cell at a time, and passes them to the IPP with the fiber
// number written into VPI[7] (bit 11 of the first 16-bit word). Since the IPP
// checks the HEC, the HEC must follow: writing a 1 into VPI[7] flips HEC bits
// 7, 5 and 4, which sit at bits 15, 13 and 12 of the third word. The glue
// flips them for every cell from fiber 1 and never for fiber 0. A cell that
// arrived with VPI[7] = 1 thus reaches the IPP with a wrong HEC and is
// discarded there:
//
//   fiber  VPI[7] in  VPI[7] out  HEC         HEC correct at IPP
//     0       0          0        unchanged   yes
//     0       1          0        unchanged   no
//     1       0          1        flipped     yes
//     1       1          1        flipped     no
//
// Read sequencing. When idle the block looks at the framer's cell-available
// flags RCA1/RCA2, serves one of them (fiber 1 first if fiber 0 was served
// last, and the other way round), holds that read enable (RRDENB1/RRDENB2,
// active low) for the 27 words of a cell, then idles for one clock before
// the next decision so the flags can update. The framer is assumed to
// present the word read at one rising edge during the following clock, with
// RSOC on the first word (the UTOPIA level 1 read timing); the fiber of the
// word on RDAT is therefore the channel enabled one clock earlier.
//
// Interface: clk is the 25 MHz clock shared by the framer (RFCLK) and the IPP
// (STRB_L_LINK). d_l_link and soc_l_link go to the IPP; soc_l_link is RSOC
// passed through. Data passes combinationally; the state is the read FSM,
// the channel register and a word counter.
//
// From the specification: the fiber tagging, the HEC bit positions and the
// table above. This design's own: the read FSM (the specification shows an
// interface FSM but not its states), the alternating priority and the
// one-clock gap.
module dual_sonet_rx_glue
  import link_pkg::*;
(
  input  logic        clk,            // RFCLK / STRB_L_LINK
  input  logic        rst_n,
  // from / to the PM5348
  input  logic [15:0] rdat,
  input  logic        rsoc,
  input  logic        rca1,
  input  logic        rca2,
  output logic        rrdenb1_n,
  output logic        rrdenb2_n,
  // to the IPP
  output logic [15:0] d_l_link,
  output logic        soc_l_link
);

  localparam int unsigned VPI7_BIT = 11;
  localparam logic [15:0] HEC_FLIP = 16'hB000;   // HEC bits 7,5,4 in bits 15:8

  typedef enum logic [1:0] {S_IDLE, S_READ, S_GAP} state_e;

  state_e     state;
  logic       chan;        // channel being read
  logic       last_chan;   // channel served last
  logic [4:0] rcnt;        // read enables issued in this cell
  logic       enb_q;       // a read enable was active at the previous edge
  logic       chan_q;      // and for which channel
  logic       fiber_cell;  // fiber of the cell on RDAT
  logic [4:0] wcnt;        // word index on RDAT, 0 = SOC word
  logic       pick;

  // Arbitration: prefer the channel not served last.
  always_comb begin
    if (rca1 && rca2) pick = ~last_chan;
    else              pick = rca2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      chan      <= 1'b0;
      last_chan <= 1'b1;
      rcnt      <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (rca1 || rca2) begin
          state <= S_READ;
          chan  <= pick;
          rcnt  <= '0;
        end
        S_READ: begin
          rcnt <= rcnt + 5'd1;
          if (rcnt == 5'(CYC16 - 1)) begin
            state     <= S_GAP;
            last_chan <= chan;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign rrdenb1_n = !(state == S_READ && chan == 1'b0);
  assign rrdenb2_n = !(state == S_READ && chan == 1'b1);

  // Track which channel the word on RDAT came from.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enb_q      <= 1'b0;
      chan_q     <= 1'b0;
      fiber_cell <= 1'b0;
      wcnt       <= 5'd31;
    end else begin
      enb_q  <= (state == S_READ);
      chan_q <= chan;
      if (rsoc) begin
        fiber_cell <= chan_q;
        wcnt       <= 5'd1;
      end else if (wcnt != 5'd31) begin
        wcnt <= wcnt + 5'd1;
      end
    end
  end

  always_comb begin
    d_l_link = rdat;
    if (rsoc)
      d_l_link[VPI7_BIT] = chan_q;
    else if (wcnt == 5'd2 && fiber_cell)
      d_l_link = rdat ^ HEC_FLIP;
  end

  assign soc_l_link = rsoc;

  // RSOC is expected only on a word that was read.
  a_soc_read: assert property (@(posedge clk) disable iff (!rst_n)
    rsoc |-> enb_q);

endmodule
