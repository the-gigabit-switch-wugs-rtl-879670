// async_fifo: small dual-clock FIFO used to move received link words from a
// strobe clock domain into the switch fabric clock domain.
//
// Classic Gray-coded pointer design: each side keeps a binary and a Gray
// pointer one bit wider than the address, and sees the other side's Gray
// pointer through two flip-flops. Full and empty are therefore pessimistic
// by up to two cycles of the other clock, never wrong. The storage is a plain
// register array written on the write clock and read asynchronously.
//
// Interface: write side wclk/wrst_n/wr_en/wr_data/full, read side
// rclk/rrst_n/rd_en/rd_data/empty. rd_data shows the head entry while empty
// is low; rd_en pops it. Writing while full drops the word (overflow), which
// the caller counts. DEPTH must be a power of two.
//
// This block is this design's own: the specification only says that the IPP
// accepts a continuous stream and handles clock skew internally.
module async_fifo #(
  parameter int unsigned WIDTH = 17,
  parameter int unsigned DEPTH = 8
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wq1_rgray, wq2_rgray, rq1_wgray, rq2_wgray;
  logic [AW:0] wbin_nx, rbin_nx;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  assign full    = (wgray == {~wq2_rgray[AW:AW-1], wq2_rgray[AW-2:0]});
  assign wbin_nx = wbin + (AW+1)'(wr_en && !full);

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0;
      wgray <= '0;
      wq1_rgray <= '0;
      wq2_rgray <= '0;
    end else begin
      wbin  <= wbin_nx;
      wgray <= bin2gray(wbin_nx);
      wq1_rgray <= rgray;
      wq2_rgray <= wq1_rgray;
    end
  end

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;
  end

  // read side
  assign empty   = (rgray == rq2_wgray);
  assign rbin_nx = rbin + (AW+1)'(rd_en && !empty);
  assign rd_data = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0;
      rgray <= '0;
      rq1_wgray <= '0;
      rq2_wgray <= '0;
    end else begin
      rbin  <= rbin_nx;
      rgray <= bin2gray(rbin_nx);
      rq1_wgray <= wgray;
      rq2_wgray <= rq1_wgray;
    end
  end

endmodule
