// async_fifo: dual-clock FIFO carrying pulse widths between clock domains.
//
// Writes happen in the wclk domain (200 MHz acquisition), reads in the rclk
// domain (50 MHz histogram). Storage is a DEPTH x WIDTH register array.
// Each side keeps a binary pointer one bit wider than the address and a
// Gray-coded copy; the Gray pointer of the other side crosses through a
// SYNC_STAGES flip-flop chain (sync_chain). full is computed in the write
// domain and empty in the read domain from their own pointer and the
// synchronized opposite pointer, so both flags are pessimistic and safe.
// Interface: wr_en is ignored while full, rd_en is ignored while empty.
// rdata is registered: the word popped by rd_en appears on the next rclk
// cycle and stays until the next pop.
// The published design uses a vendor dual-clock FIFO of 32 x 16 bit with
// five synchronization stages on both sides; the sizes are kept and the
// Gray-pointer insides are this design's own.
module async_fifo #(
  parameter int unsigned WIDTH       = 16,
  parameter int unsigned DEPTH       = 32,   // power of two
  parameter int unsigned SYNC_STAGES = 5
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,

  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wgray_rs, rgray_ws;   // opposite pointer, synchronized

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write domain ----------------
  logic        do_write;
  logic [AW:0] wbin_nx, wgray_nx;
  assign do_write = wr_en && !full;
  assign wbin_nx  = wbin + (AW+1)'(do_write);
  assign wgray_nx = bin2gray(wbin_nx);

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin  <= '0;
      wgray <= '0;
      full  <= 1'b0;
    end else begin
      wbin  <= wbin_nx;
      wgray <= wgray_nx;
      full  <= (wgray_nx == {~rgray_ws[AW:AW-1], rgray_ws[AW-2:0]});
    end
  end

  always_ff @(posedge wclk) begin
    if (do_write) mem[wbin[AW-1:0]] <= wdata;
  end

  sync_chain #(.WIDTH(AW+1), .STAGES(SYNC_STAGES)) u_sync_r2w (
    .clk(wclk), .rst_n(wrst_n), .d(rgray), .q(rgray_ws));

  // ---------------- read domain ----------------
  logic        do_read;
  logic [AW:0] rbin_nx, rgray_nx;
  assign do_read  = rd_en && !empty;
  assign rbin_nx  = rbin + (AW+1)'(do_read);
  assign rgray_nx = bin2gray(rbin_nx);

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin  <= '0;
      rgray <= '0;
      empty <= 1'b1;
      rdata <= '0;
    end else begin
      rbin  <= rbin_nx;
      rgray <= rgray_nx;
      empty <= (rgray_nx == wgray_rs);
      if (do_read) rdata <= mem[rbin[AW-1:0]];
    end
  end

  sync_chain #(.WIDTH(AW+1), .STAGES(SYNC_STAGES)) u_sync_w2r (
    .clk(rclk), .rst_n(rrst_n), .d(wgray), .q(wgray_rs));

  initial assert (DEPTH >= 4 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("async_fifo DEPTH must be a power of two >= 4");

endmodule
