// async_fifo: dual-clock FIFO of the transmission unit.
//
// Carries words from the 20 MHz domain (trigger and control units) to the
// 32 MHz framing domain and absorbs the rate difference. Classic structure:
// binary read/write pointers one bit wider than the address, their Gray
// codes passed to the other side through two flip-flops, full and empty
// computed from the synchronized Gray pointers. The read side is
// first-word-fall-through: rdata shows the head while rempty is low, and
// ren pops it. Writes to a full FIFO and reads from an empty one are
// ignored. The FIFO and its two clocks follow the transmission-unit diagram;
// the Gray-pointer scheme and the depth are this design's own.
module async_fifo #(
  parameter int unsigned W     = 41,
  parameter int unsigned DEPTH = 16
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         wen,
  input  logic [W-1:0] wdata,
  output logic         wfull,
  input  logic         rclk,
  input  logic         rrst_n,
  input  logic         ren,
  output logic [W-1:0] rdata,
  output logic         rempty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin, rbin, wgray, rgray;
  logic [AW:0]  rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  logic [AW:0] wbin_n;
  assign wbin_n = wbin + (AW+1)'(wen && !wfull);
  always_ff @(posedge wclk) begin
    if (wen && !wfull) mem[wbin[AW-1:0]] <= wdata;
  end
  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_n;
      wgray    <= bin2gray(wbin_n);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end
  // full: Gray pointers differ exactly in the two top bits
  assign wfull = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  // read side
  logic [AW:0] rbin_n;
  assign rbin_n = rbin + (AW+1)'(ren && !rempty);
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_n;
      rgray    <= bin2gray(rbin_n);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end
  assign rempty = (rgray == wgray_r2);
  assign rdata  = mem[rbin[AW-1:0]];

endmodule
