// scu: synchronization and clock unit.
//
// Takes the 160 MHz main clock, the chip reset Rstb and the serial command
// input RxDat, and produces the 32 MHz clock for the transmission unit, the
// 20 MHz clock for the rest of the logic, one reset per clock domain, and the
// aligned 16-bit command words with the SyncLockedOut status (in the 20 MHz
// domain). The structure (div5, div8, Sync/SIPO, Data Sync, Sync detection
// resetting the div-8 phase) follows the SCU block diagram; the reset
// synchronizers are this design's own.
module scu (
  input  logic        clk160,
  input  logic        rstb,
  input  logic        rx_dat,
  output logic        clk20,
  output logic        clk32,
  output logic        rst160_n,
  output logic        rst20_n,
  output logic        rst32_n,
  output logic [15:0] rx_sync_data,
  output logic        rx_sync_valid,
  output logic        sync_locked_out
);
  logic div8_rst;

  rst_sync u_rst160 (.clk(clk160), .arst_n(rstb), .rst_n(rst160_n));
  rst_sync u_rst20  (.clk(clk20),  .arst_n(rstb), .rst_n(rst20_n));
  rst_sync u_rst32  (.clk(clk32),  .arst_n(rstb), .rst_n(rst32_n));

  clk_divider u_clk_div (
    .clk160 (clk160),
    .rst_n  (rst160_n),
    .div8_rst(div8_rst),
    .clk32  (clk32),
    .clk20  (clk20)
  );

  scu_sync u_sync (
    .clk160         (clk160),
    .rst_n          (rst160_n),
    .rx_dat         (rx_dat),
    .div8_rst       (div8_rst),
    .clk20          (clk20),
    .rst20_n        (rst20_n),
    .rx_sync_data   (rx_sync_data),
    .rx_sync_valid  (rx_sync_valid),
    .sync_locked_out(sync_locked_out)
  );
endmodule
