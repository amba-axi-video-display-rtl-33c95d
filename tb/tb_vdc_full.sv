// tb_vdc_full: full-size test of the display controller. The design is
// used exactly as built (no parameter changed) and is programmed for the
// 1080p raster the document sizes it for: 1920x1080 active, 88/44/148
// horizontal and 4/5/36 vertical porch and sync (CEA-861 1080p60 timing,
// this testbench's choice of standard), a full-screen Y'CbCr layer under a
// 960x540 RGBa layer, buffers slightly larger than the screen split into
// scattered 4 KiB pages, and three frames checked pixel by pixel. The bus
// model's latency is 50..250 cycles with the bus switched off for 1000 of
// every 6000 cycles. See vdc_tb_env for what is checked and counted.
module tb_vdc_full;
  vdc_tb_env #(
    .HA(1920), .VA(1080), .HF(88), .HS(44), .HB(148), .VF(4), .VS(5), .VB(36),
    .L0X(0), .L0Y(0), .L0W(1920), .L0H(1080),
    .L1X(480), .L1Y(270), .L1W(960), .L1H(540),
    .BUFW(1960), .BUFH(1090), .NFRAMES(3), .WATCHDOG(40000000)
  ) env ();
endmodule
