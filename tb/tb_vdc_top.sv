// tb_vdc_top: end-to-end test of the display controller at its default
// sizes on a small 160x64 raster: six frames of two overlapping layers from
// paged buffers, random 50..250-cycle bus latency with the bus switched off
// 1000 of every 6000 cycles, double-buffered jobs, then a test frame. See
// vdc_tb_env for what is checked and counted.
//
// Paging, double jobs, the 16-beat burst rules and the ON/OFF bus follow
// the document; the raster size and windows are this testbench's choice.
module tb_vdc_top;
  vdc_tb_env env ();
endmodule
