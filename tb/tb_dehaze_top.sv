// End-to-end testbench of dehaze_top on a small 24 x 40 frame with DDR
// back-pressure (10% random stalls); see dehaze_tb_core for what is checked.
module tb_dehaze_top;
  dehaze_tb_core #(.ROWS(24), .COLS(40), .STALL_PCT(10), .BUFW(4096), .WATCHDOG(2000000)) u_core ();
endmodule
