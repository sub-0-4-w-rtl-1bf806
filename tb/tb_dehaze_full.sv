// Full-size end-to-end testbench: one 1920 x 1080 frame through dehaze_top
// at its default parameters, DDR without random stalls; see dehaze_tb_core
// for what is checked.  Reports the cycle count of each kernel.
module tb_dehaze_full;
  dehaze_tb_core #(.ROWS(1080), .COLS(1920), .STALL_PCT(0), .BUFW(1 << 21), .WATCHDOG(40000000)) u_core ();
endmodule
