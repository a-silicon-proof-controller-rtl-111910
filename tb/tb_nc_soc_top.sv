// tb_nc_soc_top: end-to-end test of the controller system at its full
// default size (96 KiB + 128 KiB SRAMs, 256-byte flash pages), with the GPC
// clock 32 times faster than the always-on clock to keep the run short.
// Six sessions; see soc_door_lock_env for what is driven and checked.
module tb_nc_soc_top;
  soc_door_lock_env #(
    .NANO_HALF_NS (160),
    .GPC_HALF_NS  (5),
    .SESSIONS     (6),
    .TICKS        (3),
    .MAX_LATENCY  (60),
    .IDLE_CYCLES  (300)
  ) env ();

  // outer time limit, in addition to the environment's cycle watchdog
  initial begin
    #100ms;
    $display("time limit reached");
    $display("TB_RESULT checks=%0d failures=%0d", env.checks, env.failures + 1);
    $finish;
  end
endmodule
