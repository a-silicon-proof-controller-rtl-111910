// tb_door_lock_32k: the door-lock application at its intended clocks, a
// 32 kHz always-on clock (half period 15625 ns) and a 6.25 MHz GPC clock
// (half period 80 ns), with the full-size system. Three sessions: two end
// with the GPC's shut-down request, one with the NanoController's time-out,
// each followed by 4000 idle cycles (125 ms) in which the software clock runs.
// Checks every mechanism as in tb_nc_soc_top and that the NanoController
// reacts to a proximity event within 60 always-on cycles (under 2 ms); it
// prints the reaction time and how long the GPC domain was powered.
module tb_door_lock_32k;
  soc_door_lock_env #(
    .NANO_HALF_NS (15625),
    .GPC_HALF_NS  (80),
    .SESSIONS     (3),
    .TICKS        (200),
    .MAX_LATENCY  (60),
    .IDLE_CYCLES  (4000)
  ) env ();

  // outer time limit, in addition to the environment's cycle watchdog
  initial begin
    #10s;
    $display("time limit reached");
    $display("TB_RESULT checks=%0d failures=%0d", env.checks, env.failures + 1);
    $finish;
  end
endmodule
