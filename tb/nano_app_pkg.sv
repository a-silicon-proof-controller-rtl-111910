// nano_app_pkg: the NanoController partition of the door-lock application,
// assembled with nano_ref_pkg for the testbenches.
//
// Data memory: M0 idle-loop pass counter, M1 software clock, M2 time-out counter, M3 number
// of proximity events. I/O: GPIO_IN bit 0 is the proximity sensor, STATUS
// bit 0 the GPC's shut-down request, bits 1/2 GPC on / power sequence busy.
//
//  idle:  count loop passes; every ticks_per_sec passes advance M1 (clock);
//         poll the proximity sensor, stay idle while it reads 0
//  event: count it, set PWR_CMD=1 (GPC on), load the time-out counter
//  on:    wait for the GPC's shut-down request; count the time-out down with
//         DJNZ; a request writes 0x40 to GPIO_OUT, a time-out 0x80
//  off:   PWR_CMD=0, wait until the GPC domain is off and idle, back to idle
package nano_app_pkg;
  import nano_ref_pkg::*;

  localparam int L_IDLE = 1, L_CHK = 2, L_ON = 3, L_SD = 4, L_OFF = 5, L_WOFF = 6;

  function automatic void build_door_lock(int unsigned ticks_per_sec, int unsigned timeout);
    for (int pass = 0; pass < 2; pass++) begin
      asm_reset();
      // init
      asm_op(4'h1); asm_lit(0);            // LDI 0
      asm_op(4'h3); asm_lit(0);            // ST  M0
      asm_op(4'h3); asm_lit(1);            // ST  M1
      asm_op(4'h3); asm_lit(3);            // ST  M3
      asm_op(4'h3); asm_lit(24);           // ST  GPIO_OUT
      asm_op(4'h3); asm_lit(25);           // ST  PWR_CMD
      label(L_IDLE);
      asm_op(4'h4); asm_lit(0);            // INC M0
      asm_op(4'h6); asm_lit(ticks_per_sec);// CMPI ticks
      asm_op(4'hD); asm_lit3(lbl(L_CHK));  // JNZ chk
      asm_op(4'h1); asm_lit(0);            // LDI 0
      asm_op(4'h3); asm_lit(0);            // ST  M0
      asm_op(4'h4); asm_lit(1);            // INC M1  (clock)
      label(L_CHK);
      asm_op(4'h2); asm_lit(16);           // LD  GPIO_IN
      asm_op(4'h8); asm_lit(1);            // ANDI 1
      asm_op(4'hC); asm_lit3(lbl(L_IDLE)); // JZ idle
      asm_op(4'h4); asm_lit(3);            // INC M3  (events)
      asm_op(4'h1); asm_lit(1);            // LDI 1
      asm_op(4'h3); asm_lit(25);           // ST  PWR_CMD
      asm_op(4'h1); asm_lit(timeout);      // LDI timeout
      asm_op(4'h3); asm_lit(2);            // ST  M2
      label(L_ON);
      asm_op(4'h2); asm_lit(17);           // LD  STATUS
      asm_op(4'h8); asm_lit(1);            // ANDI 1 (shut-down request)
      asm_op(4'hD); asm_lit3(lbl(L_SD));   // JNZ sd
      asm_op(4'hF); asm_lit(2); asm_lit3(lbl(L_ON)); // DJNZ M2, on
      asm_op(4'h1); asm_lit(32'h80);        // LDI 0x80 (time-out)
      asm_op(4'h3); asm_lit(24);           // ST  GPIO_OUT
      asm_op(4'hB); asm_lit3(lbl(L_OFF));  // JMP off
      label(L_SD);
      asm_op(4'h1); asm_lit(32'h40);        // LDI 0x40 (request)
      asm_op(4'h3); asm_lit(24);           // ST  GPIO_OUT
      label(L_OFF);
      asm_op(4'h1); asm_lit(0);            // LDI 0
      asm_op(4'h3); asm_lit(25);           // ST  PWR_CMD
      label(L_WOFF);
      asm_op(4'h2); asm_lit(17);           // LD  STATUS
      asm_op(4'h8); asm_lit(6);            // ANDI on|busy
      asm_op(4'hD); asm_lit3(lbl(L_WOFF)); // JNZ woff
      asm_op(4'hB); asm_lit3(lbl(L_IDLE)); // JMP idle
    end
  endfunction
endpackage
