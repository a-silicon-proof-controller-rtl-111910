// gpc_pwr_ctrl: power-gating handshake between the NanoController and the
// power management of the GPC on/off domain.
//
// The NanoController's on/off command (on_cmd) is turned into an ordered
// sequence towards the power switch and the GPC domain:
//   power-up:   pwr_en=1, wait for pwr_good, release isolation, then after
//               RST_HOLD cycles release the GPC reset        -> ON
//   power-down: assert GPC reset, then isolation, then pwr_en=0, wait for
//               pwr_good to fall                             -> OFF
// pwr_good comes from the analog power management and is synchronised here.
// gpc_on is high only in ON, busy during either sequence; both are read by
// the NanoController program. A command that changes during a sequence is
// served after the sequence ends. All outputs are registered-state decodes
// and reset to the OFF state (domain off, isolated, in reset).
//
// The published system only states that the NanoController sends on/off
// commands to the power management and receives shut-down requests from the
// GPC; the sequence and its signals are this design's own.
module gpc_pwr_ctrl #(
  parameter int unsigned RST_HOLD = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic on_cmd,
  input  logic pwr_good,     // asynchronous, from the power management
  output logic pwr_en,       // to the power switch
  output logic iso_en,       // isolation clamps of the GPC outputs
  output logic gpc_rst_n,    // reset of the GPC domain
  output logic gpc_on,
  output logic busy
);

  typedef enum logic [2:0] {
    P_OFF, P_PWR_UP, P_UNISO, P_RST_REL, P_ON, P_RST, P_ISO, P_PWR_DN
  } pstate_t;

  localparam int unsigned CW = (RST_HOLD > 1) ? $clog2(RST_HOLD + 1) : 1;

  pstate_t       state_q;
  logic [CW-1:0] cnt_q;
  logic          pwr_good_s;

  sync_2ff u_sync_pg (.clk(clk), .rst_n(rst_n), .d(pwr_good), .q(pwr_good_s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= P_OFF;
      cnt_q   <= '0;
    end else begin
      unique case (state_q)
        P_OFF:     if (on_cmd) state_q <= P_PWR_UP;
        P_PWR_UP:  if (pwr_good_s) state_q <= P_UNISO;
        P_UNISO: begin
          state_q <= P_RST_REL;
          cnt_q   <= '0;
        end
        P_RST_REL: begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == CW'(RST_HOLD - 1)) state_q <= P_ON;
        end
        P_ON:      if (!on_cmd) state_q <= P_RST;
        P_RST:     state_q <= P_ISO;
        P_ISO:     state_q <= P_PWR_DN;
        P_PWR_DN:  if (!pwr_good_s) state_q <= P_OFF;
        default:   state_q <= P_OFF;
      endcase
    end
  end

  always_comb begin
    pwr_en    = !(state_q inside {P_OFF, P_PWR_DN});
    iso_en    = state_q inside {P_OFF, P_PWR_UP, P_ISO, P_PWR_DN};
    gpc_rst_n = (state_q == P_ON);
    gpc_on    = (state_q == P_ON);
    busy      = !(state_q inside {P_OFF, P_ON});
  end

  // The GPC never runs unpowered or isolated.
  assert property (@(posedge clk) disable iff (!rst_n) gpc_rst_n |-> (pwr_en && !iso_en))
    else $error("gpc_pwr_ctrl: GPC out of reset while unpowered or isolated");

endmodule
