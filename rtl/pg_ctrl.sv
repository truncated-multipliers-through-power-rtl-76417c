// pg_ctrl -- power-gating sequencer for the power domains of a truncated
// multiplier (or of a bank of multipliers that share the same setting).
//
// The multiplier's KMAX least significant columns are split into ND = KMAX/G
// power domains of G columns each; domain d holds columns d*G .. d*G+G-1.
// A truncation request k_req (in product bits) asks for domains
// 0 .. k_req/G-1 to be powered off and the rest to be powered on.
//
// Each domain runs its own four-state sequence:
//   power-off : ON  -> ISO  (isolation asserted)       1 cycle
//               ISO -> OFF  (SLEEP asserted, ST off)    1 cycle
//   power-on  : OFF -> WAKE (SLEEP released, ST on)     1 cycle
//               WAKE-> ON   (isolation released)        1 cycle
// so a change of precision takes two clock cycles in either direction, and
// isolation is always asserted for the whole time SLEEP is high. If the
// request is withdrawn half way (in ISO or WAKE) the domain goes back the way
// it came, which again never drops isolation while the domain is unpowered.
//
// Interface: iso[d] and sleep[d] are registered outputs, active high
// (iso = 1 clamps the domain's outputs, sleep = 1 turns the sleep transistor
// off). k_eff is the truncation the multiplier output currently has
// (G times the number of isolated domains); busy is high while any domain
// is still changing state or differs from the request. Reset (active-low,
// asynchronous) puts every domain in full precision.
//
// The sequence and its two-cycle latency follow the text; the state
// encoding, the signal polarities, the abort paths, k_eff and busy are this
// design's own choices.
module pg_ctrl
  import dpa_pkg::*;
#(
  parameter int unsigned KMAX = MUL_KMAX,
  parameter int unsigned G    = MUL_G,
  localparam int unsigned ND  = KMAX / G,
  localparam int unsigned KW  = $clog2(KMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [KW-1:0] k_req,
  output logic [ND-1:0] iso,
  output logic [ND-1:0] sleep,
  output logic [KW-1:0] k_eff,
  output logic          busy
);

  pd_state_e       state [ND];
  logic [ND-1:0]   want_off;
  logic [KW-1:0]   nd_off;

  always_comb begin
    nd_off = k_req / KW'(G);
    for (int d = 0; d < ND; d++)
      want_off[d] = (KW'(d) < nd_off);
  end

  for (genvar d = 0; d < ND; d++) begin : g_dom
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        state[d] <= PD_ON;
      end else begin
        unique case (state[d])
          PD_ON:   if (want_off[d]) state[d] <= PD_ISO;
          PD_ISO:  state[d] <= want_off[d] ? PD_OFF : PD_ON;
          PD_OFF:  if (!want_off[d]) state[d] <= PD_WAKE;
          PD_WAKE: state[d] <= want_off[d] ? PD_OFF : PD_ON;
        endcase
      end
    end

    assign iso[d]   = (state[d] != PD_ON);
    assign sleep[d] = (state[d] == PD_OFF);

    // A domain may only be unpowered while its outputs are isolated.
    a_sleep_iso : assert property (@(posedge clk) disable iff (!rst_n)
                                   sleep[d] |-> iso[d]);
    // Power is removed only after a full cycle of isolation, and isolation is
    // released only after a full cycle of restored power.
    a_iso_first : assert property (@(posedge clk) disable iff (!rst_n)
                                   $rose(sleep[d]) |-> $past(iso[d]));
    a_wake_first : assert property (@(posedge clk) disable iff (!rst_n)
                                    $fell(iso[d]) |-> $past(!sleep[d]));
  end

  always_comb begin
    k_eff = '0;
    busy  = 1'b0;
    for (int d = 0; d < ND; d++) begin
      if (iso[d]) k_eff = k_eff + KW'(G);
      if ((state[d] == PD_ISO) || (state[d] == PD_WAKE) ||
          (want_off[d] != sleep[d]))
        busy = 1'b1;
    end
  end

  // The truncation is only settable in whole power domains.
  a_k_grain : assert property (@(posedge clk) disable iff (!rst_n)
                               (k_req % KW'(G)) == '0 && k_req <= KW'(KMAX));

endmodule
