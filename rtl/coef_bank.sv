// coef_bank -- coefficient registers of the FIR filter.
//
// TAPS registers of CW bits each hold the filter coefficients a_0 .. a_{TAPS-1}.
// One register is written per clock through a simple write port (we, addr,
// data); all of them are read in parallel. After loading, the registers are
// meant to stay still with their clock gated: the write enable of each
// register is its only load condition, so synthesis with clock-gating
// insertion turns it into one clock-gate per register and the bank draws
// no clock power once it is loaded.
//
// Timing: a write takes effect at the clock edge where we is high; coef
// shows the new value from that edge on. Reset (active-low, asynchronous)
// clears all coefficients.
//
// That the coefficient registers are clock-gated once loaded comes from the
// text; the write port, the reset value and leaving the gate itself to the
// synthesis tool are this design's choices.
module coef_bank
  import dpa_pkg::*;
#(
  parameter int unsigned TAPS = FIR_TAPS,
  parameter int unsigned CW   = MUL_N,
  localparam int unsigned AW  = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic [AW-1:0]        addr,
  input  logic signed [CW-1:0] data,
  output logic signed [CW-1:0] coef [TAPS]
);

  for (genvar t = 0; t < int'(TAPS); t++) begin : g_reg
    logic load;
    assign load = we && (addr == AW'(t));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)    coef[t] <= '0;
      else if (load) coef[t] <= data;
    end
  end

endmodule
