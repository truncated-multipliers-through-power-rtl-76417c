// dpa_fir -- TAPS-tap FIR filter in transposed form whose multipliers are
// power-gated truncated multipliers with a precision selectable at run time.
//
// Structure: the input sample x feeds all TAPS multipliers at once. The
// product with the highest-order coefficient a_{TAPS-1} goes into the first
// delay register; every following stage adds its product to the register
// on its left and stores the sum in its own register; the last adder, with
// a_0, gives the output:
//   y(t) = a_0 x(t) + a_1 x(t-1) + ... + a_{TAPS-1} x(t-TAPS+1).
// All multipliers share one power-gating controller (pg_ctrl), so a single
// request k_req truncates the k least significant product columns of every
// multiplier at once; the controller's isolation and SLEEP signals fan out
// to all of them and are also brought out as ports, since in silicon SLEEP
// drives the sleep transistors of each power domain. The coefficients sit
// in a bank of registers that are loaded once and then only hold.
//
// Interface: coef_we/coef_addr/coef_data write one coefficient per clock;
// x_valid/x present a sample, which is taken at the clock edge where x_valid
// is high (the delay registers shift only then); y is the filter output for
// the sample on x, valid in the same cycle (no register between the last
// adder and y). k_req selects the truncation (0, 4 or 8 with g = 4); k_eff
// tells which truncation the products have in the current cycle, and pg_busy
// is high while a power-off or power-on sequence (two cycles) is running.
// Samples may keep flowing during a sequence; each product carries the
// truncation that was in effect when it was formed.
//
// Widths follow the text (8-bit samples and coefficients, 16-bit output, 16
// taps, g = 4 multipliers). The sum wraps modulo 2^OUTW: coefficients must
// be scaled so that the filter output fits in OUTW bits. The shared
// controller, the load port, the sample enable and the wrap-around are this
// design's choices.
module dpa_fir
  import dpa_pkg::*;
#(
  parameter int unsigned TAPS = FIR_TAPS,
  parameter int unsigned N    = MUL_N,
  parameter int unsigned OUTW = FIR_OUTW,
  parameter int unsigned KMAX = MUL_KMAX,
  parameter int unsigned G    = MUL_G,
  localparam int unsigned ND  = KMAX / G,
  localparam int unsigned KW  = $clog2(KMAX + 1),
  localparam int unsigned AW  = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // coefficient load
  input  logic                   coef_we,
  input  logic [AW-1:0]          coef_addr,
  input  logic signed [N-1:0]    coef_data,
  // precision control
  input  logic [KW-1:0]          k_req,
  output logic [KW-1:0]          k_eff,
  output logic                   pg_busy,
  // to the sleep transistors of each power domain (and their isolation)
  output logic [ND-1:0]          pd_iso,
  output logic [ND-1:0]          pd_sleep,
  // samples
  input  logic                   x_valid,
  input  logic signed [N-1:0]    x,
  output logic signed [OUTW-1:0] y
);

  logic signed [N-1:0]    coef [TAPS];
  logic signed [2*N-1:0]  prod [TAPS];
  logic signed [OUTW-1:0] prod_w [TAPS];
  logic signed [OUTW-1:0] acc  [TAPS];   // acc[t]: register after tap t (t >= 1)
  logic signed [OUTW-1:0] sum  [TAPS];   // adder output of tap t

  coef_bank #(.TAPS(TAPS), .CW(N)) u_coef (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (coef_we),
    .addr  (coef_addr),
    .data  (coef_data),
    .coef  (coef)
  );

  pg_ctrl #(.KMAX(KMAX), .G(G)) u_pg (
    .clk   (clk),
    .rst_n (rst_n),
    .k_req (k_req),
    .iso   (pd_iso),
    .sleep (pd_sleep),
    .k_eff (k_eff),
    .busy  (pg_busy)
  );

  for (genvar t = 0; t < int'(TAPS); t++) begin : g_tap
    dpa_mult #(.N(N), .KMAX(KMAX), .G(G)) u_mul (
      .a     (coef[t]),
      .b     (x),
      .iso   (pd_iso),
      .sleep (pd_sleep),
      .p     (prod[t])
    );

    if (OUTW >= 2 * N) begin : g_ext
      assign prod_w[t] = OUTW'(prod[t]);
    end else begin : g_cut
      assign prod_w[t] = prod[t][OUTW-1:0];
    end

    if (t == int'(TAPS) - 1) begin : g_first
      assign sum[t] = prod_w[t];
    end else begin : g_add
      assign sum[t] = prod_w[t] + acc[t+1];
    end

    if (t > 0) begin : g_z
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)       acc[t] <= '0;
        else if (x_valid) acc[t] <= sum[t];
      end
    end else begin : g_noz
      assign acc[t] = '0;
    end
  end

  assign y = sum[0];

endmodule
