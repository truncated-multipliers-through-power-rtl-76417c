// tb_dpa_fir -- end-to-end, self-checking testbench of the 16-tap FIR
// filter with power-gated multipliers, at the design's default parameters.
//
// It loads 16 random 8-bit coefficients, then streams random 8-bit samples
// (with gaps where x_valid is low) while the truncation request moves
// through k = 0, 4 and 8 in every order. A reference filter kept here
// records, for each accepted sample, the truncation in effect at that
// clock (isolation follows a power-off request after one clock and a
// power-on request after two) and forms every product as the exact product
// minus the value of the partial-product dots in the truncated columns.
// The output is compared every cycle, as are k_eff and the rule that a
// domain is never asleep without isolation. The mean output error against
// the exact filter is printed for each k. Each mechanism must occur at least
// once: coefficient loading, power-off and power-on sequences, samples
// accepted at each k, samples accepted during a sequence, and idle cycles.
module tb_dpa_fir;
  import dpa_pkg::*;

  localparam int TAPS = 16;
  localparam int N    = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic coef_we;
  logic [3:0] coef_addr;
  logic signed [7:0] coef_data;
  logic [3:0] k_req, k_eff;
  logic pg_busy;
  logic [1:0] pd_iso, pd_sleep;
  logic x_valid;
  logic signed [7:0] x;
  logic signed [15:0] y;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  dpa_fir u_dut (
    .clk(clk), .rst_n(rst_n),
    .coef_we(coef_we), .coef_addr(coef_addr), .coef_data(coef_data),
    .k_req(k_req), .k_eff(k_eff), .pg_busy(pg_busy),
    .pd_iso(pd_iso), .pd_sleep(pd_sleep),
    .x_valid(x_valid), .x(x), .y(y)
  );

  // reference state
  logic signed [7:0] a_m [TAPS];
  logic signed [7:0] xh  [TAPS];   // xh[j] = sample j steps back (j >= 1)
  int                kh  [TAPS];   // truncation used for that sample
  bit                vh  [TAPS];   // history entry holds a real sample
  int                k_model;      // truncation in effect this cycle
  int                w_prev;       // request seen at the previous edge

  // counters of mechanisms
  int n_load = 0, n_off = 0, n_on = 0, n_trans = 0, n_idle = 0;
  int n_k [3] = '{0, 0, 0};
  longint err_sum [3] = '{0, 0, 0};
  int     err_n   [3] = '{0, 0, 0};

  function automatic int dropped(input logic [N-1:0] p, input logic [N-1:0] q,
                                 input int k);
    int v = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        if (i + j < k) begin
          logic d;
          d = p[i] & q[j];
          if ((i == N - 1) != (j == N - 1)) d = ~d;
          v += int'(d) << (i + j);
        end
    return v;
  endfunction

  function automatic int tprod(input logic signed [7:0] p,
                               input logic signed [7:0] q, input int k);
    return int'(p) * int'(q) - dropped(p, q, k);
  endfunction

  function automatic int iso_k(input int kreq_now, input int kreq_prev);
    // a domain is isolated if it is requested off now or was last cycle
    return (kreq_now > kreq_prev) ? kreq_now : kreq_prev;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-cycle checks, just before each rising edge
  always @(negedge clk) begin
    if (rst_n) begin
      int yref, yex, e;
      logic [15:0] yr;
      yref = tprod(a_m[0], x, k_model);
      yex  = int'(a_m[0]) * int'(x);
      for (int j = 1; j < TAPS; j++)
        if (vh[j]) begin
          yref += tprod(a_m[j], xh[j], kh[j]);
          yex  += int'(a_m[j]) * int'(xh[j]);
        end
      yr = yref[15:0];
      checks++;
      if (y !== yr) begin
        failures++;
        if (failures < 10)
          $display("FAIL t=%0t y=%0d want %0d (k=%0d)", $time, y, $signed(yr), k_model);
      end
      checks++;
      if (int'(k_eff) != k_model || (pd_sleep & ~pd_iso) != 2'b00) begin
        failures++;
        $display("FAIL t=%0t k_eff=%0d model %0d iso=%b sleep=%b", $time, k_eff,
                 k_model, pd_iso, pd_sleep);
      end
      if (x_valid) begin
        bit same;
        same = 1'b1;
        for (int j = 1; j < TAPS; j++) if (!vh[j] || kh[j] != k_model) same = 1'b0;
        if (same) begin
          int ix;
          logic [15:0] d16;
          ix  = k_model / 4;
          d16 = 16'(yex) - 16'(yref);
          e = int'($signed(d16));
          if (e < 0) e = -e;
          err_sum[ix] += e;
          err_n[ix]++;
        end
        if (pg_busy) n_trans++;
        else n_k[k_model / 4]++;
      end else begin
        n_idle++;
      end
    end
  end

  // reference update at each rising edge
  always @(posedge clk) begin
    if (rst_n) begin
      if (x_valid) begin
        for (int j = TAPS - 1; j > 1; j--) begin
          xh[j] = xh[j-1]; kh[j] = kh[j-1]; vh[j] = vh[j-1];
        end
        xh[1] = x; kh[1] = k_model; vh[1] = 1'b1;
      end
      if (coef_we) a_m[coef_addr] = coef_data;
      k_model = iso_k(int'(k_req), w_prev);
      w_prev  = int'(k_req);
    end
  end

  task automatic set_k(input int k);
    if (k > int'(k_req)) n_off++;
    if (k < int'(k_req)) n_on++;
    k_req = 4'(k);
  endtask

  initial begin
    static int sched [10] = '{4, 8, 4, 0, 8, 0, 4, 8, 0, 4};
    coef_we = 1'b0; coef_addr = '0; coef_data = '0;
    k_req = '0; x_valid = 1'b0; x = '0;
    for (int j = 0; j < TAPS; j++) begin
      a_m[j] = '0; xh[j] = '0; kh[j] = 0; vh[j] = 1'b0;
    end
    k_model = 0; w_prev = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // load coefficients
    for (int j = 0; j < TAPS; j++) begin
      @(posedge clk) #1;
      coef_we = 1'b1; coef_addr = 4'(j); coef_data = 8'($urandom);
      n_load++;
    end
    @(posedge clk) #1 coef_we = 1'b0;
    // stream at k = 0
    for (int c = 0; c < 300; c++) begin
      @(posedge clk) #1;
      x_valid = ($urandom_range(99, 0) < 85);
      x = 8'($urandom);
    end
    // change precision on the fly
    for (int s = 0; s < 10; s++) begin
      @(posedge clk) #1 set_k(sched[s]);
      for (int c = 0; c < 300; c++) begin
        if (c > 0) begin
          @(posedge clk) #1;
        end
        x_valid = ($urandom_range(99, 0) < 85);
        x = 8'($urandom);
      end
    end
    @(posedge clk) #1 x_valid = 1'b0;
    @(negedge clk);

    for (int i = 0; i < 3; i++)
      if (err_n[i] > 0)
        $display("k=%0d: %0d settled samples, mean |error| %0.1f ulp", 4 * i,
                 err_n[i], real'(err_sum[i]) / real'(err_n[i]));
    $display("mechanisms: coef loads %0d, power-off %0d, power-on %0d, samples k0 %0d k4 %0d k8 %0d, samples during a sequence %0d, idle cycles %0d",
             n_load, n_off, n_on, n_k[0], n_k[1], n_k[2], n_trans, n_idle);
    checks++;
    if (n_load == 0 || n_off == 0 || n_on == 0 || n_k[0] == 0 || n_k[1] == 0 ||
        n_k[2] == 0 || n_trans == 0 || n_idle == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
