// dpa_mult -- programmable truncated multiplier obtained by power-gating
// the least significant columns of a column-wise (dot-array) multiplier.
//
// Arithmetic: an N x N two's-complement multiplier (N = 8). Partial products
// are formed in Baugh-Wooley form: a[i]&b[j], inverted when exactly one of
// i, j is the sign position N-1, plus two constant ones at product columns N
// and 2N-1 that correct the sign extension. The dots of each product column
// are then reduced column by column with full adders (3:2) and half adders
// (2:2): at each level a column taller than two bits is cut into groups of
// three (one full adder each), a leftover pair goes to a half adder and a
// leftover single bit passes; sums stay in their column, carries move one
// column up. For N = 8 this takes four levels; a ripple-carry adder over the
// remaining two rows produces the 2N-bit product.
//
// Power-gating: columns 0 .. KMAX-1 are split into ND = KMAX/G power domains
// of G columns each (g = 4 gives two domains, one for truncation k = 4 and
// one for k = 8). Every cell of a column (partial-product AND gate, reduction
// adders, final-adder cell) belongs to that column's domain. Signals only
// leave a domain through carries into the next column up and through the
// product bits of its own columns; an isolation gate sits on each of these
// and clamps it to 0 while iso[d] is high. With the k least significant
// columns isolated, the product equals the exact product minus the value of
// every partial-product dot in those columns, so the error lies between 0
// and sum_{j<=k} (2^(k-j)-1)*2^j units of the product LSB.
//
// Sleep model: when SLEEP_MODEL is set, every cell of a domain with
// sleep[d] high drives the constant DRIFT instead of its logic value. This
// stands for the floating outputs of cells whose virtual supply is collapsed
// and lets a simulation show that the isolation gates, not the sleep
// transistors, keep the result defined. Clear SLEEP_MODEL to obtain the bare
// multiplier-with-isolation netlist for synthesis, where the sleep
// transistors themselves are added in the physical flow.
//
// Interface: a, b signed operands; iso[d], sleep[d] per domain, active high,
// normally driven by pg_ctrl; p the 2N-bit two's-complement product.
// Purely combinational. The rule "sleep[d] only while iso[d]" is asserted.
//
// From the text: the 8x8 two's-complement column-wise array with sign
// correction, per-column clustering into domains, isolation on the signals
// crossing a domain edge, 8 gateable columns, g = 4. This design's own
// choices: the exact adder allocation of each level (the greedy 3:2 / 2:2
// rule above), the ripple final adder, clamping to 0, isolating the gated
// product bits, and the sleep model.
module dpa_mult
  import dpa_pkg::*;
#(
  parameter int unsigned N           = MUL_N,
  parameter int unsigned KMAX        = MUL_KMAX,
  parameter int unsigned G           = MUL_G,
  parameter bit          SLEEP_MODEL = 1'b1,
  parameter bit          DRIFT       = 1'b1,
  localparam int unsigned ND         = KMAX / G
) (
  input  logic signed [N-1:0]   a,
  input  logic signed [N-1:0]   b,
  input  logic        [ND-1:0]  iso,
  input  logic        [ND-1:0]  sleep,
  output logic signed [2*N-1:0] p
);

  localparam int unsigned W    = 2 * N;  // product columns
  localparam int unsigned HMAX = N + 1;  // tallest column, with margin

  // ---------------------------------------------------------------------
  // Elaboration-time description of the dot array.
  // ---------------------------------------------------------------------

  // Dots in column c before reduction.
  function automatic int h_init(input int c);
    int h = 0;
    for (int i = 0; i < int'(N); i++)
      if (c - i >= 0 && c - i < int'(N)) h++;
    if (c == int'(N))     h++;
    if (c == int'(W) - 1) h++;
    return h;
  endfunction

  // Adders (full + half) placed in a column of height h.
  function automatic int n_fa(input int h);
    return (h <= 2) ? 0 : h / 3;
  endfunction
  function automatic int n_ha(input int h);
    return (h <= 2) ? 0 : ((h % 3) == 2 ? 1 : 0);
  endfunction
  // Bits passed through unchanged.
  function automatic int n_pass(input int h);
    return (h <= 2) ? h : ((h % 3) == 1 ? 1 : 0);
  endfunction

  // Height of column c at the input of reduction level l.
  function automatic int height(input int l, input int c);
    int h  [W];
    int nh [W];
    for (int x = 0; x < int'(W); x++) h[x] = h_init(x);
    for (int lv = 0; lv < l; lv++) begin
      for (int x = 0; x < int'(W); x++) begin
        nh[x] = n_fa(h[x]) + n_ha(h[x]) + n_pass(h[x]);
        if (x > 0) nh[x] += n_fa(h[x-1]) + n_ha(h[x-1]);
      end
      for (int x = 0; x < int'(W); x++) h[x] = nh[x];
    end
    return h[c];
  endfunction

  // Number of reduction levels until every column holds two bits or fewer.
  function automatic int n_levels();
    int l = 0;
    bit tall = 1'b1;
    while (tall) begin
      tall = 1'b0;
      for (int x = 0; x < int'(W); x++)
        if (height(l, x) > 2) tall = 1'b1;
      if (tall) l++;
    end
    return l;
  endfunction

  localparam int unsigned NLEV = n_levels();

  // Column c is power-gated (belongs to domain c/G) when c < KMAX.
  function automatic bit gated(input int c);
    return c < int'(KMAX);
  endfunction
  // A signal leaving column c for column c+1 crosses a domain edge.
  function automatic bit edge_after(input int c);
    return gated(c) && (!gated(c + 1) || ((c + 1) / int'(G) != c / int'(G)));
  endfunction

  // ---------------------------------------------------------------------
  // Per-domain cell behaviour.
  // ---------------------------------------------------------------------
  logic [W-1:0] col_sleep;  // column's domain is unpowered
  logic [W-1:0] col_iso;    // column's domain is isolated
  always_comb begin
    col_sleep = '0;
    col_iso   = '0;
    for (int c = 0; c < int'(KMAX); c++) begin
      col_sleep[c] = SLEEP_MODEL && sleep[c / int'(G)];
      col_iso[c]   = iso[c / int'(G)];
    end
  end

  // ---------------------------------------------------------------------
  // Reduction levels. Level l, column c receives bits `bi`, and produces
  // the bits `bo` of level l+1 in the same column plus the carries `cx` for
  // column c+1 (already through the isolation gate when one is needed).
  // ---------------------------------------------------------------------
  for (genvar l = 0; l < int'(NLEV); l++) begin : g_lvl
    for (genvar c = 0; c < int'(W); c++) begin : g_col
      localparam int HC  = height(l, c);
      localparam int NFA = n_fa(HC);
      localparam int NHA = n_ha(HC);
      localparam int NP  = n_pass(HC);
      localparam int NAD = NFA + NHA;
      localparam int NCI = (c > 0) ? n_fa(height(l, c - 1)) + n_ha(height(l, c - 1)) : 0;

      logic [HMAX-1:0] bi;   // bits entering this level
      logic [HMAX-1:0] s;    // adder sums (stay in column c)
      logic [HMAX-1:0] co;   // adder carries (raw)
      logic [HMAX-1:0] cx;   // adder carries leaving for column c+1
      logic [HMAX-1:0] ci;   // carries arriving from column c-1
      logic [HMAX-1:0] bo;   // bits leaving this level

      if (l == 0) begin : g_pp
        // Partial-product generation (Baugh-Wooley), one gate per dot.
        always_comb begin
          int k;
          bi = '0;
          k  = 0;
          for (int i = 0; i < int'(N); i++) begin
            if (c - i >= 0 && c - i < int'(N)) begin
              bi[k] = a[i] & b[c-i];
              if ((i == int'(N) - 1) != (c - i == int'(N) - 1)) bi[k] = ~bi[k];
              if (gated(c) && col_sleep[c]) bi[k] = DRIFT;
              k++;
            end
          end
          if (c == int'(N) || c == int'(W) - 1) begin
            bi[k] = 1'b1;
          end
        end
      end else begin : g_fwd
        assign bi = g_lvl[l-1].g_col[c].bo;
      end

      always_comb begin
        s  = '0;
        co = '0;
        for (int f = 0; f < NFA; f++) begin
          {co[f], s[f]} = bi[3*f] + bi[3*f+1] + bi[3*f+2];
        end
        if (NHA > 0) begin
          {co[NFA], s[NFA]} = bi[3*NFA] + bi[3*NFA+1];
        end
        if (gated(c) && col_sleep[c]) begin
          for (int f = 0; f < NAD; f++) begin
            s[f]  = DRIFT;
            co[f] = DRIFT;
          end
        end
      end

      // Isolation gates on carries that leave a power domain.
      if (edge_after(c)) begin : g_iso
        assign cx = co & {HMAX{~col_iso[c]}};
      end else begin : g_noiso
        assign cx = co;
      end

      if (c > 0) begin : g_ci
        assign ci = g_col[c-1].cx;
      end else begin : g_noci
        assign ci = '0;
      end

      always_comb begin
        bo = '0;
        for (int f = 0; f < NAD; f++) bo[f] = s[f];
        for (int f = 0; f < NP; f++)  bo[NAD+f] = bi[3*NFA+2*NHA+f];
        for (int f = 0; f < NCI; f++) bo[NAD+NP+f] = ci[f];
      end
    end
  end

  // ---------------------------------------------------------------------
  // Final carry-propagate adder over the two remaining rows.
  // ---------------------------------------------------------------------
  logic [W:0]   cc;   // carry into each column, after isolation
  logic [W-1:0] ps;   // final sums

  assign cc[0] = 1'b0;
  for (genvar c = 0; c < int'(W); c++) begin : g_cpa
    localparam int HF = height(NLEV, c);
    logic x, y, s, co;
    if (NLEV > 0) begin : g_rows
      assign x = (HF > 0) ? g_lvl[NLEV-1].g_col[c].bo[0] : 1'b0;
      assign y = (HF > 1) ? g_lvl[NLEV-1].g_col[c].bo[1] : 1'b0;
    end else begin : g_none
      assign x = 1'b0;
      assign y = 1'b0;
    end
    always_comb begin
      {co, s} = x + y + cc[c];
      if (gated(c) && col_sleep[c]) begin
        s  = DRIFT;
        co = DRIFT;
      end
    end
    if (edge_after(c)) begin : g_iso
      assign cc[c+1] = co & ~col_iso[c];
    end else begin : g_noiso
      assign cc[c+1] = co;
    end
    // Product bits of gated columns leave the domain too.
    if (gated(c)) begin : g_piso
      assign ps[c] = s & ~col_iso[c];
    end else begin : g_pout
      assign ps[c] = s;
    end
  end

  assign p = ps;

  for (genvar d = 0; d < int'(ND); d++) begin : g_chk
    always_comb begin
      a_sleep_iso : assert final (!sleep[d] || iso[d]);
    end
  end

endmodule
