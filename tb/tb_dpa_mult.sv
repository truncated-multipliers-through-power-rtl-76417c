// tb_dpa_mult -- self-checking testbench for the power-gated truncated
// multiplier.
//
// Three instances are tested: the main g = 4 configuration (two power domains)
// exhaustively over all 8x8-bit operand pairs for k = 0, 4 and 8, with the
// gated domains both isolated-and-asleep and isolated-but-powered; and a
// g = 1 configuration (one domain per column) with random operands for every
// k = 0..8; and a g = 2 configuration with the unpowered-cell model
// switched off, for k = 0, 2, .., 8. The reference is computed here from
// the operands alone: the exact signed product minus the value of the Baugh-Wooley partial-product dots
// that fall in the k truncated columns. Each result is also checked against
// the closed-form bound eps_max(k), and the mean error per k is printed.
module tb_dpa_mult;
  import dpa_pkg::*;

  localparam int N = 8;

  logic signed [N-1:0]   a, b;
  // domain controls start in full precision, before any assertion can look
  logic        [1:0]     iso4 = '0, sleep4 = '0;
  logic        [7:0]     iso1 = '0, sleep1 = '0;
  logic        [3:0]     iso2 = '0, sleep2 = '0;
  logic signed [2*N-1:0] p4, p1, p2;

  int checks   = 0;
  int failures = 0;

  dpa_mult #(.G(4)) u_g4 (.a(a), .b(b), .iso(iso4), .sleep(sleep4), .p(p4));
  dpa_mult #(.G(1)) u_g1 (.a(a), .b(b), .iso(iso1), .sleep(sleep1), .p(p1));
  // g = 2 with the unpowered-cell model switched off (synthesis view)
  dpa_mult #(.G(2), .SLEEP_MODEL(1'b0)) u_g2 (.a(a), .b(b), .iso(iso2),
                                             .sleep(sleep2), .p(p2));

  // Value of the partial-product dots in columns below k.
  function automatic int dropped(input logic [N-1:0] x, input logic [N-1:0] y,
                                 input int k);
    int v = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        if (i + j < k) begin
          logic d;
          d = x[i] & y[j];
          if ((i == N - 1) != (j == N - 1)) d = ~d;
          v += int'(d) << (i + j);
        end
    return v;
  endfunction

  task automatic check(input logic signed [2*N-1:0] got, input int k,
                       inout longint err_sum);
    int exact, expv, err;
    logic [2*N-1:0] want;
    exact = int'(a) * int'(b);
    expv  = exact - dropped(a, b, k);
    want  = expv[2*N-1:0];
    err   = exact - int'(got);
    checks++;
    if (got !== want || err < 0 || longint'(err) > longint'(eps_max(k))) begin
      failures++;
      if (failures < 10)
        $display("FAIL k=%0d a=%0d b=%0d got=%0d want=%0d", k, a, b, got,
                 $signed(want));
    end
    err_sum += longint'(err);
  endtask

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint es;
    iso1 = '0; sleep1 = '0;
    iso2 = '0; sleep2 = '0;
    // g = 4: exhaustive, k = 0, 4, 8.
    for (int nd = 0; nd <= 2; nd++) begin
      for (int mode = 0; mode < 2; mode++) begin
        es = 0;
        for (int d = 0; d < 2; d++) begin
          iso4[d]   = (d < nd);
          sleep4[d] = (d < nd) && (mode == 0);
        end
        for (int x = 0; x < 256; x++)
          for (int y = 0; y < 256; y++) begin
            a = x[7:0]; b = y[7:0];
            #1;
            check(p4, 4 * nd, es);
          end
        if (mode == 0)
          $display("g=4 k=%0d mean error %0.1f ulp (bound %0d)", 4 * nd,
                   real'(es) / 65536.0, eps_max(4 * nd));
      end
    end
    // g = 1: random operands, k = 0..8, gated domains asleep.
    iso4 = '0; sleep4 = '0;
    for (int k = 0; k <= 8; k++) begin
      es = 0;
      for (int d = 0; d < 8; d++) begin
        iso1[d]   = (d < k);
        sleep1[d] = (d < k);
      end
      for (int t = 0; t < 4000; t++) begin
        a = N'($urandom); b = N'($urandom);
        #1;
        check(p1, k, es);
      end
      $display("g=1 k=%0d mean error %0.1f ulp (bound %0d)", k,
               real'(es) / 4000.0, eps_max(k));
    end
    // g = 2, no sleep model: random operands, k = 0, 2, 4, 6, 8.
    iso1 = '0; sleep1 = '0;
    for (int k = 0; k <= 8; k += 2) begin
      es = 0;
      for (int d = 0; d < 4; d++) begin
        iso2[d]   = (d < k / 2);
        sleep2[d] = (d < k / 2);
      end
      for (int t = 0; t < 2000; t++) begin
        a = N'($urandom); b = N'($urandom);
        #1;
        check(p2, k, es);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
