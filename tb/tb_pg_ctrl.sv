// tb_pg_ctrl -- self-checking testbench for the power-gating sequencer.
//
// For every change of truncation request, the expected isolation and SLEEP
// vectors are worked out from the old and new sets of domains to be off
// (P and Q): one cycle after the request, iso = P|Q and sleep = P&Q (new
// domains isolated but still powered, returning domains powered but still
// isolated); two cycles after, iso = sleep = Q. The test covers every
// transition between k = 0, 4 and 8 for g = 4, random transitions for
// g = 1, and requests withdrawn after one cycle, which must bring the
// domains back to where they were without ever dropping isolation while
// asleep. The two-cycle latency is checked through busy.
module tb_pg_ctrl;
  import dpa_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [3:0] k4, k1;
  logic [1:0] iso4, sleep4;
  logic [7:0] iso1, sleep1;
  logic [3:0] ke4, ke1;
  logic busy4, busy1;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  pg_ctrl #(.G(4)) u4 (.clk(clk), .rst_n(rst_n), .k_req(k4), .iso(iso4),
                       .sleep(sleep4), .k_eff(ke4), .busy(busy4));
  pg_ctrl #(.G(1)) u1 (.clk(clk), .rst_n(rst_n), .k_req(k1), .iso(iso1),
                       .sleep(sleep1), .k_eff(ke1), .busy(busy1));

  function automatic logic [7:0] mask(input int k, input int g);
    logic [7:0] m = '0;
    for (int d = 0; d < 8 / g; d++) m[d] = (d < k / g);
    return m;
  endfunction

  function automatic int pop(input logic [7:0] v);
    int n = 0;
    for (int i = 0; i < 8; i++) n += int'(v[i]);
    return n;
  endfunction

  task automatic expect4(input logic [1:0] ei, input logic [1:0] es,
                         input logic eb, input string what);
    checks++;
    if (iso4 !== ei || sleep4 !== es || busy4 !== eb ||
        ke4 !== 4'(4 * pop({6'b0, ei}))) begin
      failures++;
      $display("FAIL g4 %s: iso=%b sleep=%b busy=%b k_eff=%0d, want iso=%b sleep=%b busy=%b",
               what, iso4, sleep4, busy4, ke4, ei, es, eb);
    end
  endtask

  task automatic expect1(input logic [7:0] ei, input logic [7:0] es,
                         input string what);
    checks++;
    if (iso1 !== ei || sleep1 !== es || ke1 !== 4'(pop(ei))) begin
      failures++;
      $display("FAIL g1 %s: iso=%b sleep=%b k_eff=%0d, want iso=%b sleep=%b",
               what, iso1, sleep1, ke1, ei, es);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int ks [3] = '{0, 4, 8};
    logic [7:0] p, q;
    int kold, knew;
    k4 = '0; k1 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(negedge clk);
    expect4(2'b00, 2'b00, 1'b0, "reset");

    // g = 4: all transitions, each one settling.
    kold = 0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        // go to ks[i] first
        @(negedge clk) k4 = 4'(ks[i]);
        repeat (3) @(negedge clk);
        kold = ks[i];
        knew = ks[j];
        if (knew == kold) continue;
        p = mask(kold, 4); q = mask(knew, 4);
        k4 = 4'(knew);
        #1 checks++;
        if (busy4 !== 1'b1) begin
          failures++; $display("FAIL busy not raised by request");
        end
        @(negedge clk);
        expect4(p[1:0] | q[1:0], p[1:0] & q[1:0], 1'b1, "first cycle");
        @(negedge clk);
        expect4(q[1:0], q[1:0], 1'b0, "second cycle");
      end

    // g = 4: requests withdrawn after one cycle.
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        if (i == j) continue;
        @(negedge clk) k4 = 4'(ks[i]);
        repeat (3) @(negedge clk);
        p = mask(ks[i], 4); q = mask(ks[j], 4);
        k4 = 4'(ks[j]);
        @(negedge clk);
        expect4(p[1:0] | q[1:0], p[1:0] & q[1:0], 1'b1, "abort first cycle");
        k4 = 4'(ks[i]);
        @(negedge clk);
        // returning domains are back on; aborted-off domains back on.
        expect4(p[1:0], p[1:0], 1'b0, "abort second cycle");
        @(negedge clk);
        expect4(p[1:0], p[1:0], 1'b0, "abort settled");
      end

    // g = 1: random settled transitions.
    kold = 0;
    for (int t = 0; t < 200; t++) begin
      knew = int'($urandom_range(8, 0));
      p = mask(kold, 1); q = mask(knew, 1);
      @(negedge clk) k1 = 4'(knew);
      @(negedge clk);
      expect1(p | q, p & q, "g1 first cycle");
      @(negedge clk);
      expect1(q, q, "g1 second cycle");
      kold = knew;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
