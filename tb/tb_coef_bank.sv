// tb_coef_bank -- self-checking testbench for the FIR coefficient registers.
//
// Checks that reset clears every register, that each write lands only in
// the addressed register and from the clock edge on, and that with the
// write enable low (the clock-gated state after loading) nothing changes
// whatever the address and data inputs do.
module tb_coef_bank;
  localparam int TAPS = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic we;
  logic [3:0] addr;
  logic signed [7:0] data;
  logic signed [7:0] coef [TAPS];
  logic signed [7:0] model [TAPS];

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  coef_bank u_dut (.clk(clk), .rst_n(rst_n), .we(we), .addr(addr),
                   .data(data), .coef(coef));

  task automatic compare(input string what);
    for (int t = 0; t < TAPS; t++) begin
      checks++;
      if (coef[t] !== model[t]) begin
        failures++;
        $display("FAIL %s: coef[%0d]=%0d want %0d", what, t, coef[t], model[t]);
      end
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; addr = '0; data = '0;
    for (int t = 0; t < TAPS; t++) model[t] = '0;
    #1;
    compare("reset");
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // load all taps in a random order, several times
    for (int r = 0; r < 4; r++) begin
      for (int t = 0; t < TAPS; t++) begin
        @(negedge clk);
        we = 1'b1; addr = 4'($urandom); data = 8'($urandom);
        #1;
        compare("before edge");
        @(posedge clk);
        model[addr] = data;
        #1;
        compare("after write");
      end
    end
    // hold: write enable low, inputs toggling
    for (int c = 0; c < 100; c++) begin
      @(negedge clk);
      we = 1'b0; addr = 4'($urandom); data = 8'($urandom);
      @(posedge clk);
      #1;
      compare("hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
