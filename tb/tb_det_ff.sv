// tb_det_ff: self-checking test of the double-edge-triggered flip-flop.
//
// Drives random d and en before every clock edge, rising and falling, and
// checks after each edge that q holds the last d sampled with en high, so the
// register must update on both edges (two words per clock period). Also
// checks that an init pulse loads INIT, with the clock running and stopped.
module tb_det_ff;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned     WIDTH = 8;
  localparam logic [WIDTH-1:0] INIT = 8'hA5;

  logic             clk = 1'b0, init = 1'b0, en = 1'b0;
  logic [WIDTH-1:0] d = '0, q, expect_q;
  int checks = 0, failures = 0, updates = 0;

  det_ff #(.WIDTH(WIDTH), .INIT(INIT)) dut (.clk, .init, .en, .d, .q);

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL at %0t: %s", $time, what); end
  endtask

  initial begin
    #1 init = 1'b1;
    #1 check(q == INIT, "init value");
    #1 init = 1'b0;
    expect_q = INIT;
    // 400 edges at 5 ns spacing: clk period 10 ns.
    for (int e = 0; e < 400; e++) begin
      d  = WIDTH'($urandom);
      en = ($urandom % 4) != 0;
      #4 clk = ~clk;                       // edge
      if (en) begin expect_q = d; updates++; end
      #1 check(q == expect_q, $sformatf("edge %0d (%s): q %h expected %h",
                                        e, clk ? "rise" : "fall", q, expect_q));
    end
    check(updates > 100, "too few enabled edges");
    // Re-initialise with the clock high and stopped.
    init = 1'b1;
    #1 check(q == INIT, "re-init");
    init = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_det_ff
