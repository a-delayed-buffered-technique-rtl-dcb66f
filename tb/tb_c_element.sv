// tb_c_element: self-checking test of the Muller C-element.
//
// Walks all input transitions many times in random order and checks that
// the output follows the inputs when they agree and keeps its previous value
// when they differ. Also checks both init values.
module tb_c_element;
  timeunit 1ns; timeprecision 1ps;

  logic init = 1'b0, a = 1'b0, b = 1'b0, c0, c1;
  logic expect_c0, expect_c1;
  int checks = 0, failures = 0, holds = 0, sets = 0, clears = 0;

  c_element #(.INIT(1'b0)) dut0 (.init, .a, .b, .c(c0));
  c_element #(.INIT(1'b1)) dut1 (.init, .a, .b, .c(c1));

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
    a = 1'b1; b = 1'b0;
    #1 init = 1'b1;
    #1 check(c0 == 1'b0 && c1 == 1'b1, "init values");
    init = 1'b0;
    #1 check(c0 == 1'b0 && c1 == 1'b1, "hold after init with a != b");
    expect_c0 = 1'b0;
    expect_c1 = 1'b1;
    for (int i = 0; i < 500; i++) begin
      {a, b} = 2'($urandom);
      if (a == b) begin
        if (a != expect_c0) begin if (a) sets++; else clears++; end
        expect_c0 = a;
        expect_c1 = a;
      end else holds++;
      #1;
      check(c0 == expect_c0, $sformatf("a=%b b=%b c=%b expected %b", a, b, c0, expect_c0));
      check(c1 == expect_c1, $sformatf("a=%b b=%b c=%b expected %b", a, b, c1, expect_c1));
    end
    check(holds > 0 && sets > 0 && clears > 0, "not every kind of transition seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_c_element
