// tb_gated_mux_tree: self-checking test of the output gated multiplexer tree.
//
// Loads random words, selects one word with its path enabled and checks
// that dout is that word; then checks that dropping any one enable on the
// path (root, group, block or leaf) gives zero, and that enables on other
// branches do not disturb the result.
module tb_gated_mux_tree;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned DEPTH  = dbuf_pkg::DBUF_DEPTH;
  localparam int unsigned WIDTH  = dbuf_pkg::DBUF_WIDTH;
  localparam int unsigned FANOUT = dbuf_pkg::DBUF_FANOUT;
  localparam int unsigned NBLK   = DEPTH / FANOUT;
  localparam int unsigned NGRP   = NBLK / FANOUT;

  logic                        e0;
  logic [NGRP-1:0]             e1;
  logic [NBLK-1:0]             e2;
  logic [DEPTH-1:0]            e3;
  logic [DEPTH-1:0][WIDTH-1:0] words;
  logic [WIDTH-1:0]            dout;
  int checks = 0, failures = 0;

  gated_mux_tree dut (.e0, .e1, .e2, .e3, .words, .dout);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin
    for (int t = 0; t < 300; t++) begin
      int unsigned j = $urandom % DEPTH;
      int unsigned drop = $urandom % 4;
      for (int k = 0; k < DEPTH; k++) words[k] = WIDTH'($urandom);
      e0 = 1'b1;
      e3 = DEPTH'(1) << j;
      e2 = NBLK'(1) << (j / FANOUT);
      e1 = NGRP'(1) << (j / (FANOUT * FANOUT));
      // Neighbouring block enabled as well, as during a hand-over.
      if (t % 3 == 0) e2 = e2 | NBLK'(1) << ((j / FANOUT + 1) % NBLK);
      #1 check(dout == words[j], $sformatf("word %0d: dout %h expected %h", j, dout, words[j]));
      case (drop)
        0: e0 = 1'b0;
        1: e1[j / (FANOUT * FANOUT)] = 1'b0;
        2: e2[j / FANOUT] = 1'b0;
        default: e3[j] = 1'b0;
      endcase
      #1 check(dout == '0, $sformatf("word %0d with enable level %0d off: dout %h", j, drop, dout));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_gated_mux_tree
