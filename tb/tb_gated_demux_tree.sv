// tb_gated_demux_tree: self-checking test of the input gated driver tree.
//
// Applies random input words with random enables on every level (including
// the normal case of one selected word with covering enables) and checks
// every leaf against a leaf-by-leaf reference: a leaf carries din only when
// the root, its group, its block and its own enable are all high, and zero
// otherwise.
module tb_gated_demux_tree;
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
  logic [WIDTH-1:0]            din;
  logic [DEPTH-1:0][WIDTH-1:0] leaf;
  int checks = 0, failures = 0, passed = 0;

  gated_demux_tree dut (.e0, .e1, .e2, .e3, .din, .leaf);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      din = WIDTH'($urandom);
      if (t % 2 == 0) begin
        // Normal operation: one word selected, its path enabled.
        int unsigned j = $urandom % DEPTH;
        e0 = 1'b1;
        e3 = DEPTH'(1) << j;
        e2 = NBLK'(1) << (j / FANOUT);
        e1 = NGRP'(1) << (j / (FANOUT * FANOUT));
        if (t % 4 == 2) e2 = e2 | NBLK'(1) << ((j / FANOUT + 1) % NBLK);
      end else begin
        e0 = 1'($urandom);
        e1 = NGRP'($urandom);
        e2 = NBLK'({$urandom, $urandom});
        e3 = DEPTH'({$urandom, $urandom});
      end
      #1;
      for (int j = 0; j < DEPTH; j++) begin
        logic [WIDTH-1:0] exp_leaf;
        exp_leaf = (e0 && e1[j / (FANOUT * FANOUT)] && e2[j / FANOUT] && e3[j]) ? din : '0;
        if (exp_leaf != 0) passed++;
        checks++;
        if (leaf[j] !== exp_leaf) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d leaf %0d = %h, expected %h", t, j, leaf[j], exp_leaf);
        end
      end
    end
    checks++;
    if (passed < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_gated_demux_tree
