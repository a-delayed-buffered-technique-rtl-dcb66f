// tb_delay_memory: self-checking test of the storage array.
//
// Clocks the array with per-block clocks driven by the testbench. Before
// each edge a random word (or none) is selected for writing with random
// data, and a random subset of the block clocks is made to toggle. After
// each edge every word is compared with a reference array: a word changes
// only when it is selected and its block clock made an edge.
module tb_delay_memory;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned DEPTH  = dbuf_pkg::DBUF_DEPTH;
  localparam int unsigned WIDTH  = dbuf_pkg::DBUF_WIDTH;
  localparam int unsigned FANOUT = dbuf_pkg::DBUF_FANOUT;
  localparam int unsigned NBLK   = DEPTH / FANOUT;

  logic [NBLK-1:0]             gclk = '0;
  logic [DEPTH-1:0]            we = '0;
  logic [DEPTH-1:0][WIDTH-1:0] wdata;
  logic [DEPTH-1:0][WIDTH-1:0] rdata;
  logic [WIDTH-1:0]            ref_mem [DEPTH];
  int checks = 0, failures = 0, writes = 0;

  delay_memory dut (.gclk, .we, .wdata, .rdata);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Fill every word once, clocking all blocks.
    for (int e = 0; e < DEPTH; e++) begin
      for (int k = 0; k < DEPTH; k++) wdata[k] = WIDTH'($urandom);
      we = DEPTH'(1) << e;
      #2 gclk = ~gclk;
      ref_mem[e] = wdata[e];
      #2;
    end
    for (int e = 0; e < 2000; e++) begin
      logic [NBLK-1:0] toggle;
      int unsigned j = $urandom % DEPTH;
      for (int k = 0; k < DEPTH; k++) wdata[k] = WIDTH'($urandom);
      we = ($urandom % 5 != 0) ? DEPTH'(1) << j : '0;
      toggle = NBLK'({$urandom, $urandom}) | NBLK'(1) << (j / FANOUT);
      if (e % 7 == 0) toggle[j / FANOUT] = 1'b0;   // selected, but no clock edge
      #2 gclk = gclk ^ toggle;
      if (we[j] && toggle[j / FANOUT]) begin ref_mem[j] = wdata[j]; writes++; end
      #2;
      for (int k = 0; k < DEPTH; k++) begin
        checks++;
        if (rdata[k] != ref_mem[k]) begin
          failures++;
          if (failures < 10) $display("FAIL edge %0d word %0d: %h expected %h", e, k, rdata[k], ref_mem[k]);
        end
      end
    end
    checks++;
    if (writes < 500) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_delay_memory
